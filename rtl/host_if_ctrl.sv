// host_if_ctrl: host-side control between the bus and the IDEA cores.
// The host writes each 64-bit plaintext as two 32-bit words: the first word
// ({X1,X2}) goes to plaintext register 0, the second ({X3,X4}) to register 1,
// and the second write raises 'data_valid'. The cores take the block in the
// next cycle where 'ack' is high, which clears 'data_valid'. The AND of
// 'data_valid' and 'ack' enters a LAT-stage shift register; its output
// 'ct_we' is high exactly when the corresponding result block leaves the
// cores, and is the write enable of the ciphertext buffer.
// Writes are accepted only while 'pt_ready' is high (no block waiting). A write
// attempted while a block waits is dropped and sets the sticky 'overrun' flag
// (cleared by reset); the host avoids this by pacing its writes, as the original
// host did by inserting idle bus words. Registers, the AND gate and the
// 923-stage valid shift register follow the original interface; the word
// order, ready/overrun handshake and single clock are this design's choices.
module host_if_ctrl
  import idea_pkg::*;
#(
  parameter int unsigned LAT = CORE_LAT   // 923
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        wr_en,      // host writes wr_data
  input  logic [31:0] wr_data,
  output logic        pt_ready,   // a write would be accepted
  output logic        overrun,    // sticky: a write was dropped
  output block_t      pt,         // plaintext block to the cores
  input  logic        ack,        // cores take pt in this cycle
  output logic        ct_we       // result block of a valid input leaves now
);
  logic [31:0]    reg0, reg1;
  logic           word_sel, data_valid;
  logic [LAT-1:0] vsr;

  assign pt_ready = ~data_valid;
  assign pt       = {reg1[15:0], reg1[31:16], reg0[15:0], reg0[31:16]};

  always_ff @(posedge clk) begin
    if (rst) begin
      word_sel   <= 1'b0;
      data_valid <= 1'b0;
      overrun    <= 1'b0;
    end else begin
      if (wr_en && data_valid) begin
        overrun <= 1'b1;
      end else if (wr_en) begin
        if (!word_sel) reg0 <= wr_data;
        else           reg1 <= wr_data;
        word_sel <= ~word_sel;
      end
      if (wr_en && !data_valid && word_sel) data_valid <= 1'b1;
      else if (ack)                         data_valid <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) vsr <= '0;
    else     vsr <= {vsr[LAT-2:0], data_valid & ack};
  end
  assign ct_we = vsr[LAT-1];
endmodule
