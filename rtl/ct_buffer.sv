// ct_buffer: ciphertext buffer of two 32-bit wide block RAMs.
// Each result block is written at the next free entry: {Y1,Y2} into RAM 0 and
// {Y3,Y4} into RAM 1, so a burst of blocks lands at consecutive locations.
// The host reads 32-bit words: word address 2k+0 returns {Y1,Y2} of block k,
// 2k+1 returns {Y3,Y4}; read data is registered (one cycle, as a block RAM).
// 'clear' restarts writing at entry 0. 'count' is the number of blocks
// written; when DEPTH blocks are stored 'full' is set and further blocks are
// dropped. DEPTH = 1024 is the capacity of eight 256 x 32-bit block RAMs,
// as in the original board interface; the write pointer, clear and full
// handling are this design's.
module ct_buffer
  import idea_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear,
  input  logic          we,
  input  block_t        ct,
  input  logic [AW:0]   rd_addr,   // word address
  output logic [31:0]   rd_data,
  output logic [AW:0]   count,
  output logic          full
);
  logic [31:0] ram0 [DEPTH];
  logic [31:0] ram1 [DEPTH];

  assign full = (count == (AW+1)'(DEPTH));

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      count <= '0;
    end else if (we && !full) begin
      count <= count + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (we && !full && !rst && !clear) begin
      ram0[count[AW-1:0]] <= {ct[0], ct[1]};
      ram1[count[AW-1:0]] <= {ct[2], ct[3]};
    end
  end

  always_ff @(posedge clk) begin
    rd_data <= rd_addr[0] ? ram1[rd_addr[AW:1]] : ram0[rd_addr[AW:1]];
  end
endmodule
