// idea_wildcard_top: IDEA accelerator with its host interface.
// The host loads the 52 pre-computed subkeys through the key chain
// ('key_load', 'key_si'), writes plaintext as pairs of 32-bit words, and later
// reads the results as 32-bit words from the ciphertext buffer. Inside, the
// plaintext registers and control (host_if_ctrl) feed an array of NCORES
// bit-serial IDEA cores (idea_array); a 923-stage valid shift register tells
// the buffer (ct_buffer) when a meaningful result block leaves the cores.
// Decryption is the same operation with decryption subkeys loaded.
// Default: one core (64 bits per 16 cycles) and a 1024-block buffer. The bus
// interface proper is outside this module: its side is the plain word bus
// below, in the core clock domain (the original board ran the bus at 33 MHz and
// the core at 125 MHz; this design uses one clock).
module idea_wildcard_top
  import idea_pkg::*;
#(
  parameter int unsigned NCORES     = 1,
  parameter int unsigned BUF_BLOCKS = 1024,
  localparam int unsigned AW        = $clog2(BUF_BLOCKS)
) (
  input  logic        clk,
  input  logic        rst,
  // subkey loading
  input  logic        key_load,
  input  logic        key_si,
  output logic        key_so,
  // plaintext write
  input  logic        wr_en,
  input  logic [31:0] wr_data,
  output logic        pt_ready,
  output logic        overrun,
  // result buffer
  input  logic        buf_clear,
  input  logic [AW:0] rd_addr,
  output logic [31:0] rd_data,
  output logic [AW:0] ct_count,
  output logic        buf_full
);
  block_t pt, ct;
  logic   ack, ct_new, ct_we;

  host_if_ctrl #(.LAT(CORE_LAT)) u_ctrl (
    .clk, .rst, .wr_en, .wr_data, .pt_ready, .overrun, .pt, .ack, .ct_we
  );

  idea_array #(.NCORES(NCORES)) u_array (
    .clk, .rst, .key_load, .key_si, .key_so, .pt, .pt_ack(ack), .ct, .ct_new
  );

  ct_buffer #(.DEPTH(BUF_BLOCKS)) u_buf (
    .clk, .rst, .clear(buf_clear), .we(ct_we), .ct, .rd_addr, .rd_data,
    .count(ct_count), .full(buf_full)
  );

  // the valid pipeline and the cores' own output strobe must agree
  always_ff @(posedge clk) begin
    if (!rst) assert (!ct_we || ct_new) else $error("valid shift register out of step with the cores");
  end
endmodule
