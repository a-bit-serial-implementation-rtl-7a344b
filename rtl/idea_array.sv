// idea_array: NCORES IDEA cores working round robin on one input stream.
// One 16-bit one-hot register serves all cores; core i receives the vector
// rotated by i, so it takes a block in the cycles where bit i of the shared
// vector is high and delivers its result i cycles after core 0 does. The
// input block 'pt' is broadcast to every core; 'pt_ack' is high in the cycles
// where one of the cores takes it (NCORES cycles out of every 16). Results are
// merged onto 'ct': in each cycle only the core whose result is new drives it
// (an AND-OR bus in place of tri-state buffers), and 'ct_new' marks those
// cycles. Every block keeps the single-core latency of 923 cycles. With
// NCORES = 16 a block can enter every cycle. All cores load the same subkeys
// from 'key_si' in parallel. The shifted control and round-robin
// forwarding/merging follow the original scaled design; the AND-OR merge is
// this design's choice.
module idea_array
  import idea_pkg::*;
#(
  parameter int unsigned NCORES = 16   // 1..16
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    key_load,
  input  logic    key_si,
  output logic    key_so,
  input  block_t  pt,
  output logic    pt_ack,
  output block_t  ct,
  output logic    ct_new
);
  onehot_t oh;
  onehot_ring u_oh (.clk, .rst, .oh);

  logic   [NCORES-1:0] ack, nw, kso;
  block_t              cts [NCORES];

  for (genvar i = 0; i < NCORES; i++) begin : g_core
    onehot_t ohi;
    if (i == 0) begin : g_norot
      assign ohi = oh;
    end else begin : g_rot
      assign ohi = {oh[i-1:0], oh[W-1:i]};   // ohi[0] = oh[i]
    end
    idea_core u_core (
      .clk, .rst, .oh(ohi), .key_load, .key_si, .key_so(kso[i]),
      .pt, .pt_ack(ack[i]), .ct(cts[i]), .ct_new(nw[i])
    );
  end

  always_comb begin
    ct = '0;
    for (int i = 0; i < NCORES; i++)
      if (nw[i]) ct |= cts[i];
  end
  assign pt_ack = |ack;
  assign ct_new = |nw;
  assign key_so = kso[NCORES-1];

  initial assert (NCORES >= 1 && NCORES <= W) else $error("NCORES must be 1..16");
endmodule
