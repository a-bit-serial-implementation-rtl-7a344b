// idea_core: bit-serial IDEA encryption/decryption core.
// Four parallel-to-serial converters, eight cascaded rounds, the output
// transformation and four serial-to-parallel converters. The core accepts a
// 64-bit block in every cycle where oh[0] is high ('pt_ack', once every 16
// cycles) and delivers the processed block 923 cycles later:
//   8 x 109 (rounds) + 35 (output transformation) + 16 (converter) = 923.
// 'ct' changes only in cycles where 'ct_new' is high and then holds for 16
// cycles. A block is taken every 16 cycles whether or not it is meaningful;
// tracking which outputs are valid is left to the user of the core.
// 'pt_ack' is a copy of oh[0], brought out so that the user need not know
// which phase bit loads the converters.
// Encryption or decryption is chosen only by the subkeys. All 52 subkey
// registers form one 832-bit chain: while 'key_load' is high, 'key_si' shifts
// in one bit per cycle, starting with the last subkey (Z4 of the output
// transformation) and ending with Z1 of round 1, each LSB first, multiplier
// subkeys decremented by one. Keys can be loaded at any time; blocks in flight
// during loading are corrupted.
// Structure, latency and the global one-hot control follow the original
// design; the key chain order and the PHASE-based tap selection are this
// design's.
module idea_core
  import idea_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  onehot_t oh,        // global one-hot phase vector
  input  logic    key_load,
  input  logic    key_si,
  output logic    key_so,
  input  block_t  pt,        // X1..X4
  output logic    pt_ack,    // pt is taken in this cycle
  output block_t  ct,        // Y1..Y4
  output logic    ct_new     // ct updated this cycle
);
  localparam int unsigned OT_PHASE  = (NROUNDS * ROUND_LAT) % W;
  localparam int unsigned S2P_TAP   = (NROUNDS * ROUND_LAT + OT_LAT + W - 1) % W;

  assign pt_ack = oh[0];

  logic [3:0] s [NROUNDS+2];   // serial block between stages
  logic [NROUNDS+1:0] kc;      // key chain between stages
  assign kc[0] = key_si;

  for (genvar i = 0; i < 4; i++) begin : g_p2s
    p2s u_p2s (.clk, .load(pt_ack), .d(pt[i]), .so(s[0][i]));
  end

  for (genvar r = 0; r < NROUNDS; r++) begin : g_round
    idea_round #(.PHASE((ROUND_LAT * r) % W)) u_round (
      .clk, .rst, .oh, .key_load, .key_si(kc[r]), .key_so(kc[r+1]),
      .x(s[r]), .y(s[r+1])
    );
  end

  idea_out_transform #(.PHASE(OT_PHASE)) u_ot (
    .clk, .rst, .oh, .key_load, .key_si(kc[NROUNDS]), .key_so(kc[NROUNDS+1]),
    .x(s[NROUNDS]), .y(s[NROUNDS+1])
  );
  assign key_so = kc[NROUNDS+1];

  for (genvar i = 0; i < 4; i++) begin : g_s2p
    s2p u_s2p (.clk, .ctl(oh[S2P_TAP]), .si(s[NROUNDS+1][i]), .q(ct[i]));
  end

  always_ff @(posedge clk) begin
    if (rst) ct_new <= 1'b0;
    else     ct_new <= oh[S2P_TAP];
  end
endmodule
