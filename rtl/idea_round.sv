// idea_round: one fully pipelined bit-serial IDEA round, latency 109 cycles.
// Inputs x[0..3] (X1..X4) arrive as time-aligned LSB-first streams whose LSB
// is present in cycles where the global one-hot vector 'oh' has bit PHASE set;
// outputs y[0..3] carry the round result 109 cycles later, with the two
// middle sub-blocks already swapped. Schedule (cycle of operand LSB, Fig. 3 of
// the original architecture):
//   0   A = X1*Z1, D = X4*Z4 (35), B = X2+Z2, C = X3+Z3 (1, then 34 stages)
//   35  E = A^C, F = B^D
//   36  T0 = E*Z5           (F waits 35 stages)
//   71  U  = T0 + F
//   72  T2 = U*Z6           (T0 waits 36 stages)
//   107 T1 = T0 + T2        (T2 waits 1 stage)
//   108 Y1 = A^T2, Y2 = C^T2, Y3 = B^T1, Y4 = D^T1 (A, B, C, D waited 73)
// Every operator needing a control strobe takes it from the one-hot vector at
// the tap one cycle before its operand LSB. Subkey chain order: key_si -> Z1 ->
// Z2 -> Z3 -> Z4 -> Z5 -> Z6 -> key_so; multiplier subkeys are loaded
// decremented by one. The schedule and delays are those of the original
// design; the one-hot tap arithmetic is this design's realisation of its
// global control.
module idea_round
  import idea_pkg::*;
#(
  parameter int unsigned PHASE = 0     // one-hot bit marking the input LSB cycle
) (
  input  logic     clk,
  input  logic     rst,
  input  onehot_t  oh,
  input  logic     key_load,
  input  logic     key_si,
  output logic     key_so,
  input  logic [3:0] x,
  output logic [3:0] y
);
  logic [6:0] kc;          // key chain links
  assign kc[0]  = key_si;
  assign key_so = kc[6];

  logic k2, k3;
  logic a, d, b0, c0, b, c;
  mulmod u_m1 (.clk, .rst, .ctl(oh[ctl_tap(PHASE, 0)]), .a(x[0]),
               .key_load, .key_si(kc[0]), .key_so(kc[1]), .m(a));
  key_store u_k2 (.clk, .rst, .load(key_load), .si(kc[1]), .so(kc[2]),
                  .ctl(oh[ctl_tap(PHASE, 0)]), .kbit(k2));
  key_store u_k3 (.clk, .rst, .load(key_load), .si(kc[2]), .so(kc[3]),
                  .ctl(oh[ctl_tap(PHASE, 0)]), .kbit(k3));
  bs_add u_a2 (.clk, .ctl(oh[ctl_tap(PHASE, 0)]), .a(x[1]), .b(k2), .s(b0));
  bs_add u_a3 (.clk, .ctl(oh[ctl_tap(PHASE, 0)]), .a(x[2]), .b(k3), .s(c0));
  bs_delay #(.N(MUL_LAT - ADD_LAT)) u_db (.clk, .d(b0), .q(b));
  bs_delay #(.N(MUL_LAT - ADD_LAT)) u_dc (.clk, .d(c0), .q(c));
  mulmod u_m4 (.clk, .rst, .ctl(oh[ctl_tap(PHASE, 0)]), .a(x[3]),
               .key_load, .key_si(kc[3]), .key_so(kc[4]), .m(d));

  // multiply-addition structure
  logic e, f, f_d, t0, t0_d, u, t2, t2_d, t1;
  bs_xor u_e (.clk, .a(a), .b(c), .y(e));                     // 35 -> 36
  bs_xor u_f (.clk, .a(b), .b(d), .y(f));
  mulmod u_m5 (.clk, .rst, .ctl(oh[ctl_tap(PHASE, 36)]), .a(e),
               .key_load, .key_si(kc[4]), .key_so(kc[5]), .m(t0)); // 36 -> 71
  bs_delay #(.N(35)) u_df (.clk, .d(f), .q(f_d));             // 36 -> 71
  bs_add u_au (.clk, .ctl(oh[ctl_tap(PHASE, 71)]), .a(t0), .b(f_d), .s(u)); // 71 -> 72
  mulmod u_m6 (.clk, .rst, .ctl(oh[ctl_tap(PHASE, 72)]), .a(u),
               .key_load, .key_si(kc[5]), .key_so(kc[6]), .m(t2)); // 72 -> 107
  bs_delay #(.N(36)) u_dt0 (.clk, .d(t0), .q(t0_d));          // 71 -> 107
  bs_add u_at1 (.clk, .ctl(oh[ctl_tap(PHASE, 107)]), .a(t0_d), .b(t2), .s(t1)); // 107 -> 108
  bs_delay #(.N(1)) u_dt2 (.clk, .d(t2), .q(t2_d));           // 107 -> 108

  // outer paths wait 73 stages, then the final XORs (108 -> 109)
  logic a_d, b_d, c_d, d_d;
  bs_delay #(.N(73)) u_da (.clk, .d(a), .q(a_d));
  bs_delay #(.N(73)) u_db2 (.clk, .d(b), .q(b_d));
  bs_delay #(.N(73)) u_dc2 (.clk, .d(c), .q(c_d));
  bs_delay #(.N(73)) u_dd (.clk, .d(d), .q(d_d));
  bs_xor u_y1 (.clk, .a(a_d), .b(t2_d), .y(y[0]));
  bs_xor u_y2 (.clk, .a(c_d), .b(t2_d), .y(y[1]));   // middle sub-blocks swapped
  bs_xor u_y3 (.clk, .a(b_d), .b(t1),   .y(y[2]));
  bs_xor u_y4 (.clk, .a(d_d), .b(t1),   .y(y[3]));
endmodule
