// idea_out_transform: IDEA output transformation (half round), latency 35.
// Y1 = X1*Z1, Y2 = X3'+Z2, Y3 = X2'+Z3, Y4 = X4*Z4, where X2'/X3' are the
// second and third inputs; taking them crossed undoes the swap that the last
// round applied. The two additions take one cycle and wait 34 stages so that
// all four outputs leave together, 35 cycles after the input LSB. Inputs
// have their LSB in cycles where oh[PHASE] is set. Subkey chain: key_si -> Z1
// -> Z2 -> Z3 -> Z4 -> key_so, multiplier subkeys loaded decremented by one.
// Operators and latency follow the original design; the delay placement
// mirrors the round's first layer.
module idea_out_transform
  import idea_pkg::*;
#(
  parameter int unsigned PHASE = 0
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
  logic [4:0] kc;
  logic k2, k3, s2, s3;
  logic ctl;
  assign ctl    = oh[ctl_tap(PHASE, 0)];
  assign kc[0]  = key_si;
  assign key_so = kc[4];

  mulmod u_m1 (.clk, .rst, .ctl, .a(x[0]), .key_load, .key_si(kc[0]), .key_so(kc[1]), .m(y[0]));
  key_store u_k2 (.clk, .rst, .load(key_load), .si(kc[1]), .so(kc[2]), .ctl, .kbit(k2));
  key_store u_k3 (.clk, .rst, .load(key_load), .si(kc[2]), .so(kc[3]), .ctl, .kbit(k3));
  bs_add u_a2 (.clk, .ctl, .a(x[2]), .b(k2), .s(s2));
  bs_add u_a3 (.clk, .ctl, .a(x[1]), .b(k3), .s(s3));
  bs_delay #(.N(MUL_LAT - ADD_LAT)) u_d2 (.clk, .d(s2), .q(y[1]));
  bs_delay #(.N(MUL_LAT - ADD_LAT)) u_d3 (.clk, .d(s3), .q(y[2]));
  mulmod u_m4 (.clk, .rst, .ctl, .a(x[3]), .key_load, .key_si(kc[3]), .key_so(kc[4]), .m(y[3]));
endmodule
