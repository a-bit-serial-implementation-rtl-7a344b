// mulmod: bit-serial multiplication modulo 2^16+1 by a stored subkey.
// Operand 'a' arrives LSB first, one 16-bit word every 16 cycles; the value 0
// stands for 2^16 (IDEA convention). The result word leaves 'm' LSB first 35
// cycles after the operand LSB entered (latency 35), one word every 16 cycles.
// With x = a-1 and y = key-1 (mod 2^16), t = x*y + x + y + 1 = a*key (32 bits),
// and the result is lo(t) - hi(t) + (lo(t) <= hi(t)) mod 2^16.
// Datapath (cycle numbers relative to the operand LSB in cycle 0; 'ctl' is
// high in cycle -1):
//   cycle 1   decremented operand x (serial subtract of 1)
//   cycle 1   y from the cyclic subkey register (the host loads key-1)
//   cycle 2   product x*y from the two-pipeline multiplier (dual_lyon_mult)
//   cycle 3   t = x*y + x + y + 1 per pipeline (3-input serial adder,
//             carry preset to 1), 32 bits long
//   cycle 3   a switch sends the lower word of t to one line and the upper
//             word of the previous t to the other; the lower line is delayed
//             16 cycles so that lo(t) and hi(t) of one word line up (cycle 19)
//   cycle 20  lo - hi (serial subtractor), delayed 14 more cycles
//   cycle 34  serial compare lo <= hi is complete; it enters the final
//             adder as carry-in of the LSB
//   cycle 35  result LSB on 'm'
// Control strobes are copies of 'ctl' delayed by 1, 2, 19 and 35 cycles.
// The subkey chain: while 'key_load' is high 'key_si' shifts into both the
// multiplier's b registers and the cyclic subkey register, and 'key_so' passes
// it on. The split into decrement, shared-b two-pipeline multiplier, adders,
// switch, 16-cycle alignment, subtract/compare and final add follows the
// original architecture; the 3-input adder (instead of a 16-bit x+y adder)
// and the exact delay split are this design's choices.
module mulmod
  import idea_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic ctl,       // high one cycle before the operand LSB
  input  logic a,         // operand, LSB first
  input  logic key_load,  // key chain shift mode
  input  logic key_si,    // key chain input (pre-decremented subkey, LSB first)
  output logic key_so,    // key chain output
  output logic m          // product mod 2^16+1, LSB first, 35 cycles later
);
  // control delay line: cd[k] = ctl delayed k cycles
  logic [35:1] cd;
  always_ff @(posedge clk) begin
    if (rst) cd <= '0;
    else     cd <= {cd[34:1], ctl};
  end

  // x = a - 1 (serial decrement: subtract with borrow preset at each LSB)
  logic x, bw;
  always_ff @(posedge clk) begin
    x  <= a ^ bw;
    bw <= ctl ? 1'b1 : (~a & bw);
  end

  // y = key - 1 from the cyclic subkey register, in step with x
  logic y;
  key_store u_key (
    .clk, .rst, .load(key_load), .si(key_si), .so(key_so),
    .ctl(cd[1]), .kbit(y)
  );

  // x*y in two pipelines
  logic tog, pu, pl;
  dual_lyon_mult u_mult (
    .clk, .rst, .ctl(cd[1]), .a(x), .b_load(key_load), .b_si(key_si),
    .tog, .p(pu), .q(pl)
  );

  // t = x*y + x + y + 1 for each pipeline
  logic       xu, yu, xl, yl, tu, tl;
  logic [1:0] cu, cl;
  logic [2:0] su, sl;
  always_ff @(posedge clk) begin
    xu <= x & tog;   yu <= y & tog;
    xl <= x & ~tog;  yl <= y & ~tog;
  end
  assign su = 3'(pu) + 3'(xu) + 3'(yu) + 3'(cu);
  assign sl = 3'(pl) + 3'(xl) + 3'(yl) + 3'(cl);
  always_ff @(posedge clk) begin
    tu <= su[0];
    tl <= sl[0];
    cu <= (cd[2] &  tog) ? 2'd1 : su[2:1];
    cl <= (cd[2] & ~tog) ? 2'd1 : sl[2:1];
  end

  // switch: lower word of the newest t to 'lo', upper word of the older t to 'hi'
  logic tog_d1, tog_d2, lo, hi, lo_al;
  always_ff @(posedge clk) begin
    tog_d1 <= tog;
    tog_d2 <= tog_d1;
  end
  assign lo = tog_d2 ? tu : tl;
  assign hi = tog_d2 ? tl : tu;
  bs_delay #(.N(W)) u_lo_align (.clk, .d(lo), .q(lo_al));

  // lo - hi and lo <= hi, both over the aligned words (cycles 19..34)
  logic d, br, le, le_now, d_al;
  assign le_now = (lo_al != hi) ? hi : le;
  always_ff @(posedge clk) begin
    d  <= lo_al ^ hi ^ br;
    br <= cd[19] ? 1'b0 : ((~lo_al & hi) | (~(lo_al ^ hi) & br));
    le <= cd[19] ? 1'b1 : le_now;
  end
  bs_delay #(.N(14)) u_d_align (.clk, .d(d), .q(d_al));

  // final addition: (lo - hi) + (lo <= hi)
  logic fc, cin;
  assign cin = cd[35] ? le_now : fc;
  always_ff @(posedge clk) begin
    m  <= d_al ^ cin;
    fc <= d_al & cin;
  end
endmodule
