// dual_lyon_mult: two Lyon serial-parallel multipliers sharing one set of
// b registers, giving a full 32-bit product every 16 cycles.
// A single serial-parallel multiplier needs 32 cycles per product (16 operand
// bits followed by 16 zeros while the upper half drains). Here a toggle flip-flop
// steers alternate 16-bit words of 'a' into the upper (P) and lower (Q)
// pipeline; the pipeline not selected receives zeros, which supplies the zero
// padding. 'ctl' is high one cycle before the LSB of each word and flips the
// toggle, so a word goes to P when the toggle is 1 and to Q when it is 0.
// Each pipeline is a row of 16 cells. Cell j adds a_i*b_j, the sum bit of cell
// j+1 and its own carry; the sum moves one cell to the right per cycle and
// the carry stays. Cell 15 only registers a_i*b_15. The product leaves cell 0
// LSB first: product bit k of a word whose LSB entered in cycle c appears on
// p (or q) in cycle c+1+k, k = 0..31. After its 32 bits a pipeline is empty
// again, so no clearing is needed between words.
// 'b' is the fixed operand: loaded serially, LSB first, while 'b_load' is high,
// then held. The cell equations, the toggle and the shared b registers follow
// the original design; reset of the cells is this design's addition.
module dual_lyon_mult
  import idea_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic ctl,      // high one cycle before the LSB of each 'a' word
  input  logic a,        // serial operand, LSB first, one word per 16 cycles
  input  logic b_load,   // shift b_si into the b registers
  input  logic b_si,
  output logic tog,      // toggle: 1 while the current word goes to P
  output logic p,        // product stream of the upper pipeline
  output logic q         // product stream of the lower pipeline
);
  word_t b;
  word_t sp, cp, sq, cq;   // sum and carry registers of the two rows
  logic  ap, aq;

  assign ap = a & tog;
  assign aq = a & ~tog;

  always_ff @(posedge clk) begin
    if (b_load) b <= {b_si, b[W-1:1]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      tog <= 1'b0;
      sp  <= '0; cp <= '0; sq <= '0; cq <= '0;
    end else begin
      if (ctl) tog <= ~tog;
      sp[W-1] <= ap & b[W-1];
      sq[W-1] <= aq & b[W-1];
      cp[W-1] <= 1'b0;
      cq[W-1] <= 1'b0;
      for (int j = 0; j < W-1; j++) begin
        {cp[j], sp[j]} <= 2'((ap & b[j])) + 2'(sp[j+1]) + 2'(cp[j]);
        {cq[j], sq[j]} <= 2'((aq & b[j])) + 2'(sq[j+1]) + 2'(cq[j]);
      end
    end
  end

  assign p = sp[0];
  assign q = sq[0];
endmodule
