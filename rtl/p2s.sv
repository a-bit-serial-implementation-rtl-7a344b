// p2s: parallel-to-serial converter for one 16-bit sub-block.
// In a cycle with 'load' high the word 'd' is taken; its LSB appears on 'so'
// in that same cycle (so the serial word starts with no added latency) and the
// remaining 15 bits follow on the next cycles. Between loads the register
// shifts zeros. The converter is named in the original design; this
// shift-register form and the zero-latency first bit are this design's choice.
module p2s
  import idea_pkg::*;
(
  input  logic  clk,
  input  logic  load,
  input  word_t d,
  output logic  so
);
  word_t r;
  always_ff @(posedge clk) begin
    if (load) r <= {1'b0, d[W-1:1]};
    else      r <= {1'b0, r[W-1:1]};
  end
  assign so = load ? d[0] : r[0];
endmodule
