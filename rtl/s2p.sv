// s2p: serial-to-parallel converter for one 16-bit sub-block, latency 16.
// Bits enter LSB first and shift into a 16-bit register. 'ctl' is high in the
// cycle of a word's MSB (one cycle before the next word's LSB, the same
// strobe convention as the operators); at the end of that cycle the whole word
// is copied into the output register 'q', which then holds it for 16 cycles.
// A word whose LSB entered in cycle c is on 'q' from cycle c+16. Named in the
// original design, which gives its 16-cycle latency; the structure is this
// design's.
module s2p
  import idea_pkg::*;
(
  input  logic  clk,
  input  logic  ctl,
  input  logic  si,
  output word_t q
);
  logic [W-2:0] r;   // the 15 bits received before the current one
  always_ff @(posedge clk) begin
    r <= {si, r[W-2:1]};
    if (ctl) q <= {si, r};
  end
endmodule
