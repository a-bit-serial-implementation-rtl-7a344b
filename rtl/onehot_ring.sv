// onehot_ring: global 16-bit one-hot shift register.
// Reset loads 0x0001; every cycle the single 1 moves one position up (bit 15
// wraps to bit 0), so oh[k] is high in cycles k, k+16, k+32, ... after reset.
// All operators, key registers and converters take their word-start strobes
// from taps of this vector instead of carrying their own control logic, as in
// the original design.
module onehot_ring
  import idea_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  output onehot_t oh
);
  always_ff @(posedge clk) begin
    if (rst) oh <= onehot_t'(1);
    else     oh <= {oh[W-2:0], oh[W-1]};
  end
endmodule
