// bs_xor: bit-serial XOR of two LSB-first streams.
// One XOR gate followed by a flip-flop, so the result stream lags the operands
// by one cycle (latency 1) and a new operand bit can enter every cycle. No
// control signal is needed because XOR has no carry between bit positions.
// Structure as in the original bit-serial operator set (XOR plus one stage).
module bs_xor (
  input  logic clk,
  input  logic a,      // operand A, LSB first
  input  logic b,      // operand B, time-aligned with A
  output logic y       // A xor B, one cycle later
);
  always_ff @(posedge clk) y <= a ^ b;
endmodule
