// bs_add: bit-serial addition modulo 2^16.
// A full adder whose carry is kept in a flip-flop and fed back to the next bit;
// the sum goes through one output flip-flop, so the latency is one cycle and a
// new word can follow the previous one without a gap. 'ctl' is high during the
// cycle before the LSB of a word arrives (the MSB cycle of the previous word):
// it clears the carry register, which drops the carry out of bit 15 and makes
// the addition modulo 2^16. This follows the original operator (full adder,
// carry register with clear, output register).
module bs_add (
  input  logic clk,
  input  logic ctl,    // high one cycle before the LSB of the operands
  input  logic a,      // operand A, LSB first
  input  logic b,      // operand B, time-aligned with A
  output logic s       // (A + B) mod 2^16, one cycle later
);
  logic c;
  always_ff @(posedge clk) begin
    s <= a ^ b ^ c;
    c <= ctl ? 1'b0 : ((a & b) | (a & c) | (b & c));
  end
endmodule
