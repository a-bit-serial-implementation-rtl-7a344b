// key_store: cyclic 16-bit register holding one subkey for a bit-serial operator.
// While 'load' is high the register is one link of the chain that runs through
// every subkey register of the core: each cycle it shifts right, taking 'si'
// into bit 15 and passing bit 0 to 'so'. After a word has been shifted in LSB
// first, bit 0 holds the subkey's LSB. Once 'load' falls the register holds
// still until the first control strobe of its operator ('ctl', high one cycle
// before the operand LSB, possibly in the last load cycle); from then on it
// rotates every cycle, output bit 0
// fed back to bit 15, so 'kbit' presents the subkey LSB first in step with the
// operand, once every 16 cycles. The cyclic register is the original design's
// constant store; waiting for the first strobe before rotating is this
// design's way of setting each register's phase, so the host may start the
// key load at any cycle.
module key_store
  import idea_pkg::*;
(
  input  logic clk,
  input  logic rst,    // synchronous, stops rotation until the next strobe
  input  logic load,   // chain-shift mode
  input  logic si,     // chain input
  output logic so,     // chain output
  input  logic ctl,    // operator control strobe
  output logic kbit    // subkey bit aligned with the operand bit
);
  word_t r;
  logic  running;
  always_ff @(posedge clk) begin
    if (rst) begin
      running <= 1'b0;
    end else if (load) begin
      r       <= {si, r[W-1:1]};
      running <= ctl;   // the next cycle may already carry an operand LSB
    end else begin
      if (running) r <= {r[0], r[W-1:1]};
      if (ctl)     running <= 1'b1;
    end
  end
  assign so   = r[0];
  assign kbit = r[0];
endmodule
