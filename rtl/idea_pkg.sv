// idea_pkg: constants and types shared by the bit-serial IDEA design.
// All datapath words are 16-bit sub-blocks carried LSB first over one wire,
// one word every 16 clock cycles. A 64-bit block is four sub-blocks, index 0
// being X1/Y1. The latencies below are those of the original bit-serial
// architecture (operator 1 cycle, multiplier 35, round 109, core 923).
package idea_pkg;
  localparam int unsigned W          = 16;   // sub-block width = word period in cycles
  localparam int unsigned ADD_LAT    = 1;    // bit-serial XOR / adder latency
  localparam int unsigned MUL_LAT    = 35;   // bit-serial multiply mod 2^16+1 latency
  localparam int unsigned ROUND_LAT  = 109;  // one round
  localparam int unsigned OT_LAT     = 35;   // output transformation
  localparam int unsigned NROUNDS    = 8;
  localparam int unsigned NSUBKEYS   = 52;   // 6 per round, 4 in the output transformation
  // load edge to parallel ciphertext: 8 rounds + output transformation + converter
  localparam int unsigned CORE_LAT   = NROUNDS * ROUND_LAT + OT_LAT + W;  // 923

  typedef logic [W-1:0]   word_t;
  typedef word_t [3:0]    block_t;   // [0]=X1 ... [3]=X4
  typedef logic [W-1:0]   onehot_t;  // global one-hot phase vector

  // Index into the one-hot vector for the control strobe of an operator whose
  // operand LSB arrives 'offset' cycles after phase 'phase'. The control is
  // high one cycle before the LSB.
  function automatic int unsigned ctl_tap(int unsigned phase, int unsigned offset);
    return (phase + offset + W - 1) % W;
  endfunction
endpackage
