// idea_host_pkg: shared testbench helpers that play the host of the
// accelerator top: key-chain loading and block/word conversions.
package idea_host_pkg;
  import idea_ref_pkg::*;
  // {X1,X2} and {X3,X4} bus words of a block
  function automatic logic [31:0] word_of(block_t b, int k);
    return k == 0 ? {b[0], b[1]} : {b[2], b[3]};
  endfunction
  function automatic block_t block_of(logic [31:0] w0, logic [31:0] w1);
    block_t b;
    b[0] = w0[31:16]; b[1] = w0[15:0]; b[2] = w1[31:16]; b[3] = w1[15:0];
    return b;
  endfunction
  function automatic block_t rand_block();
    return {word_t'($urandom), word_t'($urandom), word_t'($urandom), word_t'($urandom)};
  endfunction
endpackage
