// idea_round_tb: one bit-serial round with random subkeys. Blocks are
// serialised by the testbench with their LSB in one-hot phase 0, one block
// every 16 cycles, and each output block is collected 109 cycles after its
// input and compared with a word-level model of one IDEA round (middle
// sub-blocks swapped).
module idea_round_tb;
  import idea_ref_pkg::*;
  logic clk = 0, rst = 1, key_load = 0, key_si = 0, key_so;
  logic [3:0] x = '0, y;
  idea_pkg::onehot_t oh;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  onehot_ring u_oh (.clk, .rst, .oh);
  idea_round #(.PHASE(0)) dut (.*);

  function automatic block_t round_ref(block_t v, word_t z [6]);
    word_t a, b, c, d, t0, t1;
    block_t r;
    a = mul(v[0], z[0]); b = v[1] + z[1]; c = v[2] + z[2]; d = mul(v[3], z[3]);
    t0 = mul(a ^ c, z[4]);
    t1 = mul((b ^ d) + t0, z[5]);
    t0 = t0 + t1;
    r[0] = a ^ t1; r[1] = c ^ t1; r[2] = b ^ t0; r[3] = d ^ t0;
    return r;
  endfunction

  localparam int NB = 24;
  word_t  z [6];
  block_t blk [NB], got [NB];
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 6; i++) z[i] = word_t'($urandom);
    z[3] = 0;                                  // 2^16 as a subkey
    for (int i = 0; i < NB; i++)
      blk[i] = {word_t'($urandom), word_t'($urandom), word_t'($urandom), word_t'($urandom)};
    blk[1][0] = 0;
    @(negedge clk); rst = 0;
    key_load = 1;
    for (int n = 0; n < 96; n++) begin
      automatic int idx = 5 - n / 16;
      automatic word_t v = (idx == 1 || idx == 2) ? z[idx] : word_t'(z[idx] - 1);
      key_si = v[n % 16];
      @(negedge clk);
    end
    key_load = 0;
    // wait for phase 0 (oh[0] high in the coming cycle)
    while (!oh[15]) @(negedge clk);
    @(negedge clk);
    for (int t = 0; t < 16 * NB + 130; t++) begin
      automatic int i = t / 16;
      for (int s = 0; s < 4; s++) x[s] = (i < NB) ? blk[i][s][t % 16] : 1'b0;
      @(negedge clk);
      for (int w = 0; w < NB; w++) begin
        automatic int j = t - 16 * w - 109 + 1;    // output bit visible now
        if (j >= 0 && j < 16) for (int s = 0; s < 4; s++) got[w][s][j] = y[s];
      end
    end
    for (int i = 0; i < NB; i++) begin
      checks++;
      if (got[i] !== round_ref(blk[i], z)) begin
        failures++;
        $display("FAIL block %0d: %h exp %h", i, got[i], round_ref(blk[i], z));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
