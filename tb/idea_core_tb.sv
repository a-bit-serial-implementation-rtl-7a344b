// idea_core_tb: end-to-end test of one bit-serial IDEA core.
// Loads the encryption subkeys of the standard example key (0001..0008)
// through the key chain, encrypts the standard example block (expected
// 11FB ED2B 0198 6DE5) and random blocks offered at every load slot, and
// checks each result against the reference model and that it appears
// exactly 923 cycles after the block was taken. It then loads decryption
// subkeys and checks that the ciphertexts decrypt to the original blocks.
module idea_core_tb;
  import idea_ref_pkg::*;
  import idea_pkg::CORE_LAT;
  import idea_pkg::onehot_t;

  logic clk = 0, rst = 1, key_load = 0, key_si = 0, key_so, pt_ack, ct_new;
  block_t pt = '0, ct;
  onehot_t oh;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  onehot_ring u_oh (.clk, .rst, .oh);
  idea_core dut (.clk, .rst, .oh, .key_load, .key_si, .key_so,
                 .pt(idea_pkg::block_t'(pt)), .pt_ack, .ct, .ct_new);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results: cycle in which ct_new must be seen, and the value
  int unsigned exp_cyc [$];
  block_t      exp_val [$];
  block_t      results [$];
  int          latency_ok = 0;

  // record every block the core takes while the driver offers one
  logic     offering = 0;
  subkeys_t zcur;
  int       taken = 0;
  always @(posedge clk) begin
    if (!rst && pt_ack && offering) begin
      exp_cyc.push_back(cyc + CORE_LAT);
      exp_val.push_back(encrypt(pt, zcur));
      taken++;
    end
  end

  always @(posedge clk) begin
    if (!rst && ct_new && exp_cyc.size() != 0 && cyc == exp_cyc[0]) begin
      checks++;
      latency_ok++;
      if (ct !== exp_val[0]) begin
        failures++;
        $display("FAIL at %0d: got %h exp %h", cyc, ct, exp_val[0]);
      end
      results.push_back(ct);
      void'(exp_cyc.pop_front());
      void'(exp_val.pop_front());
    end else if (exp_cyc.size() != 0 && cyc > exp_cyc[0]) begin
      failures++;
      $display("FAIL: no result in cycle %0d", exp_cyc[0]);
      void'(exp_cyc.pop_front());
      void'(exp_val.pop_front());
    end
  end

  task automatic load_keys(subkeys_t z);
    key_load <= 1;
    for (int n = 0; n < 832; n++) begin
      key_si <= chain_bit(z, n);
      @(posedge clk);
    end
    key_load <= 0;
    key_si   <= 0;
  endtask

  // offer blocks at consecutive load slots
  task automatic run(block_t blocks [$], subkeys_t z);
    zcur = z;
    foreach (blocks[i]) begin
      int t0 = taken;
      @(negedge clk);
      pt       = blocks[i];
      offering = 1;
      do @(negedge clk); while (taken == t0);
    end
    offering = 0;
    do @(negedge clk); while (exp_cyc.size() != 0);
  endtask

  initial begin
    subkeys_t ze, zd;
    block_t plain [$], cipher [$];
    ze = enc_keys(128'h0001_0002_0003_0004_0005_0006_0007_0008);
    zd = dec_keys(ze);
    repeat (5) @(posedge clk);
    rst <= 0;
    load_keys(ze);
    plain.push_back({16'h0003, 16'h0002, 16'h0001, 16'h0000});
    for (int i = 0; i < 12; i++)
      plain.push_back({word_t'($urandom), word_t'($urandom), word_t'($urandom), word_t'($urandom)});
    run(plain, ze);
    // the standard example block
    checks++;
    if (results[0] !== {16'h6DE5, 16'h0198, 16'hED2B, 16'h11FB}) begin
      failures++;
      $display("FAIL example vector: %h", results[0]);
    end
    cipher = results;
    results.delete();
    load_keys(zd);
    run(cipher, zd);
    foreach (plain[i]) begin
      checks++;
      if (results[i] !== plain[i]) begin
        failures++;
        $display("FAIL decrypt %0d: %h vs %h", i, results[i], plain[i]);
      end
    end
    checks++;
    if (latency_ok != 2 * plain.size()) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
