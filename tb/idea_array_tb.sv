// idea_array_tb: the maximally scaled array (16 cores, default) fed with a new
// random block in every cycle. Checks that a block is accepted in every cycle,
// that every result appears exactly 923 cycles after its block was taken and
// equals the reference encryption, and that all 16 cores took part (the
// accepting core is the phase of the cycle modulo 16).
module idea_array_tb;
  import idea_ref_pkg::*;
  import idea_pkg::CORE_LAT;

  logic clk = 0, rst = 1, key_load = 0, key_si = 0, key_so, pt_ack, ct_new;
  block_t pt = '0, ct;
  int checks = 0, failures = 0;
  int unsigned cyc = 0, cyc0 = 0;
  int per_core [16];
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  idea_array dut (.clk, .rst, .key_load, .key_si, .key_so,
                  .pt(idea_pkg::block_t'(pt)), .pt_ack, .ct, .ct_new);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned exp_cyc [$];
  block_t      exp_val [$];
  logic        offering = 0;
  subkeys_t    z;
  int          taken = 0;

  always @(posedge clk) begin
    if (!rst && offering) begin
      checks++;
      if (!pt_ack) failures++;
      else begin
        exp_cyc.push_back(cyc + CORE_LAT);
        exp_val.push_back(encrypt(pt, z));
        per_core[(cyc - cyc0) % 16]++;
        taken++;
      end
    end
    if (!rst && ct_new && exp_cyc.size() != 0 && cyc == exp_cyc[0]) begin
      checks++;
      if (ct !== exp_val[0]) begin
        failures++;
        $display("FAIL at %0d: got %h exp %h", cyc, ct, exp_val[0]);
      end
      void'(exp_cyc.pop_front());
      void'(exp_val.pop_front());
    end else if (exp_cyc.size() != 0 && cyc > exp_cyc[0]) begin
      failures++;
      $display("FAIL: no result in cycle %0d", exp_cyc[0]);
      void'(exp_cyc.pop_front());
      void'(exp_val.pop_front());
    end
  end

  initial begin
    z = enc_keys({$urandom, $urandom, $urandom, $urandom});
    @(negedge clk);
    rst = 0;
    cyc0 = cyc;             // first cycle after reset is phase 0
    key_load = 1;
    for (int n = 0; n < 832; n++) begin
      key_si = chain_bit(z, n);
      @(negedge clk);
    end
    key_load = 0;
    pt = {word_t'($urandom), word_t'($urandom), word_t'($urandom), word_t'($urandom)};
    offering = 1;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      pt = {word_t'($urandom), word_t'($urandom), word_t'($urandom), word_t'($urandom)};
    end
    offering = 0;
    do @(negedge clk); while (exp_cyc.size() != 0);
    for (int c = 0; c < 16; c++) begin
      checks++;
      if (per_core[c] == 0) begin failures++; $display("FAIL core %0d unused", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
