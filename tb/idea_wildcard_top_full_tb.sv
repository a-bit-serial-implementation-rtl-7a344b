// idea_wildcard_top_full_tb: one complete operation of the accelerator at its
// default size (one core, 1024-block buffer). The host loads encryption
// subkeys, writes 1024 plaintext blocks as 32-bit word pairs as fast as the
// interface accepts them, waits until the buffer holds all 1024 results (it is
// then full), reads all 2048 words back and compares with the reference; then
// it loads decryption subkeys, clears the buffer, sends the ciphertexts and
// checks that the plaintexts come back. It also checks the sustained rate of
// one block per 16 cycles and the latency of the first block.
module idea_wildcard_top_full_tb;
  import idea_ref_pkg::*;
  import idea_host_pkg::*;

  localparam int NB = 1024;
  logic        clk = 0, rst = 1, key_load = 0, key_si = 0, key_so;
  logic        wr_en = 0, pt_ready, overrun, buf_clear = 0, buf_full;
  logic [31:0] wr_data = 0, rd_data;
  logic [10:0] rd_addr = 0, ct_count;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  idea_wildcard_top dut (.*);

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_keys(subkeys_t z);
    @(negedge clk);
    key_load = 1;
    for (int n = 0; n < 832; n++) begin
      key_si = chain_bit(z, n);
      @(negedge clk);
    end
    key_load = 0;
  endtask

  task automatic write_block(block_t b);
    for (int k = 0; k < 2; k++) begin
      while (!pt_ready) @(negedge clk);
      wr_en = 1; wr_data = word_of(b, k);
      @(negedge clk);
      wr_en = 0;
    end
  endtask

  task automatic burst(block_t in [$], subkeys_t z, output block_t out [$],
                       output int unsigned first_cyc, output int unsigned last_cyc);
    int unsigned t_start;
    logic [31:0] w0;
    buf_clear = 1; @(negedge clk); buf_clear = 0;
    t_start = cyc;
    first_cyc = 0;
    fork
      foreach (in[i]) write_block(in[i]);
      begin
        while (ct_count == 0) @(negedge clk);
        first_cyc = cyc - t_start;
      end
    join
    while (ct_count != 11'(in.size())) @(negedge clk);
    last_cyc = cyc - t_start;
    out.delete();
    for (int i = 0; i < 2 * in.size(); i++) begin
      rd_addr = 11'(i);
      @(negedge clk);
      if (i[0] == 0) w0 = rd_data;
      else begin
        out.push_back(block_of(w0, rd_data));
      end
    end
    foreach (in[i]) begin
      checks++;
      if (out[i] !== encrypt(in[i], z)) begin
        failures++;
        if (failures < 10) $display("FAIL block %0d: %h exp %h", i, out[i], encrypt(in[i], z));
      end
    end
  endtask

  initial begin
    subkeys_t ze, zd;
    block_t plain [$], cipher [$], back [$];
    int unsigned t1, t2;
    ze = enc_keys({$urandom, $urandom, $urandom, $urandom});
    zd = dec_keys(ze);
    repeat (4) @(negedge clk);
    rst = 0;
    load_keys(ze);
    for (int i = 0; i < NB; i++) plain.push_back(rand_block());
    burst(plain, ze, cipher, t1, t2);
    // first result about one latency after the burst starts; then one per 16 cycles
    checks++;
    if (t1 < 923 || t1 > 923 + 40) begin failures++; $display("FAIL first result after %0d cycles", t1); end
    checks++;
    if (t2 - t1 != 16 * (NB - 1)) begin failures++; $display("FAIL burst span %0d", t2 - t1); end
    load_keys(zd);
    burst(cipher, zd, back, t1, t2);
    foreach (plain[i]) begin
      checks++;
      if (back[i] !== plain[i]) failures++;
    end
    checks++;
    if (overrun || !buf_full) failures++;
    $display("first result %0d cycles, %0d blocks in %0d cycles", t1, NB, t2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
