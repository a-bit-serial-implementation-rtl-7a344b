// idea_wildcard_top_tb: end-to-end test of the accelerator with two cores and
// a 16-block buffer. The host loads encryption subkeys, writes 17 blocks (the
// last one finds the buffer full), provokes one overrun, reads the 16 results
// back, then clears the buffer, loads decryption subkeys and decrypts them.
// Every mechanism must happen at least once: blocks taken by each of the two
// cores (round robin), load slots passing without data, multiplier pipeline
// alternation, the overrun flag, the full buffer, the buffer clear and the
// key reload.
module idea_wildcard_top_tb;
  import idea_ref_pkg::*;
  import idea_host_pkg::*;

  localparam int NB = 16;
  logic        clk = 0, rst = 1, key_load = 0, key_si = 0, key_so;
  logic        wr_en = 0, pt_ready, overrun, buf_clear = 0, buf_full;
  logic [31:0] wr_data = 0, rd_data;
  logic [4:0]  rd_addr = 0, ct_count;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  idea_wildcard_top #(.NCORES(2), .BUF_BLOCKS(NB)) dut (.*);

  // mechanism counters
  int n_core0 = 0, n_core1 = 0, n_idle = 0, n_toggle = 0, n_overrun = 0;
  int n_full = 0, n_clear = 0, n_keyload = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (dut.u_array.ack[0] && dut.u_ctrl.data_valid) n_core0++;
      if (dut.u_array.ack[1] && dut.u_ctrl.data_valid) n_core1++;
      if (dut.u_array.pt_ack && !dut.u_ctrl.data_valid) n_idle++;
      if (dut.u_array.g_core[1].u_core.g_round[3].u_round.u_m5.u_mult.ctl) n_toggle++;
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
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
    n_keyload++;
  endtask

  task automatic write_block(block_t b);
    for (int k = 0; k < 2; k++) begin
      while (!pt_ready) @(negedge clk);
      wr_en = 1; wr_data = word_of(b, k);
      @(negedge clk);
      wr_en = 0;
    end
  endtask

  task automatic read_all(output block_t out [$]);
    logic [31:0] w0;
    out.delete();
    for (int i = 0; i < 2 * NB; i++) begin
      rd_addr = 5'(i);
      @(negedge clk);
      if (i % 2 == 0) w0 = rd_data;
      else out.push_back(block_of(w0, rd_data));
    end
  endtask

  initial begin
    subkeys_t ze, zd;
    block_t plain [$], cipher [$], back [$];
    ze = enc_keys({$urandom, $urandom, $urandom, $urandom});
    zd = dec_keys(ze);
    repeat (4) @(negedge clk);
    rst = 0;
    load_keys(ze);
    for (int i = 0; i < NB + 1; i++) plain.push_back(rand_block());
    foreach (plain[i]) begin
      while (!pt_ready) @(negedge clk);
      repeat (i % 16) @(negedge clk);  // vary the arrival so both cores' slots are hit
      write_block(plain[i]);
      if (i == 3) begin
        // the block waits for its slot: one more write must be refused
        checks++;
        if (pt_ready || overrun) failures++;
        wr_en = 1; wr_data = 32'h0BAD_0BAD; @(negedge clk); wr_en = 0;
        checks++;
        if (!overrun) failures++; else n_overrun++;
      end
      if (i == 6) repeat (50) @(negedge clk);   // idle slots
    end
    while (!(buf_full && dut.u_ctrl.vsr == 0)) @(negedge clk);
    n_full++;
    checks++;
    if (ct_count != 5'(NB)) failures++;
    read_all(cipher);
    foreach (cipher[i]) begin
      checks++;
      if (cipher[i] !== encrypt(plain[i], ze)) begin
        failures++;
        $display("FAIL enc %0d: %h exp %h", i, cipher[i], encrypt(plain[i], ze));
      end
    end
    // decryption run
    buf_clear = 1; @(negedge clk); buf_clear = 0;
    checks++;
    if (ct_count != 0 || buf_full) failures++; else n_clear++;
    load_keys(zd);
    foreach (cipher[i]) write_block(cipher[i]);
    while (!buf_full) @(negedge clk);
    read_all(back);
    foreach (back[i]) begin
      checks++;
      if (back[i] !== plain[i]) begin
        failures++;
        $display("FAIL dec %0d: %h exp %h", i, back[i], plain[i]);
      end
    end
    // every mechanism must have occurred
    checks += 8;
    if (n_core0 == 0)   begin failures++; $display("core 0 never used"); end
    if (n_core1 == 0)   begin failures++; $display("core 1 never used"); end
    if (n_idle == 0)    begin failures++; $display("no idle slot"); end
    if (n_toggle == 0)  begin failures++; $display("no pipeline toggle"); end
    if (n_overrun == 0) begin failures++; $display("no overrun"); end
    if (n_full == 0)    begin failures++; $display("buffer never full"); end
    if (n_clear == 0)   begin failures++; $display("buffer never cleared"); end
    if (n_keyload < 2)  begin failures++; $display("no key reload"); end
    $display("core0=%0d core1=%0d idle=%0d toggles=%0d overrun=%0d full=%0d clear=%0d keyloads=%0d",
             n_core0, n_core1, n_idle, n_toggle, n_overrun, n_full, n_clear, n_keyload);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
