// host_if_ctrl_tb: the plaintext registers and valid pipeline with a short
// latency (LAT = 12). An 'ack' strobe every 16 cycles plays the cores. Checks
// that two word writes assemble the block in the right order, that
// 'pt_ready' falls until the block is taken, that 'ct_we' rises exactly LAT
// cycles after each taken block and never for an ack without data, and that
// a write while a block waits is dropped and sets 'overrun'.
module host_if_ctrl_tb;
  import idea_ref_pkg::*;
  localparam int LAT = 12;
  logic clk = 0, rst = 1, wr_en = 0, pt_ready, overrun, ack = 0, ct_we;
  logic [31:0] wr_data = 0;
  block_t pt;
  int checks = 0, failures = 0, idle_acks = 0, taken = 0, writes_seen = 0;
  int unsigned cyc = 0;
  int unsigned due [$];
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  host_if_ctrl #(.LAT(LAT)) dut (.clk, .rst, .wr_en, .wr_data, .pt_ready, .overrun,
                                 .pt(pt), .ack, .ct_we);

  block_t cur;
  always @(posedge clk) begin
    if (!rst) begin
      ack <= ((cyc + 1) % 16 == 0);
      if (ack && !pt_ready) begin
        taken++;
        due.push_back(cyc + LAT);
        checks++;
        if (pt !== cur) begin failures++; $display("FAIL block %h exp %h", pt, cur); end
      end else if (ack) idle_acks++;
      if (ct_we) begin
        writes_seen++;
        checks++;
        if (due.size() == 0 || due[0] != cyc) begin
          failures++; $display("FAIL ct_we at %0d", cyc);
        end else void'(due.pop_front());
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_word(logic [31:0] w);
    wr_en = 1; wr_data = w; @(negedge clk); wr_en = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 20; i++) begin
      while (!pt_ready) @(negedge clk);
      cur = {word_t'($urandom), word_t'($urandom), word_t'($urandom), word_t'($urandom)};
      write_word({cur[0], cur[1]});
      checks++;
      if (!pt_ready) failures++;          // one word is not yet a block
      write_word({cur[2], cur[3]});
      checks++;
      if (pt_ready) failures++;           // block now waits
      if (i == 5) begin                   // write while a block waits
        checks++;
        if (overrun) failures++;
        write_word(32'hDEAD_BEEF);
        checks++;
        if (!overrun) failures++;
      end
      if (i % 4 == 3) repeat (40) @(negedge clk);   // leave some acks idle
    end
    repeat (LAT + 40) @(negedge clk);
    checks += 3;
    if (taken != 20 || writes_seen != 20) begin failures++; $display("taken %0d writes %0d", taken, writes_seen); end
    if (idle_acks == 0) failures++;
    if (due.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
