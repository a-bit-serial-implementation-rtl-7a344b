// bs_delay_tb: random bits through stage latches of 16 (default), 1 and 73
// stages; each output must equal the input N cycles earlier.
module bs_delay_tb;
  logic clk = 0, d = 0, q16, q1, q73;
  logic hist [$];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  bs_delay            dut  (.clk, .d, .q(q16));
  bs_delay #(.N(1))   dut1 (.clk, .d, .q(q1));
  bs_delay #(.N(73))  dut73(.clk, .d, .q(q73));
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      // hist[j] is the input driven j+1 cycles ago
      if (i >= 80) begin
        checks += 3;
        if (q1  !== hist[0])  failures++;
        if (q16 !== hist[15]) failures++;
        if (q73 !== hist[72]) failures++;
      end
      d = 1'($urandom);
      hist.push_front(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
