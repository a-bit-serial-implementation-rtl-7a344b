// onehot_ring_tb: after reset the vector must be one-hot with its 1 at
// position (cycles since reset) mod 16, for many cycles.
module onehot_ring_tb;
  logic clk = 0, rst = 1;
  idea_pkg::onehot_t oh;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  onehot_ring dut (.*);
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 200; t++) begin
      checks++;
      if (oh !== 16'(1) << (t % 16)) begin failures++; $display("FAIL t=%0d oh=%h", t, oh); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
