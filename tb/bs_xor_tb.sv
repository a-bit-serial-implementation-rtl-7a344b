// bs_xor_tb: random bit streams into the bit-serial XOR; each output bit must
// equal the XOR of the inputs of the previous cycle (latency 1).
module bs_xor_tb;
  logic clk = 0, a = 0, b = 0, y;
  logic pa, pb;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  bs_xor dut (.*);
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    @(negedge clk);
    a = 1'($urandom); b = 1'($urandom);
    for (int i = 0; i < 500; i++) begin
      pa = a; pb = b;
      @(negedge clk);
      checks++;
      if (y !== (pa ^ pb)) failures++;
      a = 1'($urandom); b = 1'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
