// s2p_tb: streams random words LSB first with the strobe in each MSB cycle;
// each word must appear on the parallel output 16 cycles after its LSB
// entered and hold there for 16 cycles.
module s2p_tb;
  logic clk = 0, ctl = 0, si = 0;
  logic [15:0] q, w [40];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  s2p dut (.*);
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 40; i++) w[i] = 16'($urandom);
    @(negedge clk);
    for (int t = 0; t < 16 * 41; t++) begin
      automatic int i = t / 16, k = t % 16;
      si = (i < 40) ? w[i][k] : 1'b0;
      ctl = (k == 15);
      @(negedge clk);
      // now in cycle t+1; word n (LSB in cycle 16n) is on q in cycles
      // 16n+16 .. 16n+31
      if ((t + 1) / 16 >= 1 && (t + 1) / 16 <= 40) begin
        checks++;
        if (q !== w[(t + 1) / 16 - 1]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
