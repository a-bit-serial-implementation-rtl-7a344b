// p2s_tb: loads random words every 16 cycles (and once with a gap) and
// checks that each appears LSB first on the serial output starting in the
// load cycle itself, and that zeros follow when no new word is loaded.
module p2s_tb;
  logic clk = 0, load = 0, so;
  logic [15:0] d = '0, w, got;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  p2s dut (.*);
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 30; i++) begin
      w = 16'($urandom);
      for (int k = 0; k < 16; k++) begin
        load = (k == 0); d = (k == 0) ? w : 16'($urandom);
        #1 got[k] = so;
        @(negedge clk);
      end
      checks++;
      if (got !== w) begin failures++; $display("FAIL %h exp %h", got, w); end
      if (i == 10) begin
        for (int k = 0; k < 16; k++) begin
          load = 0;
          #1 got[k] = so;
          @(negedge clk);
        end
        checks++;
        if (got !== 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
