// bs_add_tb: back-to-back 16-bit words, LSB first, into the bit-serial adder
// with the carry-clear strobe one cycle before each LSB. Each sum word must
// appear one cycle after its operands and equal (a + b) mod 2^16, including
// words whose sum overflows 16 bits (the carry must not leak into the next
// word).
module bs_add_tb;
  logic clk = 0, ctl = 0, a = 0, b = 0, s;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  bs_add dut (.*);
  localparam int NW = 60;
  logic [15:0] wa [NW], wb [NW], got;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < NW; i++) begin
      wa[i] = 16'($urandom); wb[i] = 16'($urandom);
    end
    wa[0] = 16'hFFFF; wb[0] = 16'h0001;   // overflow, then 0 + 0
    wa[1] = 16'h0000; wb[1] = 16'h0000;
    @(negedge clk); ctl = 1;
    @(negedge clk); ctl = 0;
    for (int i = 0; i < NW; i++)
      for (int k = 0; k < 16; k++) begin
        a = wa[i][k]; b = wb[i][k]; ctl = (k == 15);
        @(negedge clk);
        got[k] = s;                 // registered result of this bit
        if (k == 15) begin
          checks++;
          if (got !== 16'(wa[i] + wb[i])) begin
            failures++;
            $display("FAIL %h + %h -> %h", wa[i], wb[i], got);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
