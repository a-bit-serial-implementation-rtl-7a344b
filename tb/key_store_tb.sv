// key_store_tb: two chained subkey registers. Shifts 32 bits in (second
// word first), then checks that each register presents its word LSB first
// starting in the cycle after its first strobe and repeats it every 16 cycles,
// with the two registers at different phases; checks that the chain output
// passes the bits on during loading and that reset stops rotation.
module key_store_tb;
  logic clk = 0, rst = 1, load = 0, si = 0, so0, so1, ctl0 = 0, ctl1 = 0, k0, k1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  key_store dut  (.clk, .rst, .load, .si, .so(so0), .ctl(ctl0), .kbit(k0));
  key_store dut1 (.clk, .rst, .load, .si(so0), .so(so1), .ctl(ctl1), .kbit(k1));
  logic [15:0] w0, w1, g0, g1;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      w0 = 16'($urandom); w1 = 16'($urandom);
      @(negedge clk); rst = 0;
      load = 1;
      for (int n = 0; n < 32; n++) begin
        si = (n < 16) ? w1[n] : w0[n-16];
        @(negedge clk);
        if (n >= 15) begin             // register 0 passes the stream on, 16 bits late
          checks++;
          if (so0 !== ((n - 15 < 16) ? w1[n-15] : w0[n-31])) failures++;
        end
      end
      load = 0;
      repeat (rep) @(negedge clk);
      // strobe register 0 now, register 1 five cycles later
      for (int c = 0; c < 64 + 6; c++) begin
        ctl0 = (c % 16 == 0);
        ctl1 = (c % 16 == 5);
        @(negedge clk);
        // bit (c) of a word that started after the strobe at cycle 0
        g0[c % 16] = k0;
        if (c >= 5) g1[(c - 5) % 16] = k1;
        if (c % 16 == 15 && c < 64) begin
          checks++;
          if (g0 !== w0) begin failures++; $display("FAIL reg0 %h exp %h", g0, w0); end
        end
        if ((c - 5) % 16 == 15 && c >= 20) begin
          checks++;
          if (g1 !== w1) begin failures++; $display("FAIL reg1 %h exp %h", g1, w1); end
        end
      end
      ctl0 = 0; ctl1 = 0;
      rst = 1;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
