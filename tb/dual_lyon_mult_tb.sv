// dual_lyon_mult_tb: loads b, streams back-to-back 16-bit words with a strobe
// one cycle before each LSB, and assembles 32-bit products: a word whose LSB
// enters in cycle c must appear on the pipeline chosen by the toggle (P when
// the toggle is 1, Q when 0) in cycles c+1..c+32, equal to a*b. Also checks
// that the pipelines alternate.
module dual_lyon_mult_tb;
  logic clk = 0, rst = 1, ctl = 0, a = 0, b_load = 0, b_si = 0, tog, p, q;
  int checks = 0, failures = 0, to_p = 0, to_q = 0;
  always #5 clk = ~clk;
  dual_lyon_mult dut (.*);
  localparam int NW = 40;
  logic [15:0] bw, wa [NW];
  logic [31:0] gp [NW];
  logic        sel [NW];
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    bw = 16'($urandom) | 16'h8001;
    for (int i = 0; i < NW; i++) wa[i] = 16'($urandom);
    wa[0] = 16'hFFFF;
    @(negedge clk); rst = 0;
    b_load = 1;
    for (int k = 0; k < 16; k++) begin b_si = bw[k]; @(negedge clk); end
    b_load = 0;
    ctl = 1; @(negedge clk); ctl = 0;
    // cycle index t counts from the first LSB cycle
    for (int t = 0; t < 16 * NW + 40; t++) begin
      automatic int i = t / 16, k = t % 16;
      a   = (i < NW) ? wa[i][k] : 1'b0;
      ctl = (k == 15);
      if (k == 0 && i < NW) sel[i] = tog;
      @(negedge clk);
      // product bit j of word i is visible after the edge ending cycle 16*i + j
      for (int w = 0; w < NW; w++) begin
        automatic int j = t - 16 * w;
        if (j >= 0 && j < 32) gp[w][j] = sel[w] ? p : q;
      end
    end
    for (int i = 0; i < NW; i++) begin
      checks++;
      if (sel[i]) to_p++; else to_q++;
      if (gp[i] !== 32'(wa[i]) * 32'(bw)) begin
        failures++;
        $display("FAIL %h * %h = %h", wa[i], bw, gp[i]);
      end
      if (i > 0) begin
        checks++;
        if (sel[i] == sel[i-1]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
