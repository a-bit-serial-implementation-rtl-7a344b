// ct_buffer_tb: an 8-block buffer. Writes random result blocks (with gaps),
// reads every word back through the registered read port and checks the
// layout ({Y1,Y2} at word 2k, {Y3,Y4} at 2k+1), the block count, that the
// ninth block is dropped and 'full' is set, and that 'clear' restarts at 0.
module ct_buffer_tb;
  import idea_ref_pkg::*;
  localparam int D = 8;
  logic clk = 0, rst = 1, clear = 0, we = 0, full;
  block_t ct = '0;
  logic [3:0] rd_addr = 0, count;
  logic [31:0] rd_data;
  block_t mem [D];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  ct_buffer #(.DEPTH(D)) dut (.clk, .rst, .clear, .we, .ct(ct), .rd_addr, .rd_data, .count, .full);
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check_all(int n);
    for (int a = 0; a < 2 * n; a++) begin
      rd_addr = 4'(a);
      @(negedge clk);
      checks++;
      if (rd_data !== ((a % 2 == 0) ? {mem[a/2][0], mem[a/2][1]} : {mem[a/2][2], mem[a/2][3]})) begin
        failures++; $display("FAIL word %0d: %h", a, rd_data);
      end
    end
  endtask
  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < D + 1; i++) begin
        block_t b = {word_t'($urandom), word_t'($urandom), word_t'($urandom), word_t'($urandom)};
        if (i < D) mem[i] = b;
        ct = b; we = 1;
        @(negedge clk);
        we = 0;
        if (i % 3 == 0) @(negedge clk);
        checks++;
        if (count !== 4'((i < D) ? i + 1 : D)) failures++;
      end
      checks++;
      if (!full) failures++;
      check_all(D);
      clear = 1; @(negedge clk); clear = 0;
      checks++;
      if (count !== 0 || full) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
