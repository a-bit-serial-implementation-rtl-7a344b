// mulmod_tb: self-checking test of the bit-serial modulo 2^16+1 multiplier.
// Loads a subkey (decremented) through the key chain, streams back-to-back
// operand words with a control strobe every 16 cycles and checks that each
// result word appears exactly 35 cycles after its operand, equal to the
// reference product. Covers the 0 (=2^16) cases and several subkeys,
// reloading the subkey between runs.
module mulmod_tb;
  import idea_ref_pkg::*;
  logic clk = 0, rst = 1, ctl = 0, a = 0, key_load = 0, key_si = 0, key_so, m;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always #5 clk = ~clk;

  mulmod dut (.*);

  localparam int NW = 40;
  word_t ops [NW];
  word_t key;
  word_t got;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(word_t k);
    word_t kd = k - 16'd1;
    key = k;
    // load subkey
    key_load <= 1;
    for (int i = 0; i < 16; i++) begin
      key_si <= kd[i];
      @(posedge clk);
    end
    key_load <= 0;
    key_si <= 0;
    repeat (3) @(posedge clk);
    for (int i = 0; i < NW; i++) begin
      case (i)
        0: ops[i] = 0;
        1: ops[i] = 1;
        2: ops[i] = 16'hFFFF;
        3: ops[i] = 16'h8000;
        default: ops[i] = word_t'($urandom);
      endcase
    end
    fork
      begin : drive
        // strobe one cycle before each LSB
        ctl <= 1; @(posedge clk); ctl <= 0;
        for (int i = 0; i < NW; i++)
          for (int b = 0; b < 16; b++) begin
            a   <= ops[i][b];
            ctl <= (b == 15);
            @(posedge clk);
          end
        a <= 0; ctl <= 0;
      end
      begin : check
        // operand LSB of word 0 is driven after the strobe edge: sample m
        // in cycle 35 after it
        @(posedge clk);           // strobe cycle ends, word 0 LSB cycle starts
        repeat (35) @(posedge clk);
        for (int i = 0; i < NW; i++) begin
          for (int b = 0; b < 16; b++) begin
            #1 got[b] = m;
            @(posedge clk);
          end
          checks++;
          if (got !== mul(ops[i], key)) begin
            failures++;
            if (failures < 10)
              $display("FAIL key=%h op=%h got=%h exp=%h", key, ops[i], got, mul(ops[i], key));
          end
        end
      end
    join
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    run(16'h0003);
    run(16'h0000);
    run(16'hFFFF);
    run(16'h0001);
    for (int k = 0; k < 6; k++) run(word_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
