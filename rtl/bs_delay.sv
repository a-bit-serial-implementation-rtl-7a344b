// bs_delay: stage latch for time-aligning bit-serial streams.
// An N-stage shift register: the output equals the input N cycles earlier.
// In the original FPGA design these are SRL16E shift-register LUTs; here it is
// a plain register chain, N >= 1. No reset: the contents flush after N cycles.
module bs_delay #(
  parameter int unsigned N = 16   // delay in cycles
) (
  input  logic clk,
  input  logic d,
  output logic q
);
  logic [N-1:0] sr;
  if (N == 1) begin : g_one
    always_ff @(posedge clk) sr <= d;
  end else begin : g_many
    always_ff @(posedge clk) sr <= {sr[N-2:0], d};
  end
  assign q = sr[N-1];
endmodule
