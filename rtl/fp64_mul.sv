// fp64_mul: fully pipelined IEEE-754 double-precision multiplier.
//
// A new operand pair is accepted every clock; the rounded product of the pair
// presented in cycle t appears on y in cycle t+LAT. There is no enable and no
// valid signal: the processing element delays its own valid flag by the same
// LAT cycles to know when a product belongs to a row.
//
// The arithmetic (round to nearest even, subnormals flushed to zero) is
// spmv_pkg::fp_mul. The operands are registered, multiplied in one block of
// logic and delayed through LAT-1 output registers, which a synthesis tool can
// retime into the multiplier. The latency (default 9) is this design's own
// choice; the source gives no multiplier latency for the double-precision
// design.
module fp64_mul
  import spmv_pkg::*;
#(
  parameter int unsigned LAT = MUL_LAT
) (
  input  logic clk,
  input  dbl_t a,
  input  dbl_t b,
  output dbl_t y
);
  dbl_t a_q, b_q;
  dbl_t pipe [LAT-1];

  always_ff @(posedge clk) begin
    a_q <= a;
    b_q <= b;
    pipe[0] <= fp_mul(a_q, b_q);
    for (int i = 1; i < LAT - 1; i++) pipe[i] <= pipe[i-1];
  end

  assign y = pipe[LAT-2];

  initial assert (LAT >= 2) else $error("fp64_mul: LAT must be at least 2");
endmodule
