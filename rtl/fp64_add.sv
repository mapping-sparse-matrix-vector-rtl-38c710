// fp64_add: fully pipelined IEEE-754 double-precision adder.
//
// A new operand pair is accepted every clock; the rounded sum of the pair
// presented in cycle t appears on y in cycle t+LAT. The adder has no enable
// and no valid signal: as in the accumulation and summation circuits that use
// it, the surrounding logic knows from the data flow when an output is
// meaningful, and idle cycles simply carry zeros through.
//
// The arithmetic (round to nearest even, subnormals flushed to zero) is
// spmv_pkg::fp_add. The operands are registered, added in one block of logic
// and then delayed through LAT-1 output registers, which a synthesis tool can
// retime into the adder to reach the latency of a deep vendor core. The
// latency default of 12 is the adder latency of the double-precision design;
// the internal split of that latency is this design's own.
module fp64_add
  import spmv_pkg::*;
#(
  parameter int unsigned LAT = ADD_LAT
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
    pipe[0] <= fp_add(a_q, b_q);
    for (int i = 1; i < LAT - 1; i++) pipe[i] <= pipe[i-1];
  end

  assign y = pipe[LAT-2];

  initial assert (LAT >= 2) else $error("fp64_add: LAT must be at least 2");
endmodule
