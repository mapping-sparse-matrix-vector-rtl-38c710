// acc_circuit: accumulates the products of one matrix row with a deeply
// pipelined floating point adder.
//
// A pipelined adder with latency L cannot add each product to the previous
// sum: that sum is still in the pipeline. Instead the adder output is fed
// back to input b, so the products of a row at positions p, p+L, p+2L, ...
// are summed in one of L interleaved chains, and the row leaves the circuit
// as L partial sums. Two hazards of the naive feedback loop are removed
// here: the feedback is forced to zero for the first L products of a row (the
// value coming out of the adder then still belongs to the previous row or to
// idle cycles), and of the last L adder outputs only those that belong to the
// row are kept, the others are replaced by zeros (a row shorter than L gives
// fewer than L partial sums).
//
// Timing: in_valid marks products of a row (inserted zeros included); rows
// are separated by at least one cycle with in_valid low, and in_end is high
// in the first such cycle (the row-ID cycle of the input stream). L cycles
// after in_end, out_we is high for one cycle and out_sums holds the L
// partial sums of the row, in_end's row-length count deciding which of them
// are real. A new row may start in the cycle after in_end. Product inputs
// outside a row are ignored.
//
// The feedback structure, the L output registers and the zero filling follow
// the source; the row-position counter that drives the masking is this
// design's own way of producing the control.
module acc_circuit
  import spmv_pkg::*;
#(
  parameter int unsigned L = ADD_LAT,
  localparam int unsigned CW = $clog2(L + 1)
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  logic in_end,
  input  dbl_t a,
  output logic out_we,
  output dbl_t out_sums [L]
);
  logic [CW-1:0] cnt;            // products of the current row so far, saturating at L
  dbl_t          a_in, b_in, sum_y;
  dbl_t          osr [L];        // the last L adder outputs, osr[0] the newest
  logic          end_d [L];
  logic [CW-1:0] n_d [L];

  assign a_in = in_valid ? a : '0;
  assign b_in = (in_valid && cnt == CW'(L)) ? sum_y : '0;

  fp64_add #(.LAT(L)) adder (.clk(clk), .a(a_in), .b(b_in), .y(sum_y));

  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else if (!in_valid) cnt <= '0;
    else if (cnt != CW'(L)) cnt <= cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    osr[0] <= sum_y;
    for (int k = 1; k < L; k++) osr[k] <= osr[k-1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < L; k++) end_d[k] <= 1'b0;
    end else begin
      end_d[0] <= in_end;
      for (int k = 1; k < L; k++) end_d[k] <= end_d[k-1];
    end
    n_d[0] <= cnt;
    for (int k = 1; k < L; k++) n_d[k] <= n_d[k-1];
  end

  assign out_we = end_d[L-1];
  always_comb begin
    for (int k = 0; k < L; k++) out_sums[k] = (CW'(k) < n_d[L-1]) ? osr[k] : '0;
  end

  end_follows_row: assert property (@(posedge clk) disable iff (rst) in_end |-> !in_valid && cnt != 0);
endmodule
