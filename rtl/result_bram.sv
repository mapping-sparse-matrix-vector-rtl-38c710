// result_bram: the result memory that holds the running y values of the
// stripe being computed.
//
// Every row result of a sub-matrix is added to the value already stored for
// that row, so y for a stripe builds up over all of the stripe's
// sub-matrices; the memory is read out and cleared when the stripe is done.
// One write port and one read port; the read has one cycle of latency and
// returns the old contents when the same entry is written in the same cycle
// (read-first), which lets the read-and-clear sweep use both ports at once.
// DEPTH 1000 is the result memory size of the source.
module result_bram
  import spmv_pkg::*;
#(
  parameter int unsigned DEPTH = RES_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  dbl_t          wdata,
  input  logic [AW-1:0] raddr,
  output dbl_t          rdata
);
  dbl_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
