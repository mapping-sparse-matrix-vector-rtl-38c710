// spmv_top: the sparse matrix-vector multiply core (y = A*x, double
// precision) with the per-PE stream formatters of the matrix manager.
//
// The matrix is processed one stripe of rows at a time. A stripe is split
// into sub-matrices along the columns; for each sub-matrix A_ij the matching
// piece x_j of the vector is loaded into the x buffers of all PEs (into the
// bank not in use, while the previous sub-matrix is still being computed),
// and the nonzeros of its rows are sent, whole rows at a time, to the PEs.
// Each PE multiplies val by x[col] and reduces a row to ADD_LAT partial sums;
// the result controller adds those, together with the row's value so far,
// into the result memory through the shared summation circuit. The stripe's
// y values therefore accumulate on chip over all its sub-matrices, and are
// read out (and cleared) once, when the stripe is done.
//
// Interface, all synchronous to clk, rst active high:
//  - per PE i, a CRS nonzero stream e_*[i] with valid/ready handshake. Each
//    nonzero carries val, its column within the sub-matrix (col < X_DEPTH),
//    the x bank holding that sub-matrix's x_j, and on the last nonzero of a
//    row e_last and the row's index within the stripe (< RES_DEPTH). Rows
//    with no nonzeros are not sent. A row must go entirely to one PE; rows of
//    one sub-matrix may go to any PE, and the same row of later sub-matrices
//    may go to other PEs.
//  - x_wr_*: writes one x entry into the given bank of every PE's buffer.
//    A bank may be rewritten once every nonzero that reads it has been
//    accepted by its PE and two more clocks have passed.
//  - rd_start/rd_count: after the last row of the stripe has been handed
//    over, read rows 0..rd_count-1; the core drains, then streams y_row /
//    y_data with y_valid, one per clock, clearing each entry. ready is high
//    when the core accepts rd_start; it is low during the clear that follows
//    reset (RES_DEPTH clocks) and during a readout.
// Throughput: each PE takes one nonzero per clock plus one clock per row;
// the summation circuit takes one finished row every 8 clocks. PEs stall
// (their feeders insert zeros) when their result FIFO fills.
module spmv_top
  import spmv_pkg::*;
#(
  parameter int unsigned NPE    = N_PE,
  parameter int unsigned XDEPTH = X_DEPTH,
  parameter int unsigned DEPTH  = RES_DEPTH,
  localparam int unsigned RW    = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst,
  // matrix nonzeros, one stream per PE
  input  logic [NPE-1:0]        e_valid,
  output logic [NPE-1:0]        e_ready,
  input  dbl_t                  e_val  [NPE],
  input  logic [COL_W-1:0]      e_col  [NPE],
  input  logic [NPE-1:0]        e_bank,
  input  logic [NPE-1:0]        e_last,
  input  logic [RW-1:0]         e_row  [NPE],
  // x sub-vector load
  input  logic                  x_wr_en,
  input  logic                  x_wr_bank,
  input  logic [COL_W-1:0]      x_wr_addr,
  input  dbl_t                  x_wr_data,
  // stripe readout
  input  logic                  rd_start,
  input  logic [RW:0]           rd_count,
  output logic                  y_valid,
  output logic [RW-1:0]         y_row,
  output dbl_t                  y_data,
  output logic                  ready
);
  logic [NPE-1:0]       stall, head_valid, pop, pe_idle, fmt_busy;
  pe_in_t               pe_in     [NPE];
  dbl_t [ADD_LAT-1:0]   head_sums [NPE];
  logic [RW-1:0]        head_row  [NPE];

  for (genvar i = 0; i < NPE; i++) begin : g_pe
    row_streamer #(.ROW_W(RW)) u_fmt (
      .clk(clk), .rst(rst),
      .e_valid(e_valid[i]), .e_ready(e_ready[i]), .e_val(e_val[i]), .e_col(e_col[i]),
      .e_bank(e_bank[i]), .e_last(e_last[i]), .e_row(e_row[i]),
      .stall(stall[i]), .out(pe_in[i]), .busy(fmt_busy[i])
    );

    pe #(.XDEPTH(XDEPTH), .ROW_W(RW)) u_pe (
      .clk(clk), .rst(rst), .in(pe_in[i]), .stall(stall[i]),
      .x_wr_en(x_wr_en), .x_wr_bank(x_wr_bank), .x_wr_addr(x_wr_addr), .x_wr_data(x_wr_data),
      .head_valid(head_valid[i]), .head_sums(head_sums[i]), .head_row(head_row[i]),
      .pop(pop[i]), .idle(pe_idle[i])
    );
  end

  result_controller #(.NPE(NPE), .L(ADD_LAT), .DEPTH(DEPTH)) u_rc (
    .clk(clk), .rst(rst),
    .head_valid(head_valid), .head_sums(head_sums), .head_row(head_row), .pop(pop),
    .pes_idle(&pe_idle && !(|fmt_busy)),
    .rd_start(rd_start), .rd_count(rd_count),
    .y_valid(y_valid), .y_row(y_row), .y_data(y_data), .ready(ready)
  );
endmodule
