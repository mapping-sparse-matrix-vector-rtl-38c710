// pe: one processing element of the SpMxV core.
//
// The PE receives a stream of nonzeros of whole matrix rows (val, col, one
// per cycle while valid is high) and produces, for every row, its ADD_LAT
// partial sums and its row ID. Datapath: col addresses the PE's copy of the
// x sub-vector (x_bram, one cycle read latency), val is delayed one cycle in
// a buffer to meet x[col], the multiplier forms val*x[col], and the
// accumulation circuit reduces the products of a row to L partial sums,
// which are written into FIFO1. The cycle after the last nonzero of a row
// carries the row's ID on col with valid low; the PE detects this falling
// edge of valid and pushes the ID into FIFO2. The result controller takes a
// row from the PE when both FIFOs are non-empty, popping both together.
//
// Control is derived from valid alone by delaying it along the datapath: one
// cycle for the x read, MUL_LAT cycles for the multiplier, L cycles inside
// the accumulator. The stall output rises when FIFO1 has fewer than
// STALL_FREE free entries; the feeder then inserts zeros (valid unchanged
// inside a row) until it falls. STALL_FREE covers every row that can still be
// in the pipeline (one row per two cycles over 1 + MUL_LAT + L cycles) plus
// the two cycles it takes the feeder to react.
//
// From the source: the x memory addressed by col, the val buffer, the
// multiplier and accumulator, the two FIFOs, the row-ID cycle, zero
// insertion on stall and the stall rule. This design's own choices: FIFO
// depth 32, the exact stall threshold, and x held in two banks.
module pe
  import spmv_pkg::*;
#(
  parameter int unsigned L          = ADD_LAT,
  parameter int unsigned MLAT       = MUL_LAT,
  parameter int unsigned XDEPTH     = X_DEPTH,
  parameter int unsigned ROW_W      = $clog2(RES_DEPTH),
  parameter int unsigned FIFO_DEPTH = 32,
  parameter int unsigned STALL_FREE = (1 + MLAT + L + 3) / 2 + 2
) (
  input  logic               clk,
  input  logic               rst,
  // row stream from the matrix manager
  input  pe_in_t             in,
  output logic               stall,
  // x sub-vector load, shared by all PEs
  input  logic               x_wr_en,
  input  logic               x_wr_bank,
  input  logic [COL_W-1:0]   x_wr_addr,
  input  dbl_t               x_wr_data,
  // finished rows, towards the result controller
  output logic               head_valid,
  output dbl_t [L-1:0]       head_sums,
  output logic [ROW_W-1:0]   head_row,
  input  logic               pop,
  output logic               idle
);
  localparam int unsigned FAW = $clog2(FIFO_DEPTH);

  // stage 0: stream input, row-ID detection, x read
  logic valid_q, id_cycle;
  dbl_t val_q, x_rd, prod;
  logic v1;
  assign id_cycle = !in.valid && valid_q;

  x_bram #(.DEPTH(XDEPTH)) xmem (
    .clk(clk), .wr_en(x_wr_en), .wr_bank(x_wr_bank), .wr_addr(x_wr_addr), .wr_data(x_wr_data),
    .rd_bank(in.bank), .rd_addr(in.col), .rd_data(x_rd)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_q <= 1'b0;
      v1      <= 1'b0;
    end else begin
      valid_q <= in.valid;
      v1      <= in.valid;
    end
    val_q <= in.valid ? in.val : '0;   // the buffer that lines val up with x[col]
  end

  // stage 1: multiplier; valid and row-end flags travel alongside
  fp64_mul #(.LAT(MLAT)) mul (.clk(clk), .a(val_q), .b(v1 ? x_rd : '0), .y(prod));

  logic [MLAT:0] vpipe, epipe;  // index k = flag k+1 cycles after the stream input
  always_ff @(posedge clk) begin
    if (rst) begin
      vpipe <= '0;
      epipe <= '0;
    end else begin
      vpipe <= {vpipe[MLAT-1:0], in.valid};
      epipe <= {epipe[MLAT-1:0], id_cycle};
    end
  end

  // accumulation circuit
  logic acc_we;
  dbl_t acc_sums [L];
  acc_circuit #(.L(L)) acc (
    .clk(clk), .rst(rst), .in_valid(vpipe[MLAT]), .in_end(epipe[MLAT]), .a(prod),
    .out_we(acc_we), .out_sums(acc_sums)
  );

  dbl_t [L-1:0] acc_packed;
  always_comb for (int k = 0; k < L; k++) acc_packed[k] = acc_sums[k];

  // FIFO1: partial sums; FIFO2: row IDs
  logic f1_empty, f1_full, f2_empty, f2_full;
  logic [FAW:0] f1_count;
  logic [L*DATA_W-1:0] f1_out;

  sync_fifo #(.WIDTH(L * DATA_W), .DEPTH(FIFO_DEPTH)) fifo1 (
    .clk(clk), .rst(rst), .wr_en(acc_we), .wr_data(acc_packed), .rd_en(pop),
    .rd_data(f1_out), .empty(f1_empty), .full(f1_full), .count(f1_count)
  );
  sync_fifo #(.WIDTH(ROW_W), .DEPTH(FIFO_DEPTH)) fifo2 (
    .clk(clk), .rst(rst), .wr_en(id_cycle), .wr_data(in.col[ROW_W-1:0]), .rd_en(pop),
    .rd_data(head_row), .empty(f2_empty), .full(f2_full), .count()
  );

  assign head_sums  = f1_out;
  assign head_valid = !f1_empty && !f2_empty;
  assign idle       = f2_empty;

  always_ff @(posedge clk) begin
    if (rst) stall <= 1'b0;
    else     stall <= f1_count >= (FAW+1)'(FIFO_DEPTH - STALL_FREE);
  end

  pop_only_when_ready: assert property (@(posedge clk) disable iff (rst) pop |-> head_valid);
  fifo1_never_full:    assert property (@(posedge clk) disable iff (rst) !(acc_we && f1_full));
  fifo2_never_full:    assert property (@(posedge clk) disable iff (rst) !(id_cycle && f2_full));
  row_id_in_range:     assert property (@(posedge clk) disable iff (rst)
                                        id_cycle |-> in.col < COL_W'(RES_DEPTH));
  initial assert (FIFO_DEPTH > STALL_FREE) else $error("pe: FIFO_DEPTH must exceed STALL_FREE");
endmodule
