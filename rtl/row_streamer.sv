// row_streamer: the matrix manager's per-PE formatter. It turns a stream of
// CRS nonzeros into the signal format a processing element expects.
//
// Input: one nonzero per handshake (e_valid/e_ready) with its value, column
// index, x bank, and on the last nonzero of a row the row's ID (its index
// within the sub-matrix stripe) and e_last. Empty rows are simply not sent.
// Output, one registered cycle later: while a row is being sent, valid is high
// and val/col carry the nonzeros; right after the last nonzero one cycle with
// valid low carries the row ID on col. Zeros are inserted (val = 0, col = 0)
// whenever the PE raises stall or the next nonzero has not yet arrived; inside
// a row valid stays high during inserted zeros, so they become harmless
// zero products of the row, and between rows valid stays low. busy is high
// from the first nonzero of a row until its ID cycle has been presented.
//
// The output format, the ID cycle and the zero insertion follow the source's
// description of the PE input signals; the CRS-nonzero input handshake is
// this design's own, standing in for the host-side matrix storage.
module row_streamer
  import spmv_pkg::*;
#(
  parameter int unsigned ROW_W = $clog2(RES_DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             e_valid,
  output logic             e_ready,
  input  dbl_t             e_val,
  input  logic [COL_W-1:0] e_col,
  input  logic             e_bank,
  input  logic             e_last,
  input  logic [ROW_W-1:0] e_row,
  input  logic             stall,
  output pe_in_t           out,
  output logic             busy
);
  logic             in_row, id_pending, id_out, cur_bank;
  logic [ROW_W-1:0] id_row;

  assign e_ready = !id_pending && !stall;
  assign busy    = in_row || id_pending || id_out;  // until the ID has reached the PE

  always_ff @(posedge clk) begin
    if (rst) begin
      in_row     <= 1'b0;
      id_pending <= 1'b0;
      cur_bank   <= 1'b0;
      id_row     <= '0;
      id_out     <= 1'b0;
      out        <= '0;
    end else if (id_pending) begin
      id_out     <= 1'b1;
      out        <= '{valid: 1'b0, bank: cur_bank, col: COL_W'(id_row), val: '0};
      id_pending <= 1'b0;
      in_row     <= 1'b0;
    end else if (e_valid && e_ready) begin
      id_out   <= 1'b0;
      out      <= '{valid: 1'b1, bank: e_bank, col: e_col, val: e_val};
      cur_bank <= e_bank;
      in_row   <= 1'b1;
      if (e_last) begin
        id_pending <= 1'b1;
        id_row     <= e_row;
      end
    end else begin
      // stall, or waiting for the next nonzero: insert a zero
      id_out <= 1'b0;
      out <= '{valid: in_row, bank: cur_bank, col: '0, val: '0};
    end
  end
endmodule
