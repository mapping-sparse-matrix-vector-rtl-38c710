// x_bram: the multiplicand sub-vector buffer of one processing element.
//
// The PE reads x[col] for every nonzero it receives; the read has one cycle
// of latency, like an FPGA block RAM, which is why the PE delays val by one
// cycle before the multiplier. The buffer has two halves (banks) of DEPTH
// entries: while the PE reads the sub-vector x_j of the current sub-matrix
// from one bank, the next sub-vector is written into the other, so loading x
// overlaps computation. The bank to read travels with each nonzero; the
// write port is shared by all PEs, which load the same x.
//
// Ports: wr_* write one entry of a bank; rd_bank/rd_addr select the entry
// whose value appears on rd_data in the next cycle. Addresses at or above
// DEPTH are not stored and read as zero. DEPTH 1000 is the x memory size of
// the source; the two-bank arrangement is this design's reading of how x_j
// loading overlaps computation.
module x_bram
  import spmv_pkg::*;
#(
  parameter int unsigned DEPTH = X_DEPTH,
  parameter int unsigned AW    = COL_W
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic          wr_bank,
  input  logic [AW-1:0] wr_addr,
  input  dbl_t          wr_data,
  input  logic          rd_bank,
  input  logic [AW-1:0] rd_addr,
  output dbl_t          rd_data
);
  dbl_t mem [2*DEPTH];

  function automatic int unsigned idx(input logic bank, input logic [AW-1:0] addr);
    return (bank ? DEPTH : 0) + int'(addr);
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en && wr_addr < AW'(DEPTH)) mem[idx(wr_bank, wr_addr)] <= wr_data;
  end

  always_ff @(posedge clk) begin
    rd_data <= (rd_addr < AW'(DEPTH)) ? mem[idx(rd_bank, rd_addr)] : '0;
  end
endmodule
