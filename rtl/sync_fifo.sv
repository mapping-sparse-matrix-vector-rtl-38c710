// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Used for both FIFOs of a processing element: FIFO1 holds the ADD_LAT
// partial sums of each finished row, FIFO2 holds the row IDs in the order the
// rows entered. The oldest entry is always visible on rd_data while empty is
// low; rd_en pops it at the clock edge. A write and a read may happen in the
// same cycle. count gives the fill level, from which the PE derives its stall
// signal. Writing a full or reading an empty FIFO is a protocol error caught
// by assertions; the storage is a plain array (block or distributed RAM).
module sync_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      count
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wptr, rptr;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (wr_en) wptr <= inc(wptr);
      if (rd_en) rptr <= inc(rptr);
      count <= count + (AW+1)'(wr_en) - (AW+1)'(rd_en);
    end
  end

  assign rd_data = mem[rptr];
  assign empty   = (count == 0);
  assign full    = (count == (AW+1)'(DEPTH));

  no_overflow:  assert property (@(posedge clk) disable iff (rst) !(wr_en && full && !rd_en));
  no_underflow: assert property (@(posedge clk) disable iff (rst) !(rd_en && empty));
endmodule
