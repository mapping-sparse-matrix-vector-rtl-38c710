// summation_circuit: the reduced summation circuit shared by all PEs. It adds
// the L partial sums of one row and the row's previous value from the result
// memory, and hands back the total together with the row's address and a
// write enable at exactly the cycle it is ready.
//
// Instead of a tree of L adders, it uses NLEV pipelined adders in series and
// feeds the first one two numbers per clock. On load, the L partial sums and
// the result-memory value fill the first L+1 of 2**NLEV registers, the rest
// are zeros; the registers then shift two places per clock, so a row takes
// PAIRS = 2**(NLEV-1) clocks to enter (one row can be loaded every PAIRS
// clocks). Adder 1 adds each pair; adder k+1 adds an output of adder k to the
// one produced 2**(k-1) clocks earlier, held in a plain delay line. Because of
// this spacing the adders pair up exactly the right values of the same row
// and never mix rows, so the circuit has no control logic at all: the adders
// and delay lines run freely, and only the write-enable/row shifters decide
// which output is used.
//
// With L = 12 and NLEV = 4: 16 registers (12 partial sums, 1 memory value, 3
// zeros), 4 adders, delay lines of 1, 2 and 4 registers (7 in all), and the
// total arrives LAT = NLEV*L + PAIRS-1 = 55 clocks after the first pair enters
// adder 1, i.e. 56 clocks after load. The arrangement, the adder and buffer
// counts, the zero padding and the 55-cycle latency follow the source; the
// position of the memory value among the 16 registers is this design's own
// choice.
module summation_circuit
  import spmv_pkg::*;
#(
  parameter int unsigned L     = ADD_LAT,
  parameter int unsigned NLEV  = 4,
  parameter int unsigned ROW_W = $clog2(RES_DEPTH),
  localparam int unsigned NREG  = 2 ** NLEV,
  localparam int unsigned PAIRS = NREG / 2,
  localparam int unsigned LAT   = NLEV * L + PAIRS - 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  dbl_t [L:0]       din,      // [L-1:0] partial sums, [L] result-memory value
  input  logic [ROW_W-1:0] row_in,
  output dbl_t             dout,
  output logic             wen,
  output logic [ROW_W-1:0] row_out
);
  dbl_t regs [NREG];
  dbl_t add_out [NLEV];

  // input register bank: load, then shift two per clock
  always_ff @(posedge clk) begin
    if (load) begin
      for (int i = 0; i < NREG; i++) regs[i] <= (i <= L) ? din[i] : '0;
    end else begin
      for (int i = 0; i < NREG - 2; i++) regs[i] <= regs[i+2];
      regs[NREG-2] <= '0;
      regs[NREG-1] <= '0;
    end
  end

  fp64_add #(.LAT(L)) add0 (.clk(clk), .a(regs[0]), .b(regs[1]), .y(add_out[0]));

  for (genvar k = 1; k < NLEV; k++) begin : g_level
    localparam int unsigned D = 2 ** (k - 1);
    dbl_t dly [D];
    always_ff @(posedge clk) begin
      dly[0] <= add_out[k-1];
      for (int i = 1; i < D; i++) dly[i] <= dly[i-1];
    end
    fp64_add #(.LAT(L)) add (.clk(clk), .a(dly[D-1]), .b(add_out[k-1]), .y(add_out[k]));
  end

  assign dout = add_out[NLEV-1];

  // write-enable and row-ID shifters: entered at load, out LAT+1 clocks later
  logic             wen_sh [LAT+1];
  logic [ROW_W-1:0] row_sh [LAT+1];
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i <= LAT; i++) wen_sh[i] <= 1'b0;
    end else begin
      wen_sh[0] <= load;
      for (int i = 1; i <= LAT; i++) wen_sh[i] <= wen_sh[i-1];
    end
    row_sh[0] <= row_in;
    for (int i = 1; i <= LAT; i++) row_sh[i] <= row_sh[i-1];
  end
  assign wen     = wen_sh[LAT];
  assign row_out = row_sh[LAT];

  // a row occupies the register bank for PAIRS clocks
  logic [$clog2(PAIRS):0] since_load;
  always_ff @(posedge clk) begin
    if (rst)                          since_load <= ($clog2(PAIRS)+1)'(PAIRS);
    else if (load)                    since_load <= 1;
    else if (since_load < ($clog2(PAIRS)+1)'(PAIRS)) since_load <= since_load + 1'b1;
  end
  load_spacing: assert property (@(posedge clk) disable iff (rst)
                                 load |-> since_load >= ($clog2(PAIRS)+1)'(PAIRS));
  initial assert (L + 1 <= NREG) else $error("summation_circuit: 2**NLEV must be at least L+1");
endmodule
