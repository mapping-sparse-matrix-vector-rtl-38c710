// result_controller: collects finished rows from all PEs and adds them into
// the result memory through the shared summation circuit; reads out and
// clears the result memory when a stripe is finished.
//
// Each PE presents its oldest finished row (L partial sums from FIFO1 and the
// row ID from FIFO2) with head_valid. The controller picks one ready PE
// (round robin), pops both of its FIFOs, and reads the row's current value
// from the result memory with the row ID as address; one clock later the
// partial sums and that value are loaded into the summation circuit. The
// circuit accepts a row every PAIRS (8) clocks, which is the issue rate. The
// row ID and a write enable travel through the circuit's shifters, so the
// total is written back to the right address 56 clocks after the load
// without any further control (stream-through).
//
// Because of that long write-back delay, a row of the next sub-matrix of the
// same stripe could read the memory before the previous sum for the same row
// has been written back. The controller keeps one pending bit per result
// address, set at issue and cleared at write-back, and does not issue a row
// whose address is pending; a PE whose head row waits does not block the
// others. This interlock is this design's addition: the source does not say
// how the hazard is avoided.
//
// Readout: rd_start requests a read-and-clear of rows 0..rd_count-1. The
// controller keeps issuing until the PEs report idle and no row is in flight,
// then streams y_row/y_data with y_valid for one row per clock, writing zero
// to each address as it is read (read-first memory), so the memory is ready
// for the next stripe. After reset the whole memory is cleared the same way
// before the controller accepts rows (ready low meanwhile).
module result_controller
  import spmv_pkg::*;
#(
  parameter int unsigned NPE   = N_PE,
  parameter int unsigned L     = ADD_LAT,
  parameter int unsigned DEPTH = RES_DEPTH,
  localparam int unsigned RW   = $clog2(DEPTH),
  localparam int unsigned PAIRS = 8
) (
  input  logic               clk,
  input  logic               rst,
  // PE FIFO heads
  input  logic [NPE-1:0]     head_valid,
  input  dbl_t [L-1:0]       head_sums [NPE],
  input  logic [RW-1:0]      head_row  [NPE],
  output logic [NPE-1:0]     pop,
  input  logic               pes_idle,    // no row anywhere in the PEs or their feeders
  // stripe readout
  input  logic               rd_start,
  input  logic [RW:0]        rd_count,
  output logic               y_valid,
  output logic [RW-1:0]      y_row,
  output dbl_t               y_data,
  output logic               ready        // idle in the accumulate phase, not clearing or reading
);
  typedef enum logic [1:0] {S_INIT, S_RUN, S_DRAIN, S_READ} state_t;
  state_t state;

  logic [DEPTH-1:0] pending;
  logic [$clog2(DEPTH+1)-1:0] inflight;
  logic [RW:0]  ptr, count_q;
  logic [3:0]   since_issue;
  logic [$clog2(NPE+1)-1:0] rr;

  // issue selection
  logic             can_issue, issue;
  logic [NPE-1:0]   eligible;
  int unsigned      sel;
  always_comb begin
    for (int i = 0; i < NPE; i++) eligible[i] = head_valid[i] && !pending[head_row[i]];
    can_issue = (state == S_RUN || state == S_DRAIN) && since_issue >= 4'(PAIRS);
    issue = 1'b0;
    sel   = 0;
    for (int j = 0; j < NPE; j++) begin
      int unsigned idx;
      idx = (int'(rr) + j) % NPE;
      if (!issue && eligible[idx]) begin
        issue = can_issue;
        sel   = idx;
      end
    end
    pop = '0;
    if (issue) pop[sel] = 1'b1;
  end

  // staging register between issue and summation load
  logic         st_valid;
  dbl_t [L-1:0] st_sums;
  logic [RW-1:0] st_row;
  always_ff @(posedge clk) begin
    if (rst) st_valid <= 1'b0;
    else     st_valid <= issue;
    st_sums <= head_sums[sel];
    st_row  <= head_row[sel];
  end

  // result memory and summation circuit
  logic          mem_we, sum_wen;
  logic [RW-1:0] mem_waddr, mem_raddr, sum_row;
  dbl_t          mem_wdata, mem_rdata, sum_dout;

  result_bram #(.DEPTH(DEPTH)) u_mem (
    .clk(clk), .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .raddr(mem_raddr), .rdata(mem_rdata)
  );

  summation_circuit #(.L(L), .NLEV(4), .ROW_W(RW)) sum (
    .clk(clk), .rst(rst), .load(st_valid), .din({mem_rdata, st_sums}), .row_in(st_row),
    .dout(sum_dout), .wen(sum_wen), .row_out(sum_row)
  );

  // memory port multiplexers: clear/readout sweeps or normal accumulation
  always_comb begin
    if (state == S_INIT || state == S_READ) begin
      mem_we    = (state == S_INIT) || (ptr < count_q);
      mem_waddr = RW'(ptr);
      mem_wdata = '0;
      mem_raddr = RW'(ptr);
    end else begin
      mem_we    = sum_wen;
      mem_waddr = sum_row;
      mem_wdata = sum_dout;
      mem_raddr = head_row[sel];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_INIT;
      pending     <= '0;
      inflight    <= '0;
      ptr         <= '0;
      count_q     <= '0;
      since_issue <= 4'(PAIRS);
      rr          <= '0;
      y_valid     <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      if (issue) begin
        since_issue <= 4'd1;
        rr <= ($clog2(NPE+1))'((sel + 1) % NPE);
      end else if (since_issue < 4'(PAIRS)) begin
        since_issue <= since_issue + 1'b1;
      end
      if (issue) pending[head_row[sel]] <= 1'b1;
      if (sum_wen) pending[sum_row] <= 1'b0;
      inflight <= inflight + ($clog2(DEPTH+1))'(issue) - ($clog2(DEPTH+1))'(sum_wen);
      unique case (state)
        S_INIT: begin
          ptr <= ptr + 1'b1;
          if (ptr == (RW+1)'(DEPTH - 1)) begin
            state <= S_RUN;
            ptr   <= '0;
          end
        end
        S_RUN: begin
          if (rd_start) begin
            state   <= S_DRAIN;
            count_q <= rd_count;
          end
        end
        S_DRAIN: begin
          if (pes_idle && head_valid == '0 && inflight == 0 && !st_valid && !issue) begin
            state <= S_READ;
            ptr   <= '0;
          end
        end
        S_READ: begin
          if (ptr < count_q) begin
            ptr     <= ptr + 1'b1;
            y_valid <= 1'b1;
            y_row   <= RW'(ptr);
          end else begin
            state <= S_RUN;
          end
        end
      endcase
    end
  end

  assign y_data = mem_rdata;
  assign ready  = (state == S_RUN);

  write_in_range:        assert property (@(posedge clk) disable iff (rst) mem_we |-> mem_waddr < RW'(DEPTH));
  writeback_was_pending: assert property (@(posedge clk) disable iff (rst) sum_wen |-> pending[sum_row]);
  readout_in_range:      assert property (@(posedge clk) disable iff (rst)
                                          rd_start && state == S_RUN |-> rd_count <= (RW+1)'(DEPTH));
endmodule
