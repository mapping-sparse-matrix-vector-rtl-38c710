// tb_spmv_top: end-to-end test of the SpMxV core at its default sizes
// (8 PEs, 1000-entry x and result memories, 12-cycle adder).
//
// Stripe 1 is a 1000-row stripe of three 1000x1000 sub-matrices at about 1%
// density (0 to 20 nonzeros per row and sub-matrix, so rows both shorter and
// longer than the adder latency). Each row goes to a random PE. x_0 and x_1
// are loaded before the start; x_2 is loaded into bank 0 while sub-matrix 1
// is being computed, as soon as every nonzero of sub-matrix 0 has been taken.
// The feeders hold back nonzeros at random (I/O waits). Stripe 2 has only 6
// rows but four sub-matrices, so the same rows come back quickly on other
// PEs and the result-memory hazard interlock must act; here x_0 and x_1 are
// both loaded before the first nonzero is sent. Values are small
// integers, so every y is exact whatever the summation order; each y read
// out must equal the reference sum of val * x[col], and stripe 2 also shows
// that the readout cleared the memory.
//
// Mechanisms counted (a failure if one never happens): PE stall, zeros
// inserted on stall, zeros inserted while waiting for input, rows shorter
// and longer than the adder latency, x loading while the PEs compute, both
// x banks in use, result hazard waits, readout and clear. Rate check: the
// summation circuit takes rows no faster than one per 8 clocks, and stripe 1
// must finish within 10% of the larger of the summation bound (8 clocks per
// row) and the busiest PE's input time (nonzeros plus one clock per row).
module tb_spmv_top;
  import spmv_pkg::*;
  localparam int unsigned NPE = N_PE, XD = X_DEPTH, D = RES_DEPTH, RW = $clog2(D);

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [NPE-1:0] e_valid, e_ready, e_bank, e_last;
  dbl_t           e_val [NPE];
  logic [COL_W-1:0] e_col [NPE];
  logic [RW-1:0]  e_row [NPE];
  logic x_wr_en, x_wr_bank, rd_start, y_valid, ready;
  logic [COL_W-1:0] x_wr_addr;
  dbl_t x_wr_data, y_data;
  logic [RW:0] rd_count;
  logic [RW-1:0] y_row;

  spmv_top dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- matrix and reference ----------------
  typedef struct { dbl_t v; int c; int sub; logic last; int row; } el_t;
  el_t  q [NPE][$];
  real  xv [8][XD];
  real  y_exp [D];
  int   total [8], consumed [8];
  bit   loaded [8];
  int   pe_cycles [NPE];
  int   rows_sent = 0, short_rows = 0, long_rows = 0, nnz = 0;

  task automatic build_stripe(input int nrows, input int nsub, input int maxn);
    for (int j = 0; j < nsub; j++) begin
      total[j] = 0; consumed[j] = 0; loaded[j] = 0;
      for (int i = 0; i < XD; i++) xv[j][i] = real'(int'($urandom % 17) - 8);
    end
    for (int r = 0; r < D; r++) y_exp[r] = 0.0;
    for (int i = 0; i < NPE; i++) pe_cycles[i] = 0;
    for (int j = 0; j < nsub; j++)
      for (int r = 0; r < nrows; r++) begin
        int n, pe, c;
        n = $urandom % (maxn + 1);
        if (n == 0) continue;
        if (n < ADD_LAT) short_rows++; else if (n > ADD_LAT) long_rows++;
        pe = $urandom % NPE;
        rows_sent++;
        pe_cycles[pe] += n + 1;
        c = $urandom % XD;
        for (int p = 0; p < n; p++) begin
          el_t e;
          real v;
          v = real'(1 + $urandom % 50) * (($urandom % 2) ? 1.0 : -1.0);
          c = (c + 1 + $urandom % 7) % XD;       // columns need not be sorted
          e.v = $realtobits(v); e.c = c; e.sub = j; e.last = (p == n - 1); e.row = r;
          y_exp[r] += v * xv[j][c];
          q[pe].push_back(e);
          total[j]++;
          nnz++;
        end
      end
  endtask

  // ---------------- feeders ----------------
  int wait_holds = 0;
  for (genvar i = 0; i < NPE; i++) begin : g_feed
    always @(posedge clk) begin
      if (!rst && e_valid[i] && e_ready[i]) begin
        consumed[q[i][0].sub]++;
        void'(q[i].pop_front());
      end
      #1;
      if (q[i].size() > 0 && !hold && loaded[q[i][0].sub] && ($urandom % 100) >= 8) begin
        e_valid[i] = 1;
        e_val[i]   = q[i][0].v;
        e_col[i]   = COL_W'(q[i][0].c);
        e_bank[i]  = 1'(q[i][0].sub % 2);
        e_last[i]  = q[i][0].last;
        e_row[i]   = RW'(q[i][0].row);
      end else begin
        if (q[i].size() > 0 && !hold && loaded[q[i][0].sub]) wait_holds++;
        e_valid[i] = 0;
      end
    end
  end

  // ---------------- x loader ----------------
  int overlap_loads = 0;
  task automatic load_x(input int j);
    for (int i = 0; i < XD; i++) begin
      x_wr_en = 1; x_wr_bank = 1'(j % 2); x_wr_addr = COL_W'(i); x_wr_data = $realtobits(xv[j][i]);
      @(posedge clk); #1;
      if (dut.fmt_busy != 0) overlap_loads++;
    end
    x_wr_en = 0;
    loaded[j] = 1;
  endtask

  bit hold = 0;
  task automatic run_stripe(input int nrows, input int nsub, input int maxn, input bit preload,
                            output int t_compute);
    int t0, got;
    build_stripe(nrows, nsub, maxn);
    hold = preload;         // with preload, x_0 and x_1 are both loaded before the start
    load_x(0);
    t0 = cycle;             // otherwise the PEs start on sub-matrix 0 from here
    if (nsub > 1) load_x(1);
    if (preload) begin
      hold = 0;
      t0 = cycle;
    end
    for (int j = 2; j < nsub; j++) begin
      wait (consumed[j-2] == total[j-2]);
      repeat (3) @(posedge clk);
      #1;
      load_x(j);
    end
    for (int i = 0; i < NPE; i++) wait (q[i].size() == 0);
    @(posedge clk); #1;
    rd_start = 1; rd_count = (RW+1)'(nrows);
    @(posedge clk); #1;
    rd_start = 0;
    got = 0;
    while (got < nrows) begin
      @(posedge clk); #1;
      if (y_valid) begin
        if (got == 0) t_compute = cycle - t0;
        checks++;
        if (int'(y_row) != got || $bitstoreal(y_data) != y_exp[got]) begin
          failures++;
          if (failures < 10) $display("y[%0d] (row %0d) = %f expected %f", got, y_row,
                                      $bitstoreal(y_data), y_exp[got]);
        end
        got++;
      end
    end
    wait (ready);
  endtask

  // ---------------- mechanism monitors ----------------
  int stall_cycles = 0, stall_zeros = 0, wait_zeros = 0, hazard_waits = 0;
  int pops = 0, first_pop = -1, last_pop = -1, min_pop_gap = 1 << 30, prev_pop = -1;
  int bank_rows [2] = '{0, 0};
  logic [NPE-1:0] stall_q;
  always @(posedge clk) if (!rst) begin
    stall_q <= dut.stall;
    if (dut.stall != 0) stall_cycles++;
    for (int i = 0; i < NPE; i++) begin
      if (dut.pe_in[i].valid && dut.pe_in[i].val == 0) begin
        if (stall_q[i]) stall_zeros++; else wait_zeros++;
      end
      if (dut.u_rc.head_valid[i] && dut.u_rc.pending[dut.u_rc.head_row[i]]) hazard_waits++;
      if (e_valid[i] && e_ready[i] && e_last[i]) bank_rows[e_bank[i]]++;
    end
    if (dut.u_rc.pop != 0) begin
      pops++;
      if (first_pop < 0) first_pop = cycle;
      if (prev_pop >= 0 && cycle - prev_pop < min_pop_gap) min_pop_gap = cycle - prev_pop;
      prev_pop = cycle;
      last_pop = cycle;
    end
  end

  initial begin
    int t1, t2, bound, busiest, rows1;
    e_valid = '0; x_wr_en = 0; x_wr_bank = 0; x_wr_addr = 0; x_wr_data = 0;
    rd_start = 0; rd_count = 0;
    for (int i = 0; i < NPE; i++) begin
      e_val[i] = 0; e_col[i] = 0; e_row[i] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    wait (ready);
    @(posedge clk); #1;

    run_stripe(D, 3, 20, 1'b0, t1);
    rows1 = rows_sent;
    busiest = 0;
    for (int i = 0; i < NPE; i++) if (pe_cycles[i] > busiest) busiest = pe_cycles[i];
    bound = (8 * rows1 > busiest) ? 8 * rows1 : busiest;
    $display("stripe 1: %0d rows, %0d nonzeros, %0d cycles to first y (bound %0d)", rows1, nnz, t1, bound);
    checks++;
    if (real'(t1) > 1.1 * real'(bound) + 1000.0 || t1 < 8 * (rows1 - 1)) begin
      failures++; $display("stripe 1 took %0d cycles, bound %0d", t1, bound);
    end

    run_stripe(6, 4, 30, 1'b1, t2);
    $display("stripe 2: %0d rows in total, %0d cycles to first y", rows_sent - rows1, t2);

    $display("stall cycles %0d, stall zeros %0d, wait zeros %0d, hazard waits %0d, overlapped x loads %0d",
             stall_cycles, stall_zeros, wait_zeros, hazard_waits, overlap_loads);
    $display("short rows %0d, long rows %0d, bank0 rows %0d, bank1 rows %0d, pops %0d, min pop gap %0d",
             short_rows, long_rows, bank_rows[0], bank_rows[1], pops, min_pop_gap);
    checks++; if (stall_cycles == 0 || stall_zeros == 0) begin failures++; $display("no stall"); end
    checks++; if (wait_zeros == 0 || wait_holds == 0) begin failures++; $display("no input-wait zeros"); end
    checks++; if (hazard_waits == 0) begin failures++; $display("no hazard wait"); end
    checks++; if (overlap_loads == 0) begin failures++; $display("no overlapped x load"); end
    checks++; if (short_rows == 0 || long_rows == 0) begin failures++; $display("row length coverage"); end
    checks++; if (bank_rows[0] == 0 || bank_rows[1] == 0) begin failures++; $display("bank coverage"); end
    checks++; if (pops != rows_sent || min_pop_gap < 8) begin
      failures++; $display("pops %0d of %0d rows, min gap %0d", pops, rows_sent, min_pop_gap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
