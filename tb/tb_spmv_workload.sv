// tb_spmv_workload: runs a whole matrix through the SpMxV core at its default
// sizes, stripe by stripe, the way a host would. The matrix has the shape
// and nonzero count of the "goodwin" test matrix (7320 x 7320, 324784
// nonzeros, 0.61% dense): 8 stripes of up to 1000 rows, each cut into 8
// column blocks of up to 1000 columns. The sparsity pattern is random (the
// real matrix is not available to a self-contained testbench), with 0 to
// twice the average nonzeros per row and block. Values are small integers,
// so every y is compared exactly. For each stripe, x_0 is loaded, then x_1
// while sub-matrix 0 runs, and each later x_j into the bank freed by
// sub-matrix j-2; after the stripe its y rows are read out and cleared. The
// test reports the cycles spent and the share of input clocks that are
// row-ID clocks (the per-row overhead of the stream format).
module tb_spmv_workload;
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
    repeat (3000000) @(posedge clk);
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
  int   blk_cols [8] = '{default: XD};   // columns of each block
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
        c = $urandom % blk_cols[j];
        for (int p = 0; p < n; p++) begin
          el_t e;
          real v;
          v = real'(1 + $urandom % 50) * (($urandom % 2) ? 1.0 : -1.0);
          c = (c + 1 + $urandom % 7) % blk_cols[j];  // columns need not be sorted
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

  localparam int NR = 7320, NC = 7320, NNZ = 324784;
  initial begin
    int t, total_t, nblk, avg2, stripes, nnz_target_row;
    e_valid = '0; x_wr_en = 0; x_wr_bank = 0; x_wr_addr = 0; x_wr_data = 0;
    rd_start = 0; rd_count = 0;
    for (int i = 0; i < NPE; i++) begin
      e_val[i] = 0; e_col[i] = 0; e_row[i] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    wait (ready);
    @(posedge clk); #1;
    nblk = (NC + XD - 1) / XD;
    stripes = (NR + D - 1) / D;
    blk_cols[nblk-1] = NC - (nblk - 1) * XD;
    // average nonzeros per row and block, doubled for the uniform 0..2*avg draw
    avg2 = (2 * NNZ + NR * nblk / 2) / (NR * nblk);
    total_t = 0;
    for (int s = 0; s < stripes; s++) begin
      int nrows;
      nrows = (NR - s * D < D) ? NR - s * D : D;
      run_stripe(nrows, nblk, avg2, 1'b0, t);
      total_t += t;
    end
    $display("matrix %0d x %0d: %0d nonzeros generated (target %0d), %0d row pieces, %0d cycles",
             NR, NC, nnz, NNZ, rows_sent, total_t);
    $display("row-ID clocks are %0.1f%% of the PE input clocks", 100.0 * real'(rows_sent) / real'(nnz + rows_sent));
    checks++;
    if (nnz < NNZ * 9 / 10 || nnz > NNZ * 11 / 10) begin failures++; $display("nonzero count off target"); end
    checks++;
    if (pops != rows_sent) begin failures++; $display("pops %0d rows %0d", pops, rows_sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
