// tb_acc_circuit: self-checking test of the pipelined row accumulator.
// Random rows (1 to 40 products, some shorter than the adder latency, some
// with runs of inserted zeros) are separated by a row-end cycle and a random
// gap, back to back included. Products are small integers, so every partial
// sum is exact. For each row the test checks that out_we comes exactly L
// cycles after the row-end cycle, that partial sum k equals the sum of the
// products at positions n-1-k, n-1-k-L, ... of the row, and that the unused
// partial sums of short rows are zero. It also checks the number of rows.
module tb_acc_circuit;
  import spmv_pkg::*;
  localparam int unsigned L = 12;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid, in_end, out_we;
  dbl_t a;
  dbl_t out_sums [L];
  int checks = 0, failures = 0;
  int cycle = 0;
  int short_rows = 0, long_rows = 0, back_to_back = 0;

  typedef struct { int n; int end_cycle; real part[L]; } row_t;
  row_t rows [$];

  acc_circuit #(.L(L)) dut (.*);

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  int rows_seen = 0;
  always @(negedge clk) if (!rst && out_we) begin
    row_t r;
    checks++;
    if (rows.size() == 0) begin
      failures++; $display("unexpected out_we at cycle %0d", cycle);
    end else begin
      r = rows.pop_front();
      rows_seen++;
      if (cycle != r.end_cycle + L) begin
        failures++; $display("row %0d: out_we at %0d, expected %0d", rows_seen, cycle, r.end_cycle + L);
      end
      for (int k = 0; k < L; k++) begin
        if (out_sums[k] !== $realtobits(r.part[k])) begin
          failures++;
          if (failures < 20) $display("row %0d (n=%0d): sum[%0d]=%f expected %f", rows_seen, r.n, k,
                                      $bitstoreal(out_sums[k]), r.part[k]);
        end
      end
    end
  end

  initial begin
    automatic int nrows = 400;
    in_valid = 0; in_end = 0; a = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < nrows; i++) begin
      row_t r;
      int n, gap;
      real v [];
      n = (i % 3 == 0) ? 1 + $urandom % (L - 1) : 1 + $urandom % 40;
      if (n < L) short_rows++; else long_rows++;
      v = new[n];
      for (int p = 0; p < n; p++) begin
        // one product in six is an inserted zero
        v[p] = ($urandom % 6 == 0) ? 0.0 : real'(int'($urandom % 2001) - 1000);
      end
      r.n = n;
      for (int k = 0; k < L; k++) begin
        r.part[k] = 0.0;
        if (k < n) for (int p = n - 1 - k; p >= 0; p -= L) r.part[k] += v[p];
      end
      for (int p = 0; p < n; p++) begin
        in_valid = 1; in_end = 0; a = $realtobits(v[p]);
        @(posedge clk); #1;
      end
      in_valid = 0; in_end = 1; a = {$urandom, $urandom};  // garbage on the ID cycle
      r.end_cycle = cycle;
      rows.push_back(r);
      @(posedge clk); #1;
      in_end = 0;
      gap = ($urandom % 2 == 0) ? 0 : $urandom % 4;
      if (gap == 0) back_to_back++;
      repeat (gap) begin a = {$urandom, $urandom}; @(posedge clk); #1; end
    end
    repeat (L + 5) @(posedge clk);
    checks++;
    if (rows_seen != nrows || rows.size() != 0) begin
      failures++; $display("saw %0d of %0d rows", rows_seen, nrows);
    end
    checks++;
    if (short_rows == 0 || long_rows == 0 || back_to_back == 0) begin
      failures++; $display("coverage: short %0d long %0d back-to-back %0d", short_rows, long_rows, back_to_back);
    end
    $display("rows %0d (short %0d, long %0d, back-to-back %0d)", rows_seen, short_rows, long_rows, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
