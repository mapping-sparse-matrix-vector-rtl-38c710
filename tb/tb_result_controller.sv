// tb_result_controller: self-checking test of the result path (controller,
// summation circuit and result memory) at its default sizes. Eight emulated
// PE FIFO heads receive the rows of several sub-matrices of a stripe: each
// row has 12 small-integer partial sums, and the same row IDs recur in later
// sub-matrices on other PEs, so read-after-write hazards on the result memory
// are provoked. After each stripe the memory is read out and cleared, and
// every y value must equal the exact sum of all the row's contributions;
// a second stripe checks that the clear worked. The test also checks that the
// clear after reset keeps ready low, that rows are taken one per 8 clocks at
// full rate, that no row is popped while the model still has it in flight,
// and that such hazards did occur.
module tb_result_controller;
  import spmv_pkg::*;
  localparam int unsigned NPE = N_PE, L = ADD_LAT, D = RES_DEPTH, RW = $clog2(D);
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [NPE-1:0] head_valid, pop;
  dbl_t [L-1:0]   head_sums [NPE];
  logic [RW-1:0]  head_row [NPE];
  logic pes_idle, rd_start, y_valid, ready;
  logic [RW:0] rd_count;
  logic [RW-1:0] y_row;
  dbl_t y_data;
  int checks = 0, failures = 0, cycle = 0;

  typedef struct { int row; real s [L]; } prow_t;
  prow_t q [NPE][$];
  real   y_exp [D];
  int    last_issue [D];     // cycle a row was last popped
  int    hazards = 0, min_gap = 1000, gap8 = 0, last_pop = -1000;

  result_controller dut (.*);

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FIFO head emulation
  always_comb begin
    for (int i = 0; i < NPE; i++) begin
      head_valid[i] = q[i].size() > 0;
      head_row[i]   = head_valid[i] ? RW'(q[i][0].row) : '0;
      for (int k = 0; k < L; k++) head_sums[i][k] = head_valid[i] ? $realtobits(q[i][0].s[k]) : '0;
    end
    pes_idle = (head_valid == '0);
  end

  always @(posedge clk) if (!rst) begin
    int npop;
    npop = 0;
    for (int i = 0; i < NPE; i++) begin
      // a head whose row is still being summed must not be taken
      if (head_valid[i] && cycle - last_issue[q[i][0].row] < 57 && !pop[i]) hazards++;
      if (pop[i]) begin
        npop++;
        checks++;
        if (!head_valid[i] || cycle - last_issue[q[i][0].row] < 57) begin
          failures++; $display("cycle %0d: pop of PE %0d while its row is in flight", cycle, i);
        end
        if (cycle - last_pop < min_gap) min_gap = cycle - last_pop;
        if (cycle - last_pop == 8) gap8++;
        last_pop = cycle;
        last_issue[q[i][0].row] = cycle;
        void'(q[i].pop_front());
      end
    end
    if (npop > 1) begin failures++; $display("two pops in one cycle"); end
  end

  task automatic stripe(input int nsub, input int nrows);
    for (int sm = 0; sm < nsub; sm++) begin
      for (int r = 0; r < nrows; r++) begin
        if ($urandom % 4 != 0) begin
          prow_t pr;
          int pe;
          pr.row = r;
          for (int k = 0; k < L; k++) begin
            pr.s[k] = (k < 1 + $urandom % L) ? real'(int'($urandom % 200) - 100) : 0.0;
            y_exp[r] += pr.s[k];
          end
          pe = $urandom % NPE;
          q[pe].push_back(pr);
        end
      end
    end
  endtask

  task automatic readout(input int nrows);
    int got;
    got = 0;
    @(posedge clk); #1;
    rd_start = 1; rd_count = (RW+1)'(nrows);
    @(posedge clk); #1;
    rd_start = 0;
    while (got < nrows) begin
      @(posedge clk); #1;
      if (y_valid) begin
        checks++;
        if (int'(y_row) != got || $bitstoreal(y_data) != y_exp[got]) begin
          failures++;
          if (failures < 10) $display("y[%0d] (row %0d) = %f expected %f", got, y_row, $bitstoreal(y_data), y_exp[got]);
        end
        y_exp[got] = 0.0;
        got++;
      end
    end
    wait (ready);
  endtask

  initial begin
    int init_cycles;
    rd_start = 0; rd_count = 0;
    for (int i = 0; i < D; i++) begin y_exp[i] = 0.0; last_issue[i] = -1000; end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    init_cycles = 0;
    while (!ready) begin @(posedge clk); #1; init_cycles++; end
    checks++;
    if (init_cycles < D) begin failures++; $display("ready after %0d cycles, clear takes %0d", init_cycles, D); end
    // stripe 1: 4 sub-matrices over rows 0..199
    stripe(4, 200);
    readout(200);
    // stripe 2: 3 sub-matrices over rows 0..999 (full memory)
    stripe(3, D);
    readout(D);
    checks++;
    if (hazards == 0 || min_gap < 8 || gap8 == 0) begin
      failures++; $display("hazard waits %0d, min pop spacing %0d, spacing-8 pops %0d", hazards, min_gap, gap8);
    end
    $display("hazard waits %0d, min pop spacing %0d, spacing-8 pops %0d", hazards, min_gap, gap8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
