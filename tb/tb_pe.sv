// tb_pe: self-checking test of one processing element at its default sizes.
// Both x banks are loaded with small integers; random rows (1 to 30
// nonzeros, integer values, random columns and bank) are streamed in the
// PE's input format, with the row-ID cycle after each row, random gaps and,
// whenever the PE raises stall, inserted zeros. A deliberately slow consumer
// pops the FIFOs so that stall must occur. For every popped row the test
// checks the row ID order and that the L partial sums add up exactly to
// sum(val * x[col]). It also checks the latency of the first row (row-ID
// cycle to FIFO head: 1 + MUL_LAT + ADD_LAT + 1 cycles) and that stall was
// raised and later released.
module tb_pe;
  import spmv_pkg::*;
  localparam int unsigned L = ADD_LAT, ML = MUL_LAT, NROWS = 600;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  pe_in_t in;
  logic stall, x_wr_en, x_wr_bank, head_valid, pop, idle;
  logic [COL_W-1:0] x_wr_addr;
  dbl_t x_wr_data;
  dbl_t [L-1:0] head_sums;
  logic [9:0] head_row;
  int checks = 0, failures = 0, cycle = 0;
  int stall_cycles = 0, stall_zeros = 0;
  real xv [2][X_DEPTH];
  real exp_sum [$];
  int  exp_row [$];
  int  first_id_cycle = -1, first_head_cycle = -1;

  pe dut (.*);

  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (!rst && stall) stall_cycles++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer: pops now and then
  int popped = 0;
  initial begin
    pop = 0;
    forever begin
      @(posedge clk); #2;
      if (head_valid && first_head_cycle < 0) first_head_cycle = cycle;
      pop = head_valid && (popped < 60 ? ($urandom % 100) < 3 : ($urandom % 100) < 60);
      if (pop) begin
        real s;
        s = 0.0;
        for (int k = 0; k < L; k++) s += $bitstoreal(head_sums[k]);
        checks++;
        if (exp_row.size() == 0) begin
          failures++; $display("unexpected row");
        end else begin
          if (int'(head_row) != exp_row[0] || s != exp_sum[0]) begin
            failures++;
            if (failures < 10) $display("row %0d: got id %0d sum %f, expected id %0d sum %f",
                                        popped, head_row, s, exp_row[0], exp_sum[0]);
          end
          void'(exp_row.pop_front()); void'(exp_sum.pop_front());
        end
        popped++;
      end
    end
  end

  task automatic send(input logic v, input dbl_t val, input int col, input logic bank);
    in = '{valid: v, bank: bank, col: COL_W'(col), val: val};
    @(posedge clk); #1;
  endtask

  initial begin
    in = '0; x_wr_en = 0; x_wr_bank = 0; x_wr_addr = 0; x_wr_data = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < X_DEPTH; i++) begin
        xv[b][i] = real'(int'($urandom % 201) - 100);
        x_wr_en = 1; x_wr_bank = 1'(b); x_wr_addr = COL_W'(i); x_wr_data = $realtobits(xv[b][i]);
        @(posedge clk); #1;
      end
    x_wr_en = 0;
    for (int r = 0; r < NROWS; r++) begin
      int n, id;
      logic bank;
      real s;
      n = (r < 150) ? 1 + $urandom % 3 : 1 + $urandom % 30;
      id = $urandom % RES_DEPTH;
      bank = 1'($urandom);
      s = 0.0;
      for (int p = 0; p < n; p++) begin
        real v;
        int c;
        v = real'(int'($urandom % 2001) - 1000);
        c = $urandom % X_DEPTH;
        while (stall) begin stall_zeros++; send(1'b1, '0, 0, bank); end
        send(1'b1, $realtobits(v), c, bank);
        s += v * xv[bank][c];
      end
      exp_row.push_back(id);
      exp_sum.push_back(s);
      if (r == 0) first_id_cycle = cycle;
      send(1'b0, '0, id, bank);
      repeat ($urandom % 3) send(1'b0, '0, 0, bank);
    end
    in = '0;
    wait (popped == NROWS);
    repeat (5) @(posedge clk);
    checks++;
    if (first_head_cycle - first_id_cycle != 1 + ML + L + 1) begin
      failures++; $display("first row latency %0d, expected %0d", first_head_cycle - first_id_cycle, 1 + ML + L + 1);
    end
    checks++;
    if (stall_cycles == 0 || stall_zeros == 0 || stall) begin
      failures++; $display("stall cycles %0d, stall zeros %0d, stall now %b", stall_cycles, stall_zeros, stall);
    end
    checks++;
    if (!idle) begin failures++; $display("PE not idle at the end"); end
    $display("rows %0d, stall cycles %0d, inserted zeros %0d", popped, stall_cycles, stall_zeros);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
