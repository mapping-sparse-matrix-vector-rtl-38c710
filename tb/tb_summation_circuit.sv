// tb_summation_circuit: self-checking test of the reduced summation circuit
// at its default sizes (adder latency 12, 4 adders). Rows of 12 random
// double-precision partial sums plus a random memory value are loaded every
// 8 clocks (the circuit's full rate) or with random gaps. For every row the
// test checks that wen and the row ID appear exactly 56 clocks after the load
// (55 after the first pair enters the first adder) and that the total equals,
// bit for bit, the same values added pairwise in the circuit's order
// (pairs, then pairs of pair sums, and so on, padded with zeros to 16).
module tb_summation_circuit;
  import spmv_pkg::*;
  localparam int unsigned L = ADD_LAT;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic load, wen;
  dbl_t [L:0] din;
  logic [9:0] row_in, row_out;
  dbl_t dout;
  int checks = 0, failures = 0, cycle = 0, full_rate = 0;

  typedef struct { int due; int row; dbl_t sum; } exp_t;
  exp_t expq [$];

  summation_circuit dut (.*);

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rnd_real();
    real v;
    int sh;
    v = real'($urandom) - 2147483648.0;
    sh = int'($urandom % 40);
    for (int i = 0; i < sh; i++) v = v * 0.5;
    return v;
  endfunction

  // independent reference: the pairwise reduction of 16 values
  function automatic dbl_t tree_sum(input real v [16]);
    real t [16];
    int n;
    t = v;
    n = 16;
    while (n > 1) begin
      for (int i = 0; i < n / 2; i++) t[i] = t[2*i] + t[2*i+1];
      n = n / 2;
    end
    return $realtobits(t[0]);
  endfunction

  always @(negedge clk) if (!rst) begin
    if (wen) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("unexpected wen at %0d", cycle);
      end else begin
        e = expq.pop_front();
        if (cycle != e.due || int'(row_out) != e.row || dout !== e.sum) begin
          failures++;
          if (failures < 10) $display("cycle %0d row %0d sum %h; expected cycle %0d row %0d sum %h",
                                      cycle, row_out, dout, e.due, e.row, e.sum);
        end
      end
    end
  end

  initial begin
    load = 0; din = '0; row_in = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (60) @(posedge clk);   // flush the adders' power-up contents
    #1;
    for (int r = 0; r < 500; r++) begin
      real v [16];
      exp_t e;
      for (int i = 0; i < 16; i++) v[i] = (i <= L) ? rnd_real() : 0.0;
      for (int i = 0; i <= L; i++) din[i] = $realtobits(v[i]);
      row_in = 10'($urandom % 1000);
      load = 1;
      e.due = cycle + 56; e.row = int'(row_in); e.sum = tree_sum(v);
      expq.push_back(e);
      @(posedge clk); #1;
      load = 0; din = {(L+1){64'hDEAD_BEEF_DEAD_BEEF}};
      if ($urandom % 2 == 0) begin
        repeat (7) @(posedge clk);
        full_rate++;
      end else begin
        repeat (7 + $urandom % 20) @(posedge clk);
      end
      #1;
    end
    repeat (70) @(posedge clk);
    checks++;
    if (expq.size() != 0 || full_rate == 0) begin failures++; $display("%0d rows missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
