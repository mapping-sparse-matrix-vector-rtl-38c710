// tb_result_bram: self-checking test of the result memory: random writes and
// reads against a model, one cycle of read latency, and read-first
// behaviour when the read and write address coincide (the read-and-clear
// sweep relies on it).
module tb_result_bram;
  import spmv_pkg::*;
  localparam int unsigned D = 50;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [$clog2(D)-1:0] waddr, raddr;
  dbl_t wdata, rdata;
  dbl_t model [D];
  int checks = 0, failures = 0, same = 0;

  result_bram #(.DEPTH(D)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dbl_t expv;
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < D; i++) begin
      we = 1; waddr = $clog2(D)'(i); wdata = {$urandom, $urandom}; model[i] = wdata;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 3000; i++) begin
      raddr = $clog2(D)'($urandom % D);
      we = 1'($urandom);
      waddr = ($urandom % 4 == 0) ? raddr : $clog2(D)'($urandom % D);
      wdata = {$urandom, $urandom};
      expv = model[raddr];
      if (we && waddr == raddr) same++;
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expv) begin
        failures++;
        if (failures < 10) $display("read %0d got %h expected %h", raddr, rdata, expv);
      end
    end
    checks++;
    if (same == 0) begin failures++; $display("no read-during-write case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
