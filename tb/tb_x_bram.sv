// tb_x_bram: self-checking test of the two-bank x buffer. Both banks are
// filled with different values, then random reads (interleaved with writes
// to the other bank) must return the model's value one cycle after the
// address, and out-of-range addresses must read zero.
module tb_x_bram;
  import spmv_pkg::*;
  localparam int unsigned D = 40;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en, wr_bank, rd_bank;
  logic [15:0] wr_addr, rd_addr;
  dbl_t wr_data, rd_data;
  dbl_t model [2][D];
  int checks = 0, failures = 0;

  x_bram #(.DEPTH(D)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dbl_t expv;
    wr_en = 0; wr_bank = 0; rd_bank = 0; wr_addr = 0; rd_addr = 0; wr_data = 0;
    for (int bk = 0; bk < 2; bk++)
      for (int i = 0; i < D; i++) begin
        wr_en = 1; wr_bank = 1'(bk); wr_addr = 16'(i); wr_data = {$urandom, $urandom};
        model[bk][i] = wr_data;
        @(posedge clk); #1;
      end
    wr_en = 0;
    for (int i = 0; i < 2000; i++) begin
      rd_bank = 1'($urandom);
      rd_addr = ($urandom % 8 == 0) ? 16'(D + $urandom % 100) : 16'($urandom % D);
      expv = (rd_addr < D) ? model[rd_bank][rd_addr] : '0;
      // write the other bank in the same cycle
      wr_en = 1'($urandom); wr_bank = ~rd_bank; wr_addr = 16'($urandom % D);
      wr_data = {$urandom, $urandom};
      @(posedge clk);
      if (wr_en) model[wr_bank][wr_addr] = wr_data;
      #1;
      checks++;
      if (rd_data !== expv) begin
        failures++;
        if (failures < 10) $display("read %0d/%0d got %h expected %h", rd_bank, rd_addr, rd_data, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
