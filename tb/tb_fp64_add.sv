// tb_fp64_add: self-checking test of the pipelined double-precision adder.
// A new random operand pair enters every cycle; each sum must appear exactly
// LAT cycles later and equal, bit for bit, the simulator's own IEEE-754
// double addition. Operands cover equal and opposite signs, near-equal
// magnitudes (heavy cancellation), wide exponent gaps, zeros and infinities.
module tb_fp64_add;
  import spmv_pkg::*;
  localparam int unsigned LAT = 12;
  localparam int unsigned N   = 4000;

  logic clk = 0;
  always #5 clk = ~clk;

  dbl_t a, b, y;
  dbl_t exp_q [$];
  int checks = 0, failures = 0;

  fp64_add #(.LAT(LAT)) dut (.clk(clk), .a(a), .b(b), .y(y));

  function automatic dbl_t rnd_dbl(input int emin, input int emax);
    logic [51:0] f;
    f = {$urandom, $urandom};
    return {1'($urandom), 11'(emin + ($urandom % (emax - emin + 1))), f};
  endfunction

  function automatic dbl_t ref_add(input dbl_t x, input dbl_t z);
    return $realtobits($bitstoreal(x) + $bitstoreal(z));
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dbl_t exp_hist [$];
    for (int i = 0; i < N + LAT; i++) begin
      if (i < N) begin
        case ($urandom % 6)
          0: begin a = rnd_dbl(900, 1100); b = rnd_dbl(900, 1100); end
          1: begin a = rnd_dbl(1000, 1010); b = a ^ 64'h8000_0000_0000_0000;
                    b[3:0] = 4'($urandom); end                      // cancellation
          2: begin a = rnd_dbl(1020, 1024); b = rnd_dbl(1020, 1024); end
          3: begin a = rnd_dbl(1000, 1002); b = rnd_dbl(930, 950); end // large gap
          4: begin a = 64'd0; b = rnd_dbl(900, 1100); end
          default: begin a = rnd_dbl(1023, 1023); b = {~a[63], a[62:0]}; end // exact zero
        endcase
        exp_hist.push_back(ref_add(a, b));
      end else begin
        a = 64'd0; b = 64'd0;
      end
      @(posedge clk);
      #1;
      // the pair presented before edge i is visible on y after edge i+LAT-1
      if (i >= LAT - 1 && (i - (LAT - 1)) < N) begin
        checks++;
        if (y !== exp_hist[i - (LAT - 1)]) begin
          failures++;
          if (failures < 10)
            $display("mismatch #%0d: got %h expected %h", i - (LAT - 1), y,
                     exp_hist[i - (LAT - 1)]);
        end
      end
    end
    // special values
    a = 64'h7FF0_0000_0000_0000; b = 64'hFFF0_0000_0000_0000;
    @(posedge clk); #1; a = 64'h7FF0_0000_0000_0000; b = 64'h3FF0_0000_0000_0000;
    @(posedge clk); #1; a = 0; b = 0;
    repeat (LAT - 2) @(posedge clk);
    #1; checks++; if (y !== QNAN) begin failures++; $display("inf-inf gave %h", y); end
    @(posedge clk); #1;
    checks++; if (y !== 64'h7FF0_0000_0000_0000) begin failures++; $display("inf+1 gave %h", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
