// tb_row_streamer: self-checking test of the PE stream formatter. Random rows
// are offered with random gaps in the input handshake while stall toggles at
// random. An independent monitor rebuilds rows from the output: valid high
// cycles with nonzero val are the row's nonzeros (in order), the first cycle
// with valid low after a row must carry the row's ID, inserted zeros must
// have val = col = 0, and no nonzero may be accepted while stall is high.
// Stall zeros and input-wait zeros must both occur.
module tb_row_streamer;
  import spmv_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic e_valid, e_ready, e_bank, e_last, stall, busy;
  dbl_t e_val;
  logic [COL_W-1:0] e_col;
  logic [9:0] e_row;
  pe_in_t out;
  int checks = 0, failures = 0;
  int stall_zeros = 0, wait_zeros = 0, rows_done = 0;

  typedef struct { dbl_t v; logic [COL_W-1:0] c; logic b; } el_t;
  el_t exp_el [$];        // nonzeros in the order they must appear
  int  exp_rows [$];      // row IDs in order
  int  exp_len [$];

  row_streamer dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor
  logic prev_valid = 0, stall_q = 0;
  int cur_len = 0;
  always @(posedge clk) if (!rst) begin
    #2;
    if (out.valid) begin
      if (out.val != 0) begin
        el_t e;
        checks++;
        e = exp_el.pop_front();
        if (out.val !== e.v || out.col !== e.c || out.bank !== e.b) begin
          failures++;
          if (failures < 10) $display("nonzero mismatch: got %h/%0d expected %h/%0d", out.val, out.col, e.v, e.c);
        end
        cur_len++;
      end else begin
        checks++;
        if (out.col !== 0) begin failures++; $display("inserted zero with col %0d", out.col); end
        if (stall_q) stall_zeros++; else wait_zeros++;
      end
    end else if (prev_valid) begin
      checks++;
      if (exp_rows.size() == 0 || out.col !== COL_W'(exp_rows[0]) || cur_len != exp_len[0]) begin
        failures++;
        $display("row end: id %0d len %0d, expected %0d len %0d", out.col, cur_len,
                 exp_rows.size() > 0 ? exp_rows[0] : -1, exp_len.size() > 0 ? exp_len[0] : -1);
      end
      void'(exp_rows.pop_front()); void'(exp_len.pop_front());
      cur_len = 0;
      rows_done++;
    end else begin
      checks++;
      if (out.val !== 0 || out.col !== 0) begin failures++; $display("idle cycle not zero"); end
    end
    prev_valid = out.valid;
  end
  always @(posedge clk) begin
    // stall as seen by the streamer in the cycle that produced the output
    stall_q <= stall;
    if (!rst && e_valid && e_ready && stall) begin failures++; $display("accepted during stall"); end
  end

  initial begin
    stall = 0;
    forever begin
      @(posedge clk); #1;
      stall = ($urandom % 100) < 20;
    end
  end

  initial begin
    e_valid = 0; e_val = 0; e_col = 0; e_bank = 0; e_last = 0; e_row = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int r = 0; r < 300; r++) begin
      int n;
      logic bk;
      n = 1 + $urandom % 15;
      bk = 1'(r / 50);
      exp_rows.push_back(r % 1000);
      exp_len.push_back(n);
      for (int p = 0; p < n; p++) begin
        el_t e;
        e.v = {2'b01, 62'($urandom) | 62'd1};  // never zero
        e.c = COL_W'($urandom % 1000);
        e.b = bk;
        exp_el.push_back(e);
        while ($urandom % 4 == 0) begin e_valid = 0; @(posedge clk); #1; end  // input wait
        e_valid = 1; e_val = e.v; e_col = e.c; e_bank = e.b;
        e_last = (p == n - 1); e_row = 10'(r % 1000);
        #3;
        while (!e_ready) begin @(posedge clk); #3; end
        @(posedge clk); #1;
        e_valid = 0;
      end
    end
    repeat (20) @(posedge clk);
    checks++;
    if (rows_done != 300 || exp_el.size() != 0) begin failures++; $display("rows %0d, left %0d", rows_done, exp_el.size()); end
    checks++;
    if (stall_zeros == 0 || wait_zeros == 0) begin failures++; $display("stall zeros %0d, wait zeros %0d", stall_zeros, wait_zeros); end
    $display("rows %0d, stall zeros %0d, wait zeros %0d", rows_done, stall_zeros, wait_zeros);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
