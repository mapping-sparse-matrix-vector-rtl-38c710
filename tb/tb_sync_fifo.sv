// tb_sync_fifo: self-checking test of the first-word-fall-through FIFO.
// Random writes and reads (never past full or empty) are mirrored in a
// queue; the visible head, the empty and full flags and the fill count are
// compared with the queue every cycle, including simultaneous read and write
// and several fill-to-full / drain-to-empty sweeps.
module tb_sync_fifo;
  localparam int unsigned W = 16, D = 12;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic wr_en, rd_en, empty, full;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D):0] count;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0;
  int saw_full = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bias;
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 5000; i++) begin
      bias = ((i / 500) % 2 == 0) ? 70 : 30;   // alternate filling and draining
      #1;
      // check the visible state against the model
      checks++;
      if (empty !== (model.size() == 0) || full !== (model.size() == D) ||
          count !== ($clog2(D)+1)'(model.size()) ||
          (model.size() > 0 && rd_data !== model[0])) begin
        failures++;
        if (failures < 10)
          $display("cycle %0d: empty=%b full=%b count=%0d head=%h model size %0d head %h",
                   i, empty, full, count, rd_data, model.size(),
                   model.size() > 0 ? model[0] : '0);
      end
      if (full) saw_full++;
      wr_en   = (($urandom % 100) < bias) && (model.size() < D || rd_en);
      rd_en   = (($urandom % 100) < 100 - bias + 10) && (model.size() > 0);
      wr_en   = wr_en && (model.size() < D || rd_en);
      wr_data = W'($urandom);
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    checks++;
    if (saw_full == 0) begin failures++; $display("FIFO never became full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
