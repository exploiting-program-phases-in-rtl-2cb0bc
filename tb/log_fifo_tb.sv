// log_fifo_tb: random pushes and pops against a queue model.  Checks the
// head word, full, empty and count every cycle, including writes into a full
// FIFO (ignored) and reads of an empty one (ignored).
module log_fifo_tb;
  localparam int W = 32, D = 32;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, wr_en, rd_en, full, empty;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int saw_full = 0;

  log_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // phase-dependent bias: fill up, drain, mix
      automatic int pw = (cyc % 1000 < 300) ? 90 : (cyc % 1000 < 600) ? 10 : 50;
      wr_en   = ($urandom % 100) < pw;
      rd_en   = ($urandom % 100) < (100 - pw);
      wr_data = $urandom;
      #1;
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == D), "full");
      check(32'(count) == model.size(), "count");
      if (model.size() > 0) check(rd_data == model[0], "head data");
      if (full) saw_full++;
      @(posedge clk);
      if (rd_en && model.size() > 0) void'(model.pop_front());
      if (wr_en && !full) model.push_back(wr_data);
      #1;
    end
    check(saw_full > 0, "FIFO was full at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
