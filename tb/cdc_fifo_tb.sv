// cdc_fifo_tb: a 50 MHz writer and a 200 MHz reader (the system and DDR2
// clock ratio), then the reverse direction, both with random stalls.  Every
// word must arrive once, in order, uncorrupted; the FIFO must report full
// when the reader stalls long enough; a burst of two back-to-back words
// written on the slow side must come out as exactly two words.
module cdc_fifo_tb;
  localparam int WIDTH = 40, DEPTH = 16;
  logic clk_a = 1'b0, clk_b = 1'b0;
  always #10 clk_a = ~clk_a;     // 50 MHz
  always #2.5 clk_b = ~clk_b;    // 200 MHz
  logic rst;
  int checks = 0, failures = 0;

  logic wr_en, wr_full, rd_en, rd_empty;
  logic [WIDTH-1:0] wr_data, rd_data;
  logic wr_clk, rd_clk;
  bit dir_fast_to_slow = 0;

  assign wr_clk = dir_fast_to_slow ? clk_b : clk_a;
  assign rd_clk = dir_fast_to_slow ? clk_a : clk_b;

  cdc_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (
    .wr_clk, .wr_rst(rst), .wr_en, .wr_data, .wr_full,
    .rd_clk, .rd_rst(rst), .rd_en, .rd_data, .rd_empty);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [WIDTH-1:0] sent [$];
  int n_sent, n_got, full_seen;
  int wr_pct, rd_pct;
  bit running;
  int burst_left = 0;

  always @(posedge wr_clk) if (!rst) begin
    if (wr_en && !wr_full) begin sent.push_back(wr_data); n_sent++; end
    if (wr_full) full_seen++;
    #0.1;
    wr_en   = (running && (($urandom % 100) < wr_pct)) || burst_left > 0;
    if (burst_left > 0) burst_left--;
    wr_data = {$urandom, 8'($urandom)};
  end

  always @(posedge rd_clk) if (!rst) begin
    if (rd_en && !rd_empty) begin
      n_got++;
      checks++;
      if (sent.size() == 0 || sent[0] != rd_data) begin
        failures++; $display("FAIL data %h", rd_data);
      end else void'(sent.pop_front());
    end
    #0.1;
    rd_en = ($urandom % 100) < rd_pct;
  end

  task automatic run_phase(bit fast_to_slow, int wp, int rp, int cycles);
    rst = 1; running = 0; wr_en = 0; rd_en = 0; wr_data = 0;
    dir_fast_to_slow = fast_to_slow;
    sent.delete(); n_sent = 0; n_got = 0; full_seen = 0;
    wr_pct = wp; rd_pct = rp;
    #100 rst = 0;
    running = 1;
    repeat (cycles) @(posedge clk_a);
    running = 0;
    rd_pct = 100;
    repeat (200) @(posedge clk_a);
    check(n_got == n_sent && n_sent > 100, $sformatf("all words through (%0d/%0d)", n_got, n_sent));
    check(rd_empty, "empty at the end");
  endtask

  initial begin
    rst = 1; running = 0; wr_en = 0; rd_en = 0; wr_data = 0;
    run_phase(0, 70, 5, 3000);         // slow writer, very lazy reader: fills up
    check(full_seen > 0, "full reported");
    run_phase(1, 20, 60, 3000);        // fast writer into the slow side
    run_phase(0, 90, 90, 3000);
    // a two-word burst on the slow side appears as exactly two words
    rst = 1; running = 0; rd_pct = 100; dir_fast_to_slow = 0;
    sent.delete(); n_sent = 0; n_got = 0;
    #100 rst = 0;
    repeat (3) @(posedge clk_a);
    burst_left = 2;
    repeat (50) @(posedge clk_a);
    check(n_got == 2 && n_sent == 2, $sformatf("burst words %0d/%0d", n_got, n_sent));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
