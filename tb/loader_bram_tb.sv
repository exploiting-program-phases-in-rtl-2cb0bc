// loader_bram_tb: writes random words to random addresses of the 8 KB
// loader RAM and reads them back, checking the one-cycle read latency, that
// a write does not disturb the read register, and that untouched words read
// as zero.
module loader_bram_tb;
  localparam int W = 512;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic en, we;
  logic [8:0] addr;
  logic [127:0] wdata, rdata;
  logic [127:0] model [W];
  int checks = 0, failures = 0;

  loader_bram dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) model[i] = '0;
    en = 0; we = 0; addr = 0; wdata = 0;
    @(posedge clk); #1;
    for (int i = 0; i < 8000; i++) begin
      en = ($urandom % 4) != 0;
      we = $urandom % 2;
      addr = 9'($urandom);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      if (i < 40) begin en = 1; we = 0; end           // untouched words read zero
      begin
        automatic logic [127:0] held = rdata;
        automatic bit rd = en && !we;
        automatic logic [127:0] exp = model[addr];
        @(posedge clk); #1;
        if (en && we) model[addr] = wdata;
        if (rd) check(rdata == exp, "read data one cycle later");
        else    check(rdata == held, "read register holds");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
