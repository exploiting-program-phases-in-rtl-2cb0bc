// ddr2_bram_tb: random write and read bursts against a reference memory.
// Writes carry random byte masks (including the all-masked beat the bus
// controller sends for the other half of a burst); reads must return both
// beats of the burst in order with the masked bytes untouched.  rd_full is
// raised at random and no beat may be offered while it is high.  The burst
// timing (3 cycles per write, first read beat 2 cycles after the command) is
// checked, and addresses beyond the RAM size must wrap.
module ddr2_bram_tb;
  localparam int WORDS = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, cmd_valid, cmd_ready, cmd_write, wd_valid, wd_ready, rd_valid, rd_full;
  logic [31:0] cmd_addr;
  logic [127:0] wd_data, rd_data;
  logic [15:0] wd_mask;
  int checks = 0, failures = 0;

  ddr2_bram #(.WORDS(WORDS)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [127:0] ref_mem [WORDS];
  bit full_rand = 0;
  always @(posedge clk) rd_full <= full_rand && ($urandom % 3 == 0);
  always @(posedge clk) if (!rst) check(!(rd_valid && rd_full), "no beat while full");

  task automatic cmd(bit w, logic [31:0] a);
    cmd_valid = 1; cmd_write = w; cmd_addr = a;
    while (!cmd_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1 cmd_valid = 0;
  endtask

  initial begin
    rst = 1; cmd_valid = 0; cmd_write = 0; cmd_addr = 0; wd_valid = 0; wd_data = 0; wd_mask = 0;
    for (int i = 0; i < WORDS; i++) ref_mem[i] = '0;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 3000; n++) begin
      automatic bit w = ($urandom % 2) || n < 40;
      automatic logic [31:0] a = {$urandom, 5'b0};       // any burst address
      automatic int idx = int'(a[31:4] % WORDS);
      if (n == 1000) full_rand = 1;
      if (w) begin
        automatic int t0;
        cmd(1, a);
        t0 = 0;
        for (int b = 0; b < 2; b++) begin
          automatic logic [127:0] d = {$urandom, $urandom, $urandom, $urandom};
          automatic logic [15:0] m = ($urandom % 3 == 0) ? 16'hFFFF : 16'($urandom);
          wd_valid = 1; wd_data = d; wd_mask = m;
          while (!wd_ready) begin @(posedge clk); #1; t0++; end
          @(posedge clk); #1 wd_valid = 0;
          for (int k = 0; k < 16; k++) if (!m[k]) ref_mem[(idx + b) % WORDS][k*8 +: 8] = d[k*8 +: 8];
        end
        check(t0 == 0, "write beats accepted back to back");
      end else begin
        automatic int wait_c = 0;
        cmd(0, a);
        for (int b = 0; b < 2; b++) begin
          while (!rd_valid) begin @(posedge clk); #1; wait_c++; end
          check(rd_data == ref_mem[(idx + b) % WORDS], $sformatf("read beat %0d of %h", b, a));
          @(posedge clk); #1;
        end
        if (!full_rand) check(wait_c == 2, $sformatf("read burst latency %0d", wait_c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
