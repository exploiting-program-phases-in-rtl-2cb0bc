// reset_generator_tb: drives the reset input, PLL lock and DDR2 calibration
// through power-up, a loss of PLL lock and a push of the reset button, with
// the three clocks at 100, 200 and 50 MHz.  Checks: all resets are asserted
// at power-up; at every instant a lower reset is asserted whenever a higher
// one is (so release is ordered); each release waits for its cause (PLL
// hold time, lock, calibration) and follows it within the synchronizer
// delay; losing lock asserts the lower resets at once.
module reset_generator_tb;
  logic clk_ref = 0, clk_ddr = 0, clk_sys = 0;
  always #5   clk_ref = ~clk_ref;
  always #2.5 clk_ddr = ~clk_ddr;
  always #10  clk_sys = ~clk_sys;
  logic rst_in, pll_locked, ddr_calib_done, rst_pll, rst_stage1, rst_stage2;
  int checks = 0, failures = 0;

  reset_generator dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit monitor = 0;
  always @(clk_ddr) if (monitor) begin
    check(!rst_pll || rst_stage1, "pll reset implies stage 1 reset");
    check(!rst_stage1 || rst_stage2, "stage 1 reset implies stage 2 reset");
  end


  initial begin
    int n;
    rst_in = 1; pll_locked = 0; ddr_calib_done = 0;
    #200;
    check(rst_pll && rst_stage1 && rst_stage2, "all asserted at power-up");
    monitor = 1;
    // release the button: PLL reset goes after 16 reference cycles
    @(posedge clk_ref); #1 rst_in = 0;
    n = 0;
    while (rst_pll) begin @(posedge clk_ref); #1; n++; end
    check(n >= 16 && n <= 18, $sformatf("PLL reset hold %0d cycles", n));
    repeat (20) @(posedge clk_ddr);
    check(rst_stage1 && rst_stage2, "stage 1 waits for PLL lock");
    pll_locked = 1;
    n = 0;
    while (rst_stage1) begin @(posedge clk_ddr); #0.1; n++; end
    check(n >= 2 && n <= 4, $sformatf("stage 1 release after lock in %0d DDR cycles", n));
    repeat (20) @(posedge clk_sys);
    check(rst_stage2, "stage 2 waits for calibration");
    #3 ddr_calib_done = 1;
    n = 0;
    while (rst_stage2) begin @(posedge clk_sys); #0.1; n++; end
    check(n >= 2 && n <= 4, $sformatf("stage 2 release after calibration in %0d cycles", n));
    repeat (10) @(posedge clk_sys);
    check(!rst_pll && !rst_stage1 && !rst_stage2, "all released");
    // loss of lock: lower resets asserted at once
    #3 pll_locked = 0;
    #0.5;
    check(rst_stage1 && rst_stage2 && !rst_pll, "loss of lock resets DDR2 and system at once");
    #7 pll_locked = 1;
    repeat (10) @(posedge clk_sys);
    check(!rst_stage1 && !rst_stage2, "released again after relock");
    // button press: everything resets
    #3 rst_in = 1;
    #0.5;
    check(rst_pll && rst_stage1 && rst_stage2, "button resets all levels");
    #50 rst_in = 0;
    repeat (40) @(posedge clk_sys);
    check(!rst_pll && !rst_stage1 && !rst_stage2, "released after button");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
