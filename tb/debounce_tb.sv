// debounce_tb: with a 20-cycle filter, bursts of bounces shorter than 20
// cycles must never change the output, and a level held steady must appear
// at the output after 20 cycles plus the two-flop synchronizer (22 or 23
// cycles after the change).  The power-up value must be the active level.
module debounce_tb;
  localparam int N = 20;
  logic clk = 0;
  always #5 clk = ~clk;
  logic btn_in, btn_out;
  int checks = 0, failures = 0;

  debounce #(.STABLE_CYCLES(N)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bounce_then(logic final_level);
    // random bounces, each level held 1..N-2 cycles
    for (int i = 0; i < 30; i++) begin
      btn_in = ~btn_in;
      repeat (1 + $urandom % (N - 3)) begin
        @(posedge clk); #1;
        check(btn_out == ~final_level, "no change while bouncing");
      end
    end
    btn_in = final_level;
  endtask

  initial begin
    int n;
    btn_in = 1;
    #1 check(btn_out == 1'b1, "active at power-up");
    repeat (40) @(posedge clk); #1;
    for (int rep = 0; rep < 20; rep++) begin
      automatic logic lvl = ~btn_out;
      bounce_then(lvl);
      n = 0;
      while (btn_out != lvl && n < 100) begin @(posedge clk); #1; n++; end
      check(n >= N + 2 && n <= N + 3, $sformatf("settled after %0d cycles", n));
      repeat (5) @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
