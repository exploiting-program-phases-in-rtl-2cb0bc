// log_unit_tb: the log unit against a reference model of delta encoding.
// The test offers events at random times while the ring accepts words only
// now and then, then blocks the ring to overfill the 32-entry buffer, then
// stays idle for more than 2^20 cycles to force an Overflow event.  The
// model keeps its own cycle count: each stored event must carry the number of
// cycles since the previous stored event, dropped events must not disturb
// that, and the word layout must match the ring format.
module log_unit_tb;
  import tm_trace_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, ev_valid, tx_valid, tx_ready, overflow_ev;
  event_t ev;
  logic [31:0] tx_word;
  logic [5:0] fill;
  logic [15:0] lost_count;
  int checks = 0, failures = 0;

  log_unit dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (1_300_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0, last = 0;
  int model_fill = 0, lost = 0, overflows = 0, received = 0;
  logic [31:0] expq [$];

  // Reference model, evaluated at each clock edge from the inputs.
  always @(posedge clk) begin
    if (rst) begin
      cyc <= 0; last = 0; model_fill = 0;
    end else begin
      automatic bit popped = tx_valid && tx_ready;
      if (ev_valid) begin
        if (model_fill < 32) begin
          expq.push_back({ev.data[7:4], ev.ev_type, 20'(cyc - last), ev.data[3:0]});
          last = cyc; model_fill++;
        end else lost++;
      end else if (cyc - last == 64'(TS_MAX) && model_fill < 32) begin
        expq.push_back({4'h0, EV_OVERFLOW, TS_MAX, 4'h0});
        last = cyc; model_fill++; overflows++;
      end
      if (popped) begin
        received++;
        if (expq.size() == 0) begin failures++; $display("FAIL word with nothing expected"); end
        else begin
          checks++;
          if (tx_word != expq[0]) begin
            failures++; $display("FAIL word %h expected %h", tx_word, expq[0]);
          end
          void'(expq.pop_front());
        end
        model_fill--;
      end
      cyc <= cyc + 1;
    end
  end

  initial begin
    rst = 1; ev_valid = 0; ev = '0; tx_ready = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // phase 1: random events, ring free 40 % of the time
    for (int i = 0; i < 3000; i++) begin
      ev_valid = ($urandom % 100) < 20;
      ev.ev_type = 4'(1 + $urandom % 15);
      ev.data = 8'($urandom);
      tx_ready = ($urandom % 100) < 40;
      @(posedge clk); #1;
    end
    ev_valid = 0; tx_ready = 1;
    repeat (100) @(posedge clk); #1;
    check(!tx_valid && fill == 0, "drained after phase 1");
    check(lost_count == 0 && lost == 0, "nothing lost in phase 1");
    // phase 2: ring busy, 40 events into a 32-entry buffer
    tx_ready = 0;
    for (int i = 0; i < 40; i++) begin
      ev_valid = 1; ev.ev_type = EV_START; ev.data = 8'(i);
      @(posedge clk); #1;
    end
    ev_valid = 0;
    check(fill == 32, "buffer full");
    check(lost_count == 8 && lost == 8, "eight events dropped and counted");
    repeat (5) @(posedge clk); #1;
    tx_ready = 1;
    repeat (40) @(posedge clk); #1;
    ev_valid = 1; ev.ev_type = EV_COMMIT; ev.data = 8'h42;
    @(posedge clk); #1; ev_valid = 0;
    repeat (5) @(posedge clk); #1;
    // phase 3: silence for longer than the timestamp range
    begin
      int ov0 = overflows;
      repeat (1_050_000) @(posedge clk);
      #1;
      check(overflows == ov0 + 1, "exactly one overflow event in 2^20 idle cycles");
      ev_valid = 1; ev.ev_type = EV_ABORT; ev.data = 8'h31;
      @(posedge clk); #1; ev_valid = 0;
      repeat (5) @(posedge clk); #1;
    end
    check(expq.size() == 0, "every stored event was sent");
    check(received > 500, "enough traffic");
    $display("received=%0d overflows=%0d lost=%0d", received, overflows, lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
