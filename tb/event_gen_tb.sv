// event_gen_tb: directed and random checks of the event generation unit.
// Directed part: each HTM state change gives the right event one cycle later,
// abort data carries cause and culprit core, a software event is accepted in
// one cycle, and three simultaneous sources leave in priority order
// (HTM, invalidation, software) on consecutive cycles.  Random part: random
// legal HTM walks, invalidations and software events; the output, split by
// source, must equal what was offered, in order, with nothing lost.
module event_gen_tb;
  import tm_trace_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;
  htm_state_e htm_state;
  abort_cause_e htm_abort_cause;
  logic [3:0] htm_abort_core;
  logic inv_sent, sw_ev_valid, sw_ev_ready, ev_valid, inv_lost;
  logic [3:0] sw_ev_type;
  logic [7:0] sw_ev_data;
  event_t ev;
  int checks = 0, failures = 0;

  event_gen dut (.*);

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

  // Apply inputs after a clock edge, look at outputs just before the next.
  task automatic step();
    @(posedge clk); #1;
  endtask

  task automatic expect_ev(logic [3:0] t, logic [7:0] d, string what);
    check(ev_valid && ev.ev_type == t && ev.data == d, what);
  endtask

  // random-phase bookkeeping
  event_t exp_hw [$], exp_sw [$];
  int exp_inv = 0, got_inv = 0, got_hw = 0, got_sw = 0;
  bit collect = 0;

  always @(posedge clk) if (collect && ev_valid) begin
    if (ev.ev_type == EV_INVALIDATION) got_inv++;
    else if (ev.ev_type >= 4'd8) begin
      got_sw++;
      if (exp_sw.size() == 0) begin failures++; $display("FAIL unexpected sw event"); end
      else begin
        checks++;
        if (ev != exp_sw[0]) begin failures++; $display("FAIL sw order"); end
        void'(exp_sw.pop_front());
      end
    end else begin
      got_hw++;
      if (exp_hw.size() == 0) begin failures++; $display("FAIL unexpected hw event"); end
      else begin
        checks++;
        if (ev != exp_hw[0]) begin failures++; $display("FAIL hw order %h vs %h", ev, exp_hw[0]); end
        void'(exp_hw.pop_front());
      end
    end
  end

  initial begin
    rst = 1; htm_state = HTM_IDLE; htm_abort_cause = ABORT_NONE; htm_abort_core = '0;
    inv_sent = 0; sw_ev_valid = 0; sw_ev_type = '0; sw_ev_data = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    step();
    check(!ev_valid, "quiet after reset");
    // a committed hardware transaction
    htm_state = HTM_RUNNING;    step(); htm_state = HTM_RUNNING;
    expect_ev(EV_START, MODE_HW, "start");
    step(); check(!ev_valid, "one event per change");
    htm_state = HTM_TRY_LOCK;   step(); expect_ev(EV_TRY_LOCK, 8'h00, "try lock");
    htm_state = HTM_COMMITTING; step(); expect_ev(EV_LOCK_SUCCESS, 8'h00, "lock success");
    htm_state = HTM_IDLE;       step(); expect_ev(EV_COMMIT, 8'h00, "commit");
    // an aborted one, conflict caused by core 5
    htm_state = HTM_RUNNING; step();
    htm_state = HTM_IDLE; htm_abort_cause = ABORT_CONFLICT; htm_abort_core = 4'd5;
    step(); expect_ev(EV_ABORT, 8'h53, "abort cause and culprit");
    // abort from try-lock, capacity
    htm_state = HTM_RUNNING; step();
    htm_state = HTM_TRY_LOCK; step();
    htm_state = HTM_IDLE; htm_abort_cause = ABORT_CAPACITY; htm_abort_core = 4'd0;
    step(); expect_ev(EV_ABORT, 8'h02, "abort from try-lock");
    // software event accepted in one cycle
    check(sw_ev_ready, "sw ready when idle");
    sw_ev_valid = 1; sw_ev_type = 4'd9; sw_ev_data = 8'hA5;
    step(); sw_ev_valid = 0;
    expect_ev(4'd9, 8'hA5, "sw event passes");
    step(); check(!ev_valid, "sw event once");
    // three sources in one cycle: priority order
    htm_state = HTM_RUNNING; inv_sent = 1; sw_ev_valid = 1; sw_ev_type = 4'd10; sw_ev_data = 8'h11;
    step(); inv_sent = 0; sw_ev_valid = 0;
    expect_ev(EV_START, MODE_HW, "hw first");
    check(!sw_ev_ready, "sw not ready while waiting");
    step(); expect_ev(EV_INVALIDATION, 8'h00, "inv second");
    step(); expect_ev(4'd10, 8'h11, "sw third");
    step(); check(!ev_valid && sw_ev_ready, "drained");
    htm_state = HTM_IDLE; htm_abort_cause = ABORT_SOFTWARE; step();
    step();

    // random phase
    collect = 1;
    for (int i = 0; i < 20000; i++) begin
      @(posedge clk);
      // account for what was accepted at this edge
      if (inv_sent) exp_inv++;
      if (sw_ev_valid && sw_ev_ready) exp_sw.push_back('{ev_type: sw_ev_type, data: sw_ev_data});
      #1;
      begin
        htm_state_e nxt = htm_state;
        automatic int r = $urandom % 100;
        if (r < 30) begin
          unique case (htm_state)
            HTM_IDLE:       nxt = HTM_RUNNING;
            HTM_RUNNING:    nxt = (r < 10) ? HTM_IDLE : HTM_TRY_LOCK;
            HTM_TRY_LOCK:   nxt = (r < 8) ? HTM_IDLE : HTM_COMMITTING;
            HTM_COMMITTING: nxt = HTM_IDLE;
          endcase
        end
        htm_abort_cause = abort_cause_e'(1 + $urandom % 3);
        htm_abort_core  = 4'($urandom);
        if (nxt != htm_state) begin
          event_t e;
          unique case (nxt)
            HTM_RUNNING:    e = '{ev_type: EV_START, data: MODE_HW};
            HTM_TRY_LOCK:   e = '{ev_type: EV_TRY_LOCK, data: 8'h00};
            HTM_COMMITTING: e = '{ev_type: EV_LOCK_SUCCESS, data: 8'h00};
            HTM_IDLE:       e = (htm_state == HTM_COMMITTING) ? '{ev_type: EV_COMMIT, data: 8'h00}
                               : '{ev_type: EV_ABORT, data: {htm_abort_core, 4'(htm_abort_cause)}};
          endcase
          exp_hw.push_back(e);
        end
        htm_state = nxt;
      end
      // invalidations only when the unit can take them (no loss expected)
      inv_sent    = ($urandom % 100) < 15 && !dut.inv_pend;
      if (!(sw_ev_valid && !sw_ev_ready)) begin
        sw_ev_valid = ($urandom % 100) < 20;
        sw_ev_type  = 4'(8 + $urandom % 8);
        sw_ev_data  = 8'($urandom);
      end
    end
    inv_sent = 0; sw_ev_valid = 0;
    repeat (10) @(posedge clk);
    collect = 0;
    check(exp_hw.size() == 0, "all hw events seen");
    check(exp_sw.size() == 0, "all sw events seen");
    check(got_inv == exp_inv, $sformatf("invalidation count %0d vs %0d", got_inv, exp_inv));
    check(got_hw > 1000 && got_sw > 1000, "random phase exercised");
    $display("random phase: hw=%0d inv=%0d sw=%0d", got_hw, got_inv, got_sw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
