// tmbox_trace_top_tb: end-to-end test of the tracing and memory-side
// infrastructure with reduced sizes (4 cores, 2000-cycle sampling period,
// short button filter, 10 clock cycles per UART bit).
//
// The testbench plays the parts that lie outside the top level:
//   * the PLL and the DDR2 controller's calibration, for the reset sequence;
//   * each core's HTM unit: transactions start, run, and either abort
//     (conflict, naming a random culprit core) or commit: try-lock, wait for
//     the bus lock, commit with a few invalidations, release the lock; the
//     cores also issue software events (types 7..10) and plain invalidations;
//   * the memory ring: random quad-word reads and writes to DDR2 and to the
//     loader RAM, reads of the statistics registers and counters;
//   * the DDR2 controller queues in the 200 MHz domain (a burst memory model;
//     the top is built with BRAM_MAIN_MEMORY=0 so that these ports are used);
//   * a loopback wire from the UART transmitter to its receiver.
// Checks: every event reaches the statistics stop in order per source with
// the right type and data; the running sum of delta timestamps matches the
// cycle of each HTM state change exactly (and of invalidation/software events
// within a few cycles), also across a 2^20-cycle quiet gap bridged by
// Overflow events; every invalidation reaches every other core; only one core
// commits at a time and only with the lock; memory reads return what was
// written; the statistics counters (since reset, previous period, global sum)
// equal the events seen; a new period length takes effect after a statistics
// reset; UART bytes come back; nothing is lost.
// Each mechanism is counted, and one that never happened is a failure.
module tmbox_trace_top_tb
  import tm_trace_pkg::*;
;
  localparam int NC = 4;
  localparam int PERIOD = 2000;
  localparam int DEBOUNCE = 8;
  localparam int SYS_HZ = 1_000_000, BAUD = 100_000;
  localparam int NUM_LEVELS = 3;
  localparam int LW = 512;
  localparam int PHASE1 = 20000, PHASE3 = 6000;
  localparam logic [31:0] STATS_BASE = 32'h0FFF_F000, LOADER_BASE = 32'h0FFF_C000;
  localparam int CSLOTS = 1 << $clog2(NC + 1);
  localparam int STRIDE = CSLOTS * 64;

  logic clk_ref = 0, clk_sys = 0, clk_ddr = 0;
  always #10 clk_ref = ~clk_ref;   // 100 MHz with 1 unit = 0.5 ns
  always #20 clk_sys = ~clk_sys;   //  50 MHz
  always #5  clk_ddr = ~clk_ddr;   // 200 MHz

  logic rst_btn, pll_locked, ddr_calib_done, rst_pll, rst_ddr, rst_sys;
  htm_state_e   htm_state       [NC];
  abort_cause_e htm_abort_cause [NC];
  logic [CORE_ID_W-1:0] htm_abort_core [NC];
  logic [NC-1:0] inv_valid, inv_ready, rx_inv_valid;
  logic [31:0]   inv_addr [NC], rx_inv_addr [NC];
  logic [CORE_ID_W-1:0] rx_inv_sender [NC];
  logic [NC-1:0] sw_ev_valid, sw_ev_ready;
  logic [EV_TYPE_W-1:0] sw_ev_type [NC];
  logic [EV_DATA_W-1:0] sw_ev_data [NC];
  logic [15:0] trace_lost [NC];
  logic [NC-1:0] lock_req, lock_grant;
  logic mem_req_valid, mem_req_ready, mem_req_write, mem_resp_valid, mem_resp_write;
  logic [31:0] mem_req_addr;
  logic [127:0] mem_req_wdata, mem_resp_rdata;
  logic [3:0] mem_req_src, mem_resp_src;
  logic ddr_cmd_valid, ddr_cmd_ready, ddr_cmd_write, ddr_wd_valid, ddr_wd_ready;
  logic [31:0] ddr_cmd_addr;
  logic [127:0] ddr_wd_data, ddr_rd_data;
  logic [15:0] ddr_wd_mask;
  logic ddr_rd_valid, ddr_rd_full;
  logic stats_period_end;
  logic [31:0] stats_period_number;
  logic uart_rxd, uart_txd, uart_tx_valid, uart_tx_ready, uart_rx_valid, uart_rx_err;
  logic [7:0] uart_tx_data, uart_rx_data;

  assign uart_rxd = uart_txd;

  tmbox_trace_top #(
    .NUM_CORES (NC), .STATS_PERIOD (PERIOD), .DEBOUNCE_CYCLES (DEBOUNCE),
    .CLK_SYS_HZ (SYS_HZ), .UART_BAUD (BAUD), .NUM_LEVELS (NUM_LEVELS),
    .BRAM_MAIN_MEMORY (1'b0)
  ) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk_sys);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ cycle count
  longint cyc = 0;
  always @(posedge clk_sys) cyc++;
  task automatic tick(int n = 1);
    repeat (n) @(posedge clk_sys);
    #1;
  endtask

  // ------------------------------------------------------ mechanism counters
  int m_reset_seq = 0, m_start = 0, m_commit = 0, m_abort = 0, m_trylock = 0;
  int m_locksucc = 0, m_inv_ev = 0, m_sw_ev = 0, m_overflow = 0, m_buffered = 0;
  int m_inv_priority = 0, m_inv_rx = 0, m_handover = 0, m_period_end = 0;
  int m_level2 = 0, m_ddr_rbeat = 0, m_ddr_wbeat = 0, m_bram = 0, m_stats_rd = 0;
  int m_uart = 0, m_perlen = 0, m_lock_wait = 0;

  // ------------------------------------------------------------ DDR2 model
  logic [127:0] ddr_mem [logic [27:0]];
  logic [127:0] rdq [$];
  int rd_delay = 0, wd_left = 0, unmasked = 0;
  logic [31:0] wr_burst_addr;
  logic cmd_ok = 1;

  function automatic logic [127:0] ddr_get(logic [31:0] a);
    return ddr_mem.exists(a[31:4]) ? ddr_mem[a[31:4]] : {4{a & 32'hFFFF_FFF0}};
  endfunction

  task automatic ddr_drive();
    ddr_cmd_ready = (wd_left == 0) && cmd_ok;
    ddr_wd_ready  = (wd_left > 0);
    ddr_rd_valid  = (rdq.size() > 0) && (rd_delay == 0);
    ddr_rd_data   = (rdq.size() > 0) ? rdq[0] : '0;
  endtask

  always @(posedge clk_ddr) if (rst_ddr === 1'b0 && $time > 1000) begin
    automatic bit rd_hs  = ddr_rd_valid && !ddr_rd_full;
    automatic bit cmd_hs = ddr_cmd_valid && ddr_cmd_ready;
    automatic bit wd_hs  = ddr_wd_valid && ddr_wd_ready;
    automatic logic cmd_w = ddr_cmd_write;
    automatic logic [31:0] cmd_a = ddr_cmd_addr;
    automatic logic [15:0] wmask = ddr_wd_mask;
    automatic logic [127:0] wdata = ddr_wd_data;
    #1;
    cmd_ok = ($urandom % 4 != 0);
    if (rd_delay > 0) rd_delay--;
    if (rd_hs) begin void'(rdq.pop_front()); m_ddr_rbeat++; end
    if (cmd_hs) begin
      check(cmd_a[4:0] == 5'b0, "DDR2 burst aligned");
      if (cmd_w) begin wd_left = 2; wr_burst_addr = cmd_a; unmasked = 0; end
      else begin
        rdq.push_back(ddr_get(cmd_a));
        rdq.push_back(ddr_get(cmd_a + 16));
        rd_delay = 4 + $urandom % 12;
      end
    end
    if (wd_hs) begin
      automatic logic [31:0] a = wr_burst_addr + (wd_left == 1 ? 16 : 0);
      automatic logic [127:0] old = ddr_get(a);
      for (int b = 0; b < 16; b++) if (!wmask[b]) old[b*8 +: 8] = wdata[b*8 +: 8];
      ddr_mem[a[31:4]] = old;
      m_ddr_wbeat++;
      if (wmask == 16'h0) unmasked++;
      wd_left--;
      if (wd_left == 0) check(unmasked == 1, "one unmasked beat per write burst");
    end
    ddr_drive();
  end

  // --------------------------------------------------------- reset sequence
  initial begin
    rst_btn = 1; pll_locked = 0; ddr_calib_done = 0;
    ddr_drive();
    #2000;
    check(rst_pll && rst_ddr && rst_sys, "all resets at power-up");
    rst_btn = 0;
    wait (!rst_pll);
    check(rst_ddr && rst_sys, "PLL released first");
    #700 pll_locked = 1;
    wait (!rst_ddr);
    check(rst_sys, "DDR2 released before system");
    #900 ddr_calib_done = 1;
    wait (!rst_sys);
    check(!rst_pll && !rst_ddr, "system released last");
    m_reset_seq++;
    $display("reset sequence done at %0t", $time);
  end

  // ------------------------------------------------------- expected events
  typedef struct { logic [3:0] t; logic [7:0] d; longint c; } exp_t;
  exp_t exp_hw [NC][$];
  exp_t exp_iv [NC][$];
  exp_t exp_sw [NC][$];
  longint cum [NC];
  longint off [NC];
  bit     calibrated [NC];
  int cnt0 [NC][16];                 // since reset
  int cur_cnt [NC][16], prev_cnt [NC][16];

  function automatic bit is_hw(logic [3:0] t);
    return t inside {EV_START, EV_COMMIT, EV_ABORT, EV_TRY_LOCK, EV_LOCK_SUCCESS};
  endfunction

  // events leaving the ring at the bus controller stop, and period ends
  always @(posedge clk_sys) if (!rst_sys) begin
    automatic logic v = dut.sink_valid;
    automatic logic [CORE_ID_W-1:0] s = dut.sink_sender;
    automatic stamped_event_t e = unpack_event(dut.sink_word);
    automatic logic pe = stats_period_end;
    if (v) begin
      check(s < NC, "event sender is a core");
      if (s < NC) begin
        cnt0[s][e.ev_type]++;
        cur_cnt[s][e.ev_type]++;
        cum[s] += e.delta;
        if (e.ev_type == EV_OVERFLOW) begin
          m_overflow++;
          check(e.delta == TS_MAX, "overflow event carries the full delta");
        end else if (is_hw(e.ev_type)) begin
          automatic exp_t x;
          check(exp_hw[s].size() > 0, "HTM event expected");
          if (exp_hw[s].size() > 0) begin
            x = exp_hw[s].pop_front();
            check(e.ev_type == x.t && e.data == x.d,
                  $sformatf("core %0d HTM event %0d/%h expected %0d/%h", s, e.ev_type, e.data, x.t, x.d));
            if (!calibrated[s]) begin off[s] = x.c - cum[s]; calibrated[s] = 1; end
            else check(cum[s] + off[s] == x.c,
                       $sformatf("core %0d timestamp %0d vs state change %0d", s, cum[s] + off[s], x.c));
          end
          case (e.ev_type)
            EV_START: m_start++;
            EV_COMMIT: m_commit++;
            EV_ABORT: m_abort++;
            EV_TRY_LOCK: m_trylock++;
            default: m_locksucc++;
          endcase
        end else begin
          automatic bit iv = (e.ev_type == EV_INVALIDATION);
          automatic exp_t x;
          if (iv) m_inv_ev++; else m_sw_ev++;
          check(iv ? exp_iv[s].size() > 0 : exp_sw[s].size() > 0, "event expected");
          if (iv ? exp_iv[s].size() > 0 : exp_sw[s].size() > 0) begin
            x = iv ? exp_iv[s].pop_front() : exp_sw[s].pop_front();
            check(e.ev_type == x.t && e.data == x.d, $sformatf("core %0d event %0d/%h expected %0d/%h",
                  s, e.ev_type, e.data, x.t, x.d));
            if (calibrated[s])
              check(cum[s] + off[s] - x.c inside {[-1:4]},
                    $sformatf("core %0d event lag %0d", s, cum[s] + off[s] - x.c));
          end
        end
      end
    end
    if (pe) begin
      m_period_end++;
      prev_cnt = cur_cnt;
      foreach (cur_cnt[i, j]) cur_cnt[i][j] = 0;
    end
  end

  // ------------------------------------------- per-core observation points
  for (genvar g = 0; g < NC; g++) begin : g_mon
    always @(posedge clk_sys) if (!rst_sys) begin
      if (dut.g_core[g].u_log.fill >= 2) m_buffered++;
      if (inv_valid[g] && inv_ready[g] && dut.g_core[g].log_valid) m_inv_priority++;
      check(!dut.g_core[g].u_event_gen.inv_lost, "no invalidation event lost");
    end
  end

  // ------------------------------------------ invalidation delivery, lock
  int inv_rx_count [logic [31:0]];
  logic [CORE_ID_W-1:0] inv_owner [logic [31:0]];
  logic [NC-1:0] prev_grant = '0;
  always @(posedge clk_sys) if (!rst_sys) begin
    automatic int committing = 0;
    for (int k = 0; k < NC; k++) begin
      if (rx_inv_valid[k]) begin
        m_inv_rx++;
        check(inv_rx_count.exists(rx_inv_addr[k]), "received invalidation was sent");
        if (inv_rx_count.exists(rx_inv_addr[k])) begin
          inv_rx_count[rx_inv_addr[k]]++;
          check(inv_owner[rx_inv_addr[k]] == rx_inv_sender[k] && rx_inv_sender[k] != k,
                "invalidation sender");
        end
      end
      if (htm_state[k] == HTM_COMMITTING) begin
        committing++;
        check(lock_grant[k], "committing core holds the lock");
      end
    end
    check(committing <= 1, "one committing core at a time");
    check($onehot0(lock_grant), "lock grant one-hot");
    if (lock_grant != prev_grant && lock_grant != 0) m_handover++;
    if (lock_grant != 0 && (lock_req & ~lock_grant) != 0) m_lock_wait++;
    prev_grant = lock_grant;
  end

  // --------------------------------------------------------- core models
  bit traffic_on = 0;
  int busy = 0;
  int inv_seq = 0;

  task automatic set_state(int k, htm_state_e st, logic [3:0] t, logic [7:0] d);
    htm_state[k] = st;
    exp_hw[k].push_back('{t: t, d: d, c: cyc});
  endtask

  task automatic send_inv(int k);
    automatic logic [31:0] a = 32'h0100_0000 + 32'(inv_seq++) * 16;
    inv_rx_count[a] = 0;
    inv_owner[a] = CORE_ID_W'(k);
    inv_valid[k] = 1; inv_addr[k] = a;
    while (!inv_ready[k]) tick();
    tick();
    inv_valid[k] = 0;
    exp_iv[k].push_back('{t: EV_INVALIDATION, d: 8'h00, c: cyc});
  endtask

  task automatic send_sw(int k);
    automatic logic [3:0] t = 4'(7 + $urandom % 4);
    automatic logic [7:0] d = 8'($urandom);
    sw_ev_valid[k] = 1; sw_ev_type[k] = t; sw_ev_data[k] = d;
    while (!sw_ev_ready[k]) tick();
    tick();
    sw_ev_valid[k] = 0;
    exp_sw[k].push_back('{t: t, d: d, c: cyc});
  endtask

  task automatic core_model(int k);
    bit first = 1;
    forever begin
      wait (traffic_on);
      busy++;
      if (!first) begin
        tick(2 + $urandom % 20);
        if ($urandom % 4 == 0) begin send_sw(k); tick(); end
        if ($urandom % 6 == 0) begin send_inv(k); tick(); end
      end
      first = 0;
      set_state(k, HTM_RUNNING, EV_START, MODE_HW);
      tick(3 + $urandom % 30);
      if ($urandom % 3 == 0) begin send_sw(k); tick(2); end
      if ($urandom % 3 == 0) begin
        automatic logic [3:0] culprit = 4'((k + 1 + $urandom % (NC - 1)) % NC);
        htm_abort_cause[k] = ABORT_CONFLICT;
        htm_abort_core[k]  = culprit;
        set_state(k, HTM_IDLE, EV_ABORT, {culprit, 4'(ABORT_CONFLICT)});
        tick(3);
      end else begin
        set_state(k, HTM_TRY_LOCK, EV_TRY_LOCK, 8'h00);
        lock_req[k] = 1;
        tick(3);
        while (!lock_grant[k]) tick();
        set_state(k, HTM_COMMITTING, EV_LOCK_SUCCESS, 8'h00);
        repeat (1 + $urandom % 3) begin send_inv(k); tick(); end
        tick($urandom % 4);
        lock_req[k] = 0;
        set_state(k, HTM_IDLE, EV_COMMIT, 8'h00);
        tick(3);
      end
      busy--;
    end
  endtask

  // ---------------------------------------------------- memory ring model
  logic [127:0] ref_q [logic [27:0]];
  longint last_pn = 0;

  function automatic logic [31:0] cnt_addr(int level, int core, int t);
    return STATS_BASE + 32'h400 + 32'(level * STRIDE + core * 64 + t * 4);
  endfunction

  task automatic mem_access(bit w, logic [31:0] a, logic [127:0] d, output logic [127:0] r);
    automatic logic [3:0] src = 4'($urandom % NC);
    mem_req_valid = 1; mem_req_write = w; mem_req_addr = a; mem_req_wdata = d; mem_req_src = src;
    while (!mem_req_ready) tick();
    tick();
    mem_req_valid = 0;
    while (!mem_resp_valid) tick();
    check(mem_resp_write == w && mem_resp_src == src, "memory response kind and source");
    r = mem_resp_rdata;
  endtask

  task automatic stats_read(logic [31:0] a, output logic [31:0] v);
    logic [127:0] r;
    mem_access(0, a, '0, r);
    check(r == {4{r[31:0]}}, "register value in all lanes");
    v = r[31:0];
    m_stats_rd++;
  endtask

  task automatic stats_write(logic [31:0] a, logic [31:0] v);
    logic [127:0] r;
    mem_access(1, a, {4{v}}, r);
  endtask

  task automatic mem_traffic();
    forever begin
      wait (traffic_on);
      begin
        automatic int kind = $urandom % 20;
        automatic bit w = $urandom % 2;
        automatic logic [127:0] d = {$urandom, $urandom, $urandom, $urandom};
        automatic logic [127:0] r, expv;
        automatic logic [31:0] a, v;
        if (kind < 12) begin
          a = 32'h0002_0000 + 32'($urandom % 128) * 16;
          expv = ref_q.exists(a[31:4]) ? ref_q[a[31:4]] : {4{a}};
          mem_access(w, a, d, r);
          if (w) ref_q[a[31:4]] = d;
          else check(r == expv, $sformatf("DDR2 read %h", a));
        end else if (kind < 16) begin
          a = LOADER_BASE + 32'($urandom % LW) * 16;
          expv = ref_q.exists(a[31:4]) ? ref_q[a[31:4]] : '0;
          mem_access(w, a, d, r);
          m_bram++;
          if (w) ref_q[a[31:4]] = d;
          else check(r == expv, $sformatf("loader RAM read %h", a));
        end else if (kind == 16) begin
          stats_read(STATS_BASE, v);
          check(v == 32'h5354_4154, "statistics signature");
        end else if (kind == 17) begin
          stats_read(STATS_BASE + 32'h00C, v);
          check(v == NUM_LEVELS, "number of levels");
        end else begin
          stats_read(STATS_BASE + 32'h004, v);
          check(v >= last_pn, "period number never goes back");
          last_pn = v;
        end
        tick($urandom % 8);
      end
    end
  endtask

  // ------------------------------------------------------------------ UART
  logic [7:0] uart_sent [$];
  always @(posedge clk_sys) if (!rst_sys) begin
    if (uart_rx_valid) begin
      check(uart_sent.size() > 0 && uart_sent[0] == uart_rx_data, "UART byte looped back");
      if (uart_sent.size() > 0) void'(uart_sent.pop_front());
      m_uart++;
    end
    check(!uart_rx_err, "no UART frame error");
  end

  task automatic uart_send(logic [7:0] b);
    while (!uart_tx_ready) tick();
    uart_tx_valid = 1; uart_tx_data = b;
    uart_sent.push_back(b);
    tick();
    uart_tx_valid = 0;
  endtask

  // ----------------------------------------------------------------- main
  task automatic drain();
    traffic_on = 0;
    tick(5);
    while (busy != 0) tick();
    tick(400);
  endtask

  initial begin
    logic [31:0] v, v2;
    longint pe_cycle [2];
    for (int k = 0; k < NC; k++) begin
      htm_state[k] = HTM_IDLE; htm_abort_cause[k] = ABORT_NONE; htm_abort_core[k] = '0;
      inv_addr[k] = '0; sw_ev_type[k] = '0; sw_ev_data[k] = '0;
      cum[k] = 0; off[k] = 0; calibrated[k] = 0;
      foreach (cnt0[k][t]) begin cnt0[k][t] = 0; cur_cnt[k][t] = 0; prev_cnt[k][t] = 0; end
    end
    inv_valid = '0; sw_ev_valid = '0; lock_req = '0;
    mem_req_valid = 0; mem_req_write = 0; mem_req_addr = '0; mem_req_wdata = '0; mem_req_src = '0;
    uart_tx_valid = 0; uart_tx_data = '0;
    wait (m_reset_seq == 1);
    tick(10);
    for (int k = 0; k < NC; k++) fork automatic int kk = k; core_model(kk); join_none
    fork mem_traffic(); join_none

    // phase 1: transactions, memory traffic, UART
    traffic_on = 1;
    fork
      begin uart_send(8'hA5); uart_send(8'h3C); uart_send(8'($urandom)); end
      tick(PHASE1);
    join
    drain();
    $display("phase 1 done at cycle %0d", cyc);
    for (int k = 0; k < NC; k++) check(exp_hw[k].size() == 0 && exp_iv[k].size() == 0 && exp_sw[k].size() == 0,
                                     $sformatf("core %0d: all events delivered", k));

    // phase 2: a quiet gap longer than the 20-bit delta timestamp
    tick(1 << 20);
    tick(200);
    check(m_overflow >= NC, "every core logged an overflow event");

    $display("phase 2 done at cycle %0d", cyc);
    // phase 3: traffic again; timestamps must still line up
    traffic_on = 1;
    tick(PHASE3);
    drain();
    for (int k = 0; k < NC; k++) begin
      check(exp_hw[k].size() == 0 && exp_iv[k].size() == 0 && exp_sw[k].size() == 0,
            $sformatf("core %0d: all events delivered", k));
      check(trace_lost[k] == 0, "no trace event dropped");
    end
    foreach (inv_rx_count[a]) check(inv_rx_count[a] == NC - 1, "invalidation seen by every other core");

    $display("phase 3 done at cycle %0d", cyc);
    // counters since reset, including the global sum
    for (int t = 0; t < 11; t++) begin
      automatic int sum = 0;
      for (int k = 0; k < NC; k++) begin
        stats_read(cnt_addr(0, k, t), v);
        check(v == cnt0[k][t], $sformatf("level 0 core %0d type %0d: %0d vs %0d", k, t, v, cnt0[k][t]));
        sum += cnt0[k][t];
      end
      stats_read(cnt_addr(0, NC, t), v);
      check(v == sum, $sformatf("global level 0 type %0d", t));
    end

    // previous-period counters, read right after a period ends
    @(posedge clk_sys iff stats_period_end);
    #1;
    stats_read(STATS_BASE + 32'h004, v);
    for (int k = 0; k <= NC; k++)
      for (int t = 0; t < 11; t++) begin
        automatic int e = 0;
        if (k < NC) e = prev_cnt[k][t];
        else for (int j = 0; j < NC; j++) e += prev_cnt[j][t];
        stats_read(cnt_addr(2, k, t), v2);
        check(v2 == e, $sformatf("level 2 core %0d type %0d: %0d vs %0d", k, t, v2, e));
        if (e > 0) m_level2++;
      end
    stats_read(STATS_BASE + 32'h004, v2);
    check(v2 == v, "previous-period counters read within one period");

    // new period length, applied by a statistics reset
    stats_write(STATS_BASE + 32'h014, 32'd500);
    stats_read(STATS_BASE + 32'h014, v);
    check(v == 500, "period length register");
    stats_write(STATS_BASE + 32'h010, 32'd1);
    stats_read(STATS_BASE + 32'h004, v);
    check(v == 0, "period number cleared by reset");
    stats_read(cnt_addr(0, 0, EV_START), v);
    check(v == 0, "counters cleared by reset");
    for (int n = 0; n < 2; n++) begin
      @(posedge clk_sys iff stats_period_end);
      pe_cycle[n] = cyc;
    end
    check(pe_cycle[1] - pe_cycle[0] == 500, $sformatf("new period length %0d", pe_cycle[1] - pe_cycle[0]));
    m_perlen++;
    tick(5);
    check(uart_sent.size() == 0, "all UART bytes received");

    $display("mechanisms: reset_seq=%0d start=%0d commit=%0d abort=%0d try_lock=%0d lock_success=%0d",
             m_reset_seq, m_start, m_commit, m_abort, m_trylock, m_locksucc);
    $display("  inv_event=%0d sw_event=%0d overflow=%0d buffered=%0d inv_priority=%0d inv_rx=%0d",
             m_inv_ev, m_sw_ev, m_overflow, m_buffered, m_inv_priority, m_inv_rx);
    $display("  lock_handover=%0d lock_wait=%0d period_end=%0d level2=%0d ddr_rbeat=%0d ddr_wbeat=%0d",
             m_handover, m_lock_wait, m_period_end, m_level2, m_ddr_rbeat, m_ddr_wbeat);
    $display("  bram=%0d stats_read=%0d uart=%0d period_len=%0d",
             m_bram, m_stats_rd, m_uart, m_perlen);
    check(m_reset_seq > 0, "mechanism: reset sequence");
    check(m_start > 0, "mechanism: start event");
    check(m_commit > 0, "mechanism: commit event");
    check(m_abort > 0, "mechanism: abort event");
    check(m_trylock > 0, "mechanism: try-lock event");
    check(m_locksucc > 0, "mechanism: lock-success event");
    check(m_inv_ev > 0, "mechanism: invalidation event");
    check(m_sw_ev > 0, "mechanism: software event");
    check(m_overflow > 0, "mechanism: overflow event");
    check(m_buffered > 0, "mechanism: events buffered in the log unit");
    check(m_inv_priority > 0, "mechanism: invalidation ahead of a waiting event");
    check(m_inv_rx > 0, "mechanism: invalidation delivered");
    check(m_handover > 0, "mechanism: bus lock hand-over");
    check(m_lock_wait > 0, "mechanism: bus lock contention");
    check(m_period_end > 0, "mechanism: sampling period end");
    check(m_level2 > 0, "mechanism: previous-period counters");
    check(m_ddr_rbeat > 0, "mechanism: DDR2 read beats across clock domains");
    check(m_ddr_wbeat > 0, "mechanism: DDR2 write beats across clock domains");
    check(m_bram > 0, "mechanism: loader RAM access");
    check(m_stats_rd > 0, "mechanism: statistics register read");
    check(m_uart > 0, "mechanism: UART byte");
    check(m_perlen > 0, "mechanism: new sampling period length");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
