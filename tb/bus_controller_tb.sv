// bus_controller_tb: the bus controller with a DDR2 queue model, a register
// model for the statistics window and a RAM model for the loader window.
// Random quad-word reads and writes go to DDR2 addresses, the statistics
// registers and the loader RAM; every read is compared with a reference
// memory kept by the testbench.  Every DDR2 command must be aligned to a
// 32-byte burst, every write burst must unmask exactly the requested beat,
// and register writes must carry the big-endian word lane.  The bus lock is
// driven with random requests: the grant must be one-hot, go only to a
// requester, stay with its holder while requested, and reach every waiting
// core within NUM_CORES hand-overs.
module bus_controller_tb;
  localparam int NC = 8, LW = 512;
  localparam logic [31:0] STATS_BASE = 32'h0FFF_F000, LOADER_BASE = 32'h0FFF_C000;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;
  logic req_valid, req_ready, req_write, resp_valid, resp_write;
  logic [31:0] req_addr;
  logic [127:0] req_wdata, resp_rdata;
  logic [3:0] req_src, resp_src;
  logic ddr_cmd_valid, ddr_cmd_ready, ddr_cmd_write, ddr_wd_valid, ddr_wd_ready;
  logic [31:0] ddr_cmd_addr;
  logic [127:0] ddr_wd_data, ddr_rd_data, bram_wdata, bram_rdata;
  logic [15:0] ddr_wd_mask;
  logic ddr_rd_valid, ddr_rd_ready;
  logic stats_valid, stats_write, stats_rvalid, bram_en, bram_we;
  logic [11:0] stats_addr;
  logic [31:0] stats_wdata, stats_rdata;
  logic [8:0] bram_addr;
  logic [NC-1:0] lock_req, lock_grant;
  int checks = 0, failures = 0;

  bus_controller dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- DDR2 model: 128-bit beats, two per burst
  logic [127:0] ddr_mem [logic [27:0]];
  logic [127:0] rdq [$];
  int rd_delay = 0, wd_left = 0;
  logic [31:0] wr_burst_addr;
  int unmasked_beats = 0, ddr_cmds = 0;

  function automatic logic [127:0] ddr_get(logic [31:0] a);
    return ddr_mem.exists(a[31:4]) ? ddr_mem[a[31:4]] : {4{a}};
  endfunction

  logic cmd_ok;
  always @(posedge clk) cmd_ok <= ($urandom % 4 != 0);
  assign ddr_cmd_ready = (wd_left == 0) && cmd_ok;
  // outputs driven from the model's state after each update
  task automatic drive_outputs();
    ddr_wd_ready = (wd_left > 0);
    ddr_rd_valid = (rdq.size() > 0) && (rd_delay == 0);
    ddr_rd_data  = (rdq.size() > 0) ? rdq[0] : '0;
  endtask

  // The model samples the handshakes at the clock edge and changes its
  // outputs just after it, like registered logic.
  always @(posedge clk) if (!rst) begin
    automatic bit rd_hs  = ddr_rd_valid && ddr_rd_ready;
    automatic bit cmd_hs = ddr_cmd_valid && ddr_cmd_ready;
    automatic bit wd_hs  = ddr_wd_valid && ddr_wd_ready;
    automatic logic cmd_w = ddr_cmd_write;
    automatic logic [31:0] cmd_a = ddr_cmd_addr;
    automatic logic [15:0] wmask = ddr_wd_mask;
    automatic logic [127:0] wdata = ddr_wd_data;
    #1;
    if (rd_delay > 0) rd_delay--;
    if (rd_hs) void'(rdq.pop_front());
    if (cmd_hs) begin
      ddr_cmds++;
      check(cmd_a[4:0] == 5'b0, "burst-aligned command");
      if (cmd_w) begin wd_left = 2; wr_burst_addr = cmd_a; unmasked_beats = 0; end
      else begin
        rdq.push_back(ddr_get(cmd_a));
        rdq.push_back(ddr_get(cmd_a + 16));
        rd_delay = 5 + $urandom % 10;
      end
    end else if (wd_hs) begin
      automatic logic [31:0] a = wr_burst_addr + (wd_left == 1 ? 16 : 0);
      automatic logic [127:0] old = ddr_get(a);
      for (int b = 0; b < 16; b++) if (!wmask[b]) old[b*8 +: 8] = wdata[b*8 +: 8];
      ddr_mem[a[31:4]] = old;
      if (wmask == 16'h0000) unmasked_beats++;
      else check(wmask == 16'hFFFF, "mask all or nothing");
      wd_left--;
      if (wd_left == 0) check(unmasked_beats == 1, "exactly one beat written");
    end
    drive_outputs();
  end

  // ---------------- register and loader RAM models
  logic [31:0] regs [1024];
  logic [127:0] bram [LW];
  always @(posedge clk) begin
    stats_rvalid <= stats_valid && !stats_write;
    if (stats_valid && !stats_write) stats_rdata <= regs[stats_addr[11:2]];
    if (stats_valid && stats_write) regs[stats_addr[11:2]] <= stats_wdata;
    if (bram_en && bram_we) bram[bram_addr] <= bram_wdata;
    if (bram_en && !bram_we) bram_rdata <= bram[bram_addr];
  end

  // ---------------- reference memory (quad-words), register file
  logic [127:0] ref_q [logic [27:0]];
  logic [31:0] ref_reg [1024];

  function automatic logic [127:0] ref_read(logic [31:0] a);
    if (a >= STATS_BASE) return {4{ref_reg[a[11:2]]}};
    if (a >= LOADER_BASE && a < LOADER_BASE + LW * 16) return ref_q.exists(a[31:4]) ? ref_q[a[31:4]] : '0;
    return ref_q.exists(a[31:4]) ? ref_q[a[31:4]] : {4{a & 32'hFFFF_FFF0}};
  endfunction

  int n_ddr = 0, n_stats = 0, n_bram = 0;

  task automatic do_req(bit w, logic [31:0] a, logic [127:0] d);
    logic [127:0] expected;
    req_valid = 1; req_write = w; req_addr = a; req_wdata = d; req_src = 4'($urandom);
    while (!req_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1 req_valid = 0;
    expected = ref_read(a);
    if (w) begin
      if (a >= STATS_BASE) ref_reg[a[11:2]] = d[127 - 32 * a[3:2] -: 32];
      else ref_q[a[31:4]] = d;
    end
    while (!resp_valid) begin @(posedge clk); #1; end
    check(resp_write == w, "response kind");
    check(resp_src == req_src, "response source");
    if (!w) check(resp_rdata == expected, $sformatf("read %h: %h vs %h", a, resp_rdata, expected));
    @(posedge clk); #1;
  endtask

  // ---------------- bus lock checker
  int wait_handover [NC];
  int handovers = 0, max_wait = 0;
  logic [NC-1:0] prev_grant, prev_req;
  always @(posedge clk) if (!rst) begin
    check($onehot0(lock_grant), "grant one-hot");
    check((lock_grant & ~prev_req & ~prev_grant) == 0, "grant only to a requester");
    if ((prev_grant & prev_req) != 0) check(lock_grant == prev_grant, "holder keeps the lock");
    if (lock_grant != prev_grant && lock_grant != 0) begin
      handovers++;
      for (int i = 0; i < NC; i++) if (lock_req[i] && !lock_grant[i]) wait_handover[i]++;
      for (int i = 0; i < NC; i++) if (lock_grant[i]) wait_handover[i] = 0;
    end
    for (int i = 0; i < NC; i++) if (wait_handover[i] > max_wait) max_wait = wait_handover[i];
    prev_grant = lock_grant;
    prev_req   = lock_req;
  end

  // lock requesters: request, hold a few cycles after grant, release
  int hold [NC];
  always @(posedge clk) begin
    if (rst) begin lock_req <= '0; for (int i = 0; i < NC; i++) hold[i] = 0; end
    else for (int i = 0; i < NC; i++) begin
      if (!lock_req[i]) lock_req[i] <= ($urandom % 100) < 10;
      else if (lock_grant[i]) begin
        hold[i]++;
        if (hold[i] > 3) begin lock_req[i] <= 1'b0; hold[i] = 0; end
      end
    end
  end

  initial begin
    drive_outputs();
    rst = 1; req_valid = 0; req_write = 0; req_addr = 0; req_wdata = 0; req_src = 0;
    prev_grant = '0; prev_req = '0;
    for (int i = 0; i < 1024; i++) begin regs[i] = 32'(i * 7); ref_reg[i] = 32'(i * 7); end
    for (int i = 0; i < LW; i++) bram[i] = '0;
    for (int i = 0; i < NC; i++) wait_handover[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 1500; i++) begin
      automatic int kind = $urandom % 10;
      automatic logic [31:0] a;
      if (kind < 6) begin a = 32'h0001_0000 + 32'($urandom % 64) * 16; n_ddr++; end
      else if (kind < 8) begin a = STATS_BASE + 32'($urandom % 16) * 4; n_stats++; end
      else begin a = LOADER_BASE + 32'($urandom % LW) * 16; n_bram++; end
        do_req($urandom % 2, a, {$urandom, $urandom, $urandom, $urandom});
    end
    check(n_ddr > 100 && n_stats > 100 && n_bram > 100, "all windows used");
    check(handovers > 50, "bus lock handed over");
    check(max_wait < NC, $sformatf("no starvation (max wait %0d hand-overs)", max_wait));
    $display("ddr=%0d stats=%0d bram=%0d handovers=%0d max_wait=%0d", n_ddr, n_stats, n_bram, handovers, max_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
