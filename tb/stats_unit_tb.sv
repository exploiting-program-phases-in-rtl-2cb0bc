// stats_unit_tb: the statistics unit against a model of its counter levels.
// The test reads the fixed registers, sets a short sampling period and
// resets the unit, then sends random events from eight cores while reading
// random counters (per core and global) and the period/timestamp registers.
// The model keeps level 0 (since reset), level 1 (current period) and level 2
// (previous period) itself and predicts every read.  A period rollover and a
// second reset are checked too.
module stats_unit_tb;
  import tm_trace_pkg::*;
  localparam int NC = 8, NL = 3;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, ev_valid, reg_valid, reg_write, reg_rvalid, period_end;
  logic [3:0] ev_sender;
  logic [31:0] ev_word, reg_wdata, reg_rdata, period_number;
  logic [11:0] reg_addr;
  int checks = 0, failures = 0;

  stats_unit dut (.*);

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

  // model
  int unsigned m [NL][NC][16];
  int unsigned m_ts = 0, m_per = 0, m_len = 100000, m_len_cfg = 100000;
  int unsigned exp_rd;
  bit exp_pending = 0;
  int periods_seen = 0;

  function automatic int unsigned model_read(logic [11:0] a);
    if (a == 12'h000) return 32'h5354_4154;
    if (a == 12'h004) return m_per;
    if (a == 12'h008) return m_ts;
    if (a == 12'h00C) return NL;
    if (a == 12'h014) return m_len_cfg;
    if (a >= 12'h400) begin
      int l = (a - 12'h400) / 1024, c = ((a - 12'h400) % 1024) / 64, t = (a % 64) / 4;
      if (l >= NL) return 0;
      if (c < NC) return m[l][c][t];
      if (c == NC) begin
        int unsigned s = 0;
        for (int k = 0; k < NC; k++) s += m[l][k][t];
        return s;
      end
    end
    return 0;
  endfunction

  always @(posedge clk) begin
    if (!rst) begin
      if (exp_pending) begin
        check(reg_rvalid, "read answered after one cycle");
        check(reg_rdata == exp_rd, $sformatf("read data %h expected %h", reg_rdata, exp_rd));
      end
      exp_pending = 0;
      if (reg_valid && !reg_write) begin exp_rd = model_read(reg_addr); exp_pending = 1; end
      if (reg_valid && reg_write && reg_addr == 12'h014) m_len_cfg = reg_wdata;
      if (reg_valid && reg_write && reg_addr == 12'h010) begin
        m = '{default: 0}; m_ts = 0; m_per = 0; m_len = m_len_cfg;
      end else begin
        automatic int t = ev_word[27:24];
        automatic bit pe = (m_ts + 1 >= m_len);
        check(period_end == pe, "period_end pulse");
        if (ev_valid && ev_sender < NC) begin
          m[0][ev_sender][t]++;
          m[1][ev_sender][t]++;
        end
        if (pe) begin
          periods_seen++;
          m[2] = m[1];
          m[1] = '{default: 0};
          m_ts = 0; m_per++;
        end else m_ts++;
      end
    end
  end

  task automatic rd(logic [11:0] a);
    reg_valid = 1; reg_write = 0; reg_addr = a;
    @(posedge clk); #1; reg_valid = 0;
  endtask

  task automatic wr(logic [11:0] a, logic [31:0] d);
    reg_valid = 1; reg_write = 1; reg_addr = a; reg_wdata = d;
    @(posedge clk); #1; reg_valid = 0; reg_write = 0;
  endtask

  function automatic logic [11:0] cnt_addr(int l, int c, int t);
    return 12'(12'h400 + l * 1024 + c * 64 + t * 4);
  endfunction

  initial begin
    rst = 1; ev_valid = 0; ev_sender = 0; ev_word = 0;
    reg_valid = 0; reg_write = 0; reg_addr = 0; reg_wdata = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    rd(12'h000); rd(12'h00C); rd(12'h014); rd(12'h004);
    wr(12'h014, 32'd97);
    rd(12'h014);
    wr(12'h010, 32'd0);             // reset: the new period length applies
    for (int c = 0; c < 6000; c++) begin
      ev_valid  = ($urandom % 100) < 60;
      ev_sender = 4'($urandom % (NC + 1));       // sender 8 does not exist
      ev_word   = {4'h0, 4'($urandom % 8), 24'($urandom)};
      if ($urandom % 3 == 0) begin
        automatic int sel = $urandom % 10;
        if (sel < 7) rd(cnt_addr($urandom % NL, $urandom % (NC + 1), $urandom % 8));
        else if (sel < 9) rd(12'h004 + 12'($urandom % 2) * 4);
        else rd(12'h000);
      end else begin
        @(posedge clk); #1;
      end
    end
    ev_valid = 0;
    // full sweep of level 2 and global views
    for (int l = 0; l < NL; l++) for (int cc = 0; cc <= NC; cc++) rd(cnt_addr(l, cc, 1));
    wr(12'h010, 0);
    rd(cnt_addr(0, 3, 1)); rd(12'h004);
    @(posedge clk); #1;
    check(periods_seen > 20, "many sampling periods");
    check(period_number == 0, "period number cleared by reset");
    $display("periods=%0d", periods_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
