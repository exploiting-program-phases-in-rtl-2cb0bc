// ring_node_tb: a ring of three core nodes and one event-sink node.
// Random invalidations and events are offered by all cores.  Checks: every
// invalidation is shown exactly once to every other core and never to its
// sender; every event reaches the sink exactly once with its sender id, in
// the order each core sent them; an event never takes a slot in a cycle in
// which its core offers an invalidation; and the ring drains empty.
module ring_node_tb;
  import tm_trace_pkg::*;
  localparam int N = 3;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;
  int checks = 0, failures = 0;

  ring_msg_t link [N+1];
  logic [N-1:0] inv_valid, inv_ready, ev_valid, ev_ready, rx_inv_valid;
  logic [31:0] inv_addr [N], ev_word [N], rx_inv_addr [N];
  logic [3:0]  rx_inv_sender [N];
  logic sink_valid;
  logic [3:0] sink_sender;
  logic [31:0] sink_word;

  ring_node #(.NODE_ID(4'hF), .SINK_EVENTS(1'b1)) u_sink (
    .clk, .rst, .ring_in(link[N]), .ring_out(link[0]),
    .inv_valid(1'b0), .inv_addr('0), .inv_ready(),
    .ev_valid(1'b0), .ev_word('0), .ev_ready(),
    .rx_inv_valid(), .rx_inv_addr(), .rx_inv_sender(),
    .sink_valid, .sink_sender, .sink_word);

  for (genvar i = 0; i < N; i++) begin : g
    ring_node #(.NODE_ID(4'(i)), .SINK_EVENTS(1'b0)) u (
      .clk, .rst, .ring_in(link[i]), .ring_out(link[i+1]),
      .inv_valid(inv_valid[i]), .inv_addr(inv_addr[i]), .inv_ready(inv_ready[i]),
      .ev_valid(ev_valid[i]), .ev_word(ev_word[i]), .ev_ready(ev_ready[i]),
      .rx_inv_valid(rx_inv_valid[i]), .rx_inv_addr(rx_inv_addr[i]),
      .rx_inv_sender(rx_inv_sender[i]),
      .sink_valid(), .sink_sender(), .sink_word());
  end

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

  // seen[addr] counts deliveries per receiving core
  int seen [int][N];
  int inv_sent_n = 0, ev_sent_n = 0, ev_got_n = 0, blocked_ev = 0;
  logic [31:0] evq [N][$];
  logic [31:0] next_addr = 32'h1000;
  bit running = 0;

  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < N; i++) begin
      if (inv_valid[i] && inv_ready[i]) begin
        inv_sent_n++;
        for (int k = 0; k < N; k++) seen[int'(inv_addr[i])][k] = 0;
      end
      if (ev_valid[i] && ev_ready[i]) begin
        ev_sent_n++;
        evq[i].push_back(ev_word[i]);
        checks++;
        if (inv_valid[i]) begin failures++; $display("FAIL event beat an invalidation"); end
      end
      if (ev_valid[i] && !ev_ready[i]) blocked_ev++;
      if (rx_inv_valid[i]) begin
        checks++;
        if (rx_inv_sender[i] == 4'(i)) begin failures++; $display("FAIL own invalidation shown"); end
        seen[int'(rx_inv_addr[i])][i]++;
      end
    end
    if (sink_valid) begin
      ev_got_n++;
      checks++;
      if (sink_sender >= N || evq[sink_sender].size() == 0 || evq[sink_sender][0] != sink_word) begin
        failures++; $display("FAIL event order/sender %0d %h", sink_sender, sink_word);
      end else void'(evq[sink_sender].pop_front());
    end
  end

  initial begin
    rst = 1; inv_valid = '0; ev_valid = '0;
    for (int i = 0; i < N; i++) begin inv_addr[i] = '0; ev_word[i] = '0; end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 5000; c++) begin
      for (int i = 0; i < N; i++) begin
        // hold an offer until taken, then maybe make a new one
        if (!(inv_valid[i] && !inv_ready[i])) begin
          inv_valid[i] = ($urandom % 100) < 12;
          inv_addr[i]  = next_addr; next_addr += 16;
        end
        if (!(ev_valid[i] && !ev_ready[i])) begin
          ev_valid[i] = ($urandom % 100) < 30;
          ev_word[i]  = $urandom;
        end
      end
      @(posedge clk); #1;
    end
    inv_valid = '0; ev_valid = '0;
    repeat (20) @(posedge clk); #1;
    foreach (seen[a]) for (int k = 0; k < N; k++) begin
      // the sender's own entry stays 0, everyone else's is exactly 1
      checks++;
      if (seen[a][k] > 1) begin failures++; $display("FAIL addr %h seen %0d times by %0d", a, seen[a][k], k); end
    end
    begin
      int total = 0;
      foreach (seen[a]) for (int k = 0; k < N; k++) total += seen[a][k];
      check(total == inv_sent_n * (N - 1), $sformatf("deliveries %0d vs %0d", total, inv_sent_n * (N - 1)));
    end
    check(ev_got_n == ev_sent_n, "every event reached the sink");
    check(inv_sent_n > 100, "invalidations were accepted");
    check(ev_sent_n > 100, "events were accepted");
    for (int i = 0; i < N; i++) check(evq[i].size() == 0, "no event left undelivered");
    for (int i = 0; i <= N; i++) check(link[i].mtype == MSG_EMPTY, "ring drained");
    check(blocked_ev > 0, "events had to wait for a slot");
    $display("inv=%0d ev=%0d blocked=%0d", inv_sent_n, ev_sent_n, blocked_ev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
