// uart_tb: the UART at 1 MHz and 100 kbaud (10 cycles per bit).  An
// independent serial decoder checks every transmitted frame bit by bit at
// the nominal bit times; an independent serial encoder sends frames to the
// receiver, some with a broken stop bit and some with a 3 % slower bit rate;
// finally txd is looped back to rxd for a stream of bytes.
module uart_tb;
  localparam int CLK_HZ = 1_000_000, BAUD = 100_000, BIT = 10;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, tx_valid, tx_ready, txd, rxd, rx_valid, rx_frame_err, loop;
  logic [7:0] tx_data, rx_data;
  logic rxd_drv;
  int checks = 0, failures = 0;

  assign rxd = loop ? txd : rxd_drv;
  uart #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);

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

  // receiver-side bookkeeping
  logic [7:0] rxq [$];
  int got = 0, errs = 0;
  always @(posedge clk) if (!rst) begin
    if (rx_valid) begin
      got++; checks++;
      if (rxq.size() == 0 || rxq[0] != rx_data) begin failures++; $display("FAIL rx %h exp %h n=%0d t=%0t", rx_data, rxq.size() ? rxq[0] : 8'hxx, rxq.size(), $time); end
      else void'(rxq.pop_front());
    end
    if (rx_frame_err) errs++;
  end

  task automatic send_frame(logic [7:0] b, bit good_stop, int bit_time);
    logic [9:0] f = {good_stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin rxd_drv = f[i]; #(bit_time * 10); end
    rxd_drv = 1; #(bit_time * 10 * 2);
  endtask

  initial begin
    rst = 1; tx_valid = 0; tx_data = 0; rxd_drv = 1; loop = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    check(txd == 1'b1 && tx_ready, "idle line high");
    // transmit: decode independently
    for (int k = 0; k < 20; k++) begin
      automatic logic [7:0] b = 8'($urandom);
      tx_valid = 1; tx_data = b;
      @(posedge clk); #1 tx_valid = 0;
      check(!tx_ready, "busy while sending");
      // start bit begins at this edge; sample mid-bit
      #(BIT * 10 / 2 - 1);
      check(txd == 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin #(BIT * 10); check(txd == b[i], $sformatf("data bit %0d", i)); end
      #(BIT * 10); check(txd == 1'b1, "stop bit");
      while (!tx_ready) @(posedge clk);
      #1;
    end
    // receive from an independent encoder
    for (int k = 0; k < 30; k++) begin
      automatic logic [7:0] b = 8'($urandom);
      automatic bit good = (k % 5 != 4);
      if (good) rxq.push_back(b);
      send_frame(b, good, 10);
    end
    check(errs == 6, $sformatf("frame errors %0d", errs));
    // slightly slow sender (bit time 10.3 cycles)
    for (int k = 0; k < 5; k++) begin
      automatic logic [7:0] b = 8'($urandom);
      automatic logic [9:0] f = {1'b1, b, 1'b0};
      rxq.push_back(b);
      for (int i = 0; i < 10; i++) begin rxd_drv = f[i]; #103; end
      rxd_drv = 1; #200;
    end
    // loopback stream
    loop = 1;
    for (int k = 0; k < 20; k++) begin
      automatic logic [7:0] b = 8'($urandom);
      while (!tx_ready) begin @(posedge clk); #1; end
      rxq.push_back(b);
      tx_valid = 1; tx_data = b;
      @(posedge clk); #1 tx_valid = 0;
    end
    repeat (300) @(posedge clk);
    check(rxq.size() == 0, "every good frame received");
    check(got == 24 + 5 + 20, $sformatf("received %0d", got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
