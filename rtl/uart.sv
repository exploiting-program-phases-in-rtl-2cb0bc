// uart: serial link to the host PC (transmitter and receiver).
//
// The link carries single bytes with no clock line: each frame is one start
// bit (0), eight data bits least significant first and one stop bit (1), at
// a fixed symbol rate of BAUD (115200 by default).  The bit time is
// CLK_HZ/BAUD clock cycles, rounded to the nearest integer.
// Transmit: tx_valid/tx_ready handshake; a byte is accepted when the
// transmitter is idle and leaves on txd over the next ten bit times.
// Receive: rxd passes a two-flop synchronizer; a falling edge starts a frame,
// which is sampled in the middle of every bit.  rx_valid pulses for one cycle
// with rx_data when a frame ends with a valid stop bit; a frame whose stop bit
// is 0 pulses rx_frame_err instead, and the receiver then waits for the line
// to return high before it looks for the next start bit.  A start bit that is no longer low at its
// middle is treated as noise.
// The symbol rate and the start/stop framing follow the design; eight data
// bits without parity is this design's choice.  Synchronous active-high reset.
module uart #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       tx_valid,
  output logic       tx_ready,
  input  logic [7:0] tx_data,
  output logic       txd,
  input  logic       rxd,
  output logic       rx_valid,
  output logic [7:0] rx_data,
  output logic       rx_frame_err
);
  localparam int unsigned DIV  = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned CW   = $clog2(DIV + 1);

  // Transmitter.
  logic [9:0]    tx_shift;
  logic [3:0]    tx_bits;
  logic [CW-1:0] tx_cnt;

  assign tx_ready = (tx_bits == 4'd0);
  assign txd      = tx_ready ? 1'b1 : tx_shift[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_shift <= '1;
      tx_bits  <= '0;
      tx_cnt   <= '0;
    end else if (tx_ready) begin
      if (tx_valid) begin
        tx_shift <= {1'b1, tx_data, 1'b0};
        tx_bits  <= 4'd10;
        tx_cnt   <= CW'(DIV - 1);
      end
    end else if (tx_cnt == '0) begin
      tx_shift <= {1'b1, tx_shift[9:1]};
      tx_bits  <= tx_bits - 4'd1;
      tx_cnt   <= CW'(DIV - 1);
    end else begin
      tx_cnt <= tx_cnt - 1'b1;
    end
  end

  // Receiver.
  logic          r1, r2;
  logic          rx_busy;
  logic          rx_wait_high;               // after a frame error
  logic [3:0]    rx_bits;
  logic [CW-1:0] rx_cnt;
  logic [7:0]    rx_shift;

  always_ff @(posedge clk) begin
    if (rst) begin
      r1 <= 1'b1;
      r2 <= 1'b1;
      rx_busy      <= 1'b0;
      rx_wait_high <= 1'b0;
      rx_bits      <= '0;
      rx_cnt       <= '0;
      rx_shift     <= '0;
      rx_valid     <= 1'b0;
      rx_data      <= '0;
      rx_frame_err <= 1'b0;
    end else begin
      r1 <= rxd;
      r2 <= r1;
      rx_valid     <= 1'b0;
      rx_frame_err <= 1'b0;
      if (rx_wait_high) begin
        if (r2) rx_wait_high <= 1'b0;
      end else if (!rx_busy) begin
        if (!r2) begin
          rx_busy <= 1'b1;
          rx_bits <= 4'd0;
          rx_cnt  <= CW'(DIV / 2 - 1);       // to the middle of the start bit
        end
      end else if (rx_cnt != '0) begin
        rx_cnt <= rx_cnt - 1'b1;
      end else begin
        rx_cnt <= CW'(DIV - 1);
        if (rx_bits == 4'd0) begin
          if (r2) rx_busy <= 1'b0;           // glitch, not a start bit
          else    rx_bits <= 4'd1;
        end else begin
          if (rx_bits == 4'd9) begin        // stop bit
            rx_busy <= 1'b0;
            if (r2) begin
              rx_valid <= 1'b1;
              rx_data  <= rx_shift;
            end else begin
              rx_frame_err <= 1'b1;
              rx_wait_high <= 1'b1;
            end
          end else begin
            rx_shift <= {r2, rx_shift[7:1]};
            rx_bits  <= rx_bits + 4'd1;
          end
        end
      end
    end
  end
endmodule
