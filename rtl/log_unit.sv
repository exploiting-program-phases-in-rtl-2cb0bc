// log_unit: timestamps the events of one core and feeds them to the ring as
// low-priority traffic.
//
// A counter runs since the last logged event.  When the event generation unit
// hands over an event, the log unit stores {data, type, delta} in its FIFO,
// where delta is the number of cycles since the previous stored event of this
// core (delta encoding, 20 bits).  The first event after reset carries the
// cycles since reset.  If the counter reaches 2^20-1 with no event, an Overflow
// no-op event with delta 2^20-1 is stored instead, so the sum of all deltas
// always equals elapsed time and the stream never loses its time base.
// The FIFO (32 entries by default) holds events while the ring is busy with
// higher-priority traffic: the head is offered on tx_valid/tx_word and leaves
// when the ring node answers tx_ready, which it does only for an idle slot.
// An event that arrives while the FIFO is full is dropped and counted in
// lost_count; the delta counter then keeps running so the next stored event
// still carries the right elapsed time (saturating at 2^20-1).
// Delta encoding, the overflow event, the 32-entry buffer and the send-when-
// idle rule follow the tracing design; the drop counter is this design's own.
// Timing: an event offered in cycle t is in the FIFO at t+1 and can be on the
// ring from t+1.  Synchronous active-high reset.
module log_unit
  import tm_trace_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ev_valid,
  input  event_t      ev,
  // to the ring node
  output logic        tx_valid,
  output logic [31:0] tx_word,
  input  logic        tx_ready,
  // status
  output logic [$clog2(DEPTH):0] fill,
  output logic [15:0] lost_count,
  output logic        overflow_ev      // pulse: an Overflow event was logged
);
  logic [TS_W-1:0] since;
  logic            push;
  stamped_event_t  push_ev, head_ev;
  logic            full, empty;
  logic [$bits(stamped_event_t)-1:0] head_bits;

  always_comb begin
    push        = 1'b0;
    overflow_ev = 1'b0;
    push_ev     = '{data: ev.data, ev_type: ev.ev_type, delta: since};
    if (ev_valid) begin
      push = !full;
    end else if (since == TS_MAX) begin
      push        = !full;
      overflow_ev = !full;
      push_ev     = '{data: '0, ev_type: EV_OVERFLOW, delta: TS_MAX};
    end
  end

  log_fifo #(.WIDTH($bits(stamped_event_t)), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst,
    .wr_en   (push),
    .wr_data (push_ev),
    .rd_en   (tx_valid && tx_ready),
    .rd_data (head_bits),
    .full, .empty,
    .count   (fill)
  );

  assign head_ev  = stamped_event_t'(head_bits);
  assign tx_valid = !empty;
  assign tx_word  = pack_event(head_ev);

  always_ff @(posedge clk) begin
    if (rst) begin
      since      <= '0;
      lost_count <= '0;
    end else begin
      if (push)                 since <= TS_W'(1);
      else if (since != TS_MAX) since <= since + 1'b1;
      if (ev_valid && full && lost_count != '1) lost_count <= lost_count + 1'b1;
    end
  end

endmodule
