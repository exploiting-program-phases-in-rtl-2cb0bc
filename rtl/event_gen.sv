// event_gen: event generation unit of one core.
//
// The unit sits between the core and the ring and turns transactional-memory
// activity into a stream of small events, one per state change.  It has three
// sources:
//   * the HTM unit state (idle, running, try-lock, committing).  Every change
//     of state is an event: idle->running is Start (data = hardware mode),
//     ->try-lock is Try Lock, ->committing is Lock Success, committing->idle is
//     Commit, and running/try-lock->idle is Abort, whose data carries the abort
//     cause in [3:0] and the core that caused it in [7:4].  Watching the state
//     costs the traced program nothing.
//   * invalidations: a pulse on inv_sent when this core's write invalidation
//     leaves on the ring gives an Invalidation event.
//   * software events from the xevent1..xevent4 instructions, used by the
//     software TM runtime; sw_ev_valid/sw_ev_ready is a valid/ready handshake
//     that accepts an event in the cycle it is offered unless one is still
//     waiting, so each traced software state change costs the core one cycle.
// Each source has a one-entry holding register.  One event per cycle leaves
// towards the log unit on ev_valid/ev, one cycle after its cause, chosen by
// the fixed priority HTM state > invalidation > software.  The HTM register
// always drains, so state events are never lost; an invalidation that finds
// its register still full is dropped and flagged on inv_lost.
// The event set and what the unit watches follow the tracing design; the
// encodings, the priority order and the holding registers are this design's
// own choices.  Synchronous active-high reset.
module event_gen
  import tm_trace_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // HTM unit
  input  htm_state_e  htm_state,
  input  abort_cause_e htm_abort_cause,   // valid when the state falls back to idle
  input  logic [CORE_ID_W-1:0] htm_abort_core,
  // invalidation sent by this core
  input  logic        inv_sent,
  // software event instruction
  input  logic        sw_ev_valid,
  input  logic [EV_TYPE_W-1:0] sw_ev_type,
  input  logic [EV_DATA_W-1:0] sw_ev_data,
  output logic        sw_ev_ready,
  // to the log unit
  output logic        ev_valid,
  output event_t      ev,
  output logic        inv_lost
);
  htm_state_e prev_state;
  logic       hw_new;
  event_t     hw_new_ev;

  logic   hw_pend, inv_pend, sw_pend;
  event_t hw_ev_q, sw_ev_q;
  logic   take_hw, take_inv, take_sw;

  // Decode a change of HTM state into an event.
  always_comb begin
    hw_new    = 1'b0;
    hw_new_ev = '{ev_type: EV_START, data: '0};
    if (htm_state != prev_state) begin
      hw_new = 1'b1;
      unique case (htm_state)
        HTM_RUNNING:    hw_new_ev = '{ev_type: EV_START, data: MODE_HW};
        HTM_TRY_LOCK:   hw_new_ev = '{ev_type: EV_TRY_LOCK, data: '0};
        HTM_COMMITTING: hw_new_ev = '{ev_type: EV_LOCK_SUCCESS, data: '0};
        HTM_IDLE: begin
          if (prev_state == HTM_COMMITTING)
            hw_new_ev = '{ev_type: EV_COMMIT, data: '0};
          else
            hw_new_ev = '{ev_type: EV_ABORT,
                          data: {htm_abort_core, 4'(htm_abort_cause)}};
        end
        default: hw_new = 1'b0;
      endcase
      // A step back from committing to running/try-lock is not a legal HTM
      // transition and produces no event.
      if (prev_state == HTM_COMMITTING && htm_state != HTM_IDLE) hw_new = 1'b0;
    end
  end

  // Fixed-priority selection of one waiting event.
  assign take_hw  = hw_pend;
  assign take_inv = !hw_pend && inv_pend;
  assign take_sw  = !hw_pend && !inv_pend && sw_pend;

  always_comb begin
    ev_valid = hw_pend || inv_pend || sw_pend;
    if (take_hw)       ev = hw_ev_q;
    else if (take_inv) ev = '{ev_type: EV_INVALIDATION, data: '0};
    else               ev = sw_ev_q;
  end

  assign sw_ev_ready = !sw_pend;
  assign inv_lost    = inv_sent && inv_pend && !take_inv;

  always_ff @(posedge clk) begin
    if (rst) begin
      prev_state <= HTM_IDLE;
      hw_pend    <= 1'b0;
      inv_pend   <= 1'b0;
      sw_pend    <= 1'b0;
      hw_ev_q    <= '0;
      sw_ev_q    <= '0;
    end else begin
      prev_state <= htm_state;
      hw_pend    <= hw_new;
      if (hw_new) hw_ev_q <= hw_new_ev;
      inv_pend   <= (inv_pend && !take_inv) || inv_sent;
      if (sw_ev_valid && sw_ev_ready) begin
        sw_pend <= 1'b1;
        sw_ev_q <= '{ev_type: sw_ev_type, data: sw_ev_data};
      end else if (take_sw) begin
        sw_pend <= 1'b0;
      end
    end
  end

endmodule
