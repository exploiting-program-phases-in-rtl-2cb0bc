// ring_node: one stop on the unidirectional invalidation/event ring.
//
// Every node holds one message register; each cycle the message from the
// previous node either moves on to the next node or is taken off the ring
// here.  Two kinds of messages share the ring:
//   * invalidations (high priority): a core announces a written address.  The
//     message visits every other node, which shows it to its core on
//     rx_inv_*, and is removed when it comes back to its sender.
//   * tracing events (low priority): the packed event word from the core's
//     log unit.  They travel to the node built with SINK_EVENTS=1, which hands
//     them to the statistics unit on sink_* and removes them.
// A node may insert a message only into a free slot: an empty one or one it
// is removing in this cycle.  An invalidation from the core always wins; the
// log unit's event gets the slot only if the core offers no invalidation, so
// tracing never delays the program's own ring traffic.  inv_ready/ev_ready
// say that the offered message was placed in the cycle it was offered.
// The two message classes, their priority and the use of idle slots follow
// the tracing design; the slot discipline (sender-removes, sink-removes) is
// this design's choice.  Latency: one cycle per node.  Synchronous reset
// empties the slot.  In a node built with SINK_EVENTS=0 sink_valid is constant
// zero and the top leaves the sink_* outputs unconnected, so synthesis reports
// them as idle; they exist so that every node has the same ports.
module ring_node
  import tm_trace_pkg::*;
#(
  parameter logic [CORE_ID_W-1:0] NODE_ID = '0,
  parameter bit SINK_EVENTS = 1'b0
) (
  input  logic       clk,
  input  logic       rst,
  input  ring_msg_t  ring_in,
  output ring_msg_t  ring_out,
  // invalidation from the core (high priority)
  input  logic       inv_valid,
  input  logic [31:0] inv_addr,
  output logic       inv_ready,
  // event word from the log unit (low priority)
  input  logic       ev_valid,
  input  logic [31:0] ev_word,
  output logic       ev_ready,
  // invalidations of other cores, shown to this core
  output logic       rx_inv_valid,
  output logic [31:0] rx_inv_addr,
  output logic [CORE_ID_W-1:0] rx_inv_sender,
  // events taken off the ring (SINK_EVENTS nodes only)
  output logic       sink_valid,
  output logic [CORE_ID_W-1:0] sink_sender,
  output logic [31:0] sink_word
);
  logic remove_own_inv, remove_event, slot_free;
  ring_msg_t next_msg;

  assign remove_own_inv = (ring_in.mtype == MSG_INV) && (ring_in.sender == NODE_ID);
  assign remove_event   = SINK_EVENTS && (ring_in.mtype == MSG_EVENT);
  assign slot_free      = (ring_in.mtype == MSG_EMPTY) || remove_own_inv || remove_event;

  assign inv_ready = slot_free;
  assign ev_ready  = slot_free && !inv_valid;

  assign rx_inv_valid  = (ring_in.mtype == MSG_INV) && !remove_own_inv;
  assign rx_inv_addr   = ring_in.payload;
  assign rx_inv_sender = ring_in.sender;

  assign sink_valid  = remove_event;
  assign sink_sender = ring_in.sender;
  assign sink_word   = ring_in.payload;

  always_comb begin
    next_msg = ring_in;
    if (inv_valid && slot_free)
      next_msg = '{mtype: MSG_INV, sender: NODE_ID, payload: inv_addr};
    else if (ev_valid && ev_ready)
      next_msg = '{mtype: MSG_EVENT, sender: NODE_ID, payload: ev_word};
    else if (slot_free)
      next_msg = '{mtype: MSG_EMPTY, sender: '0, payload: '0};
  end

  always_ff @(posedge clk) begin
    if (rst) ring_out <= '{mtype: MSG_EMPTY, sender: '0, payload: '0};
    else     ring_out <= next_msg;
  end

  // A sink node never puts events of its own on the ring.
  assert property (@(posedge clk) disable iff (rst) SINK_EVENTS |-> !ev_valid);
endmodule
