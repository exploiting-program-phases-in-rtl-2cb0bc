// tm_trace_pkg: types and constants shared by the event-based tracing framework
// of the hybrid transactional memory system.
//
// An event travels from the event generation unit of a core to its log unit as
// an (type, data) pair.  The log unit adds a 20-bit delta timestamp and packs
// the event into one 32-bit word that rides on the invalidation/event ring,
// tagged with the ring message type EVENT (value 3) and the sender core id.
//
// Event word layout (32 bits):
//   [31:28] data[7:4]   upper half of the event data
//   [27:24] event type  one of 16 codes (ev_type_e)
//   [23:4]  delta timestamp, cycles since the previous event of the same core
//   [3:0]   data[3:0]   lower half of the event data
// The placement of type and timestamp follows the example event stream of the
// design; the split 8-bit data field, the event codes and the abort-cause
// codes are this design's choice.
package tm_trace_pkg;

  localparam int unsigned EV_TYPE_W = 4;    // up to 16 event types
  localparam int unsigned EV_DATA_W = 8;
  localparam int unsigned TS_W      = 20;   // overflows after about one million cycles
  localparam int unsigned CORE_ID_W = 4;    // up to 16 cores on one ring
  localparam int unsigned NUM_EV_TYPES = 1 << EV_TYPE_W;
  localparam logic [TS_W-1:0] TS_MAX = '1;

  typedef enum logic [EV_TYPE_W-1:0] {
    EV_OVERFLOW     = 4'd0,  // timestamp overflow no-op
    EV_START        = 4'd1,
    EV_COMMIT       = 4'd2,
    EV_ABORT        = 4'd3,
    EV_INVALIDATION = 4'd4,
    EV_TRY_LOCK     = 4'd5,
    EV_LOCK_SUCCESS = 4'd6
  } ev_type_e;

  // Start event data: the mode the transaction runs in.
  localparam logic [EV_DATA_W-1:0] MODE_SW     = 8'd1;
  localparam logic [EV_DATA_W-1:0] MODE_HW     = 8'd2;
  localparam logic [EV_DATA_W-1:0] MODE_HYBRID = 8'd3;

  // Abort event data[3:0]: cause.  data[7:4]: core whose commit caused the abort.
  typedef enum logic [3:0] {
    ABORT_NONE     = 4'd0,
    ABORT_SOFTWARE = 4'd1,
    ABORT_CAPACITY = 4'd2,
    ABORT_CONFLICT = 4'd3
  } abort_cause_e;

  // HTM unit state as seen by the event generation unit (the four TM-related
  // states of the core's cache/TM state machine).
  typedef enum logic [1:0] {
    HTM_IDLE       = 2'd0,
    HTM_RUNNING    = 2'd1,
    HTM_TRY_LOCK   = 2'd2,
    HTM_COMMITTING = 2'd3
  } htm_state_e;

  // Event as handed from the event generation unit to the log unit.
  typedef struct packed {
    logic [EV_TYPE_W-1:0] ev_type;
    logic [EV_DATA_W-1:0] data;
  } event_t;

  // Event as stored in the log FIFO and sent on the ring.
  typedef struct packed {
    logic [EV_DATA_W-1:0] data;
    logic [EV_TYPE_W-1:0] ev_type;
    logic [TS_W-1:0]      delta;
  } stamped_event_t;

  // Invalidation/event ring message.
  typedef enum logic [1:0] {
    MSG_EMPTY = 2'd0,
    MSG_INV   = 2'd1,   // invalidation of a written address
    MSG_RSVD  = 2'd2,
    MSG_EVENT = 2'd3    // tracing event (low priority)
  } msg_type_e;

  typedef struct packed {
    msg_type_e              mtype;
    logic [CORE_ID_W-1:0]   sender;
    logic [31:0]            payload;  // address (MSG_INV) or event word (MSG_EVENT)
  } ring_msg_t;

  localparam int unsigned RING_MSG_W = $bits(ring_msg_t);

  function automatic logic [31:0] pack_event(stamped_event_t e);
    return {e.data[7:4], e.ev_type, e.delta, e.data[3:0]};
  endfunction

  function automatic stamped_event_t unpack_event(logic [31:0] w);
    stamped_event_t e;
    e.data    = {w[31:28], w[3:0]};
    e.ev_type = w[27:24];
    e.delta   = w[23:4];
    return e;
  endfunction

endpackage
