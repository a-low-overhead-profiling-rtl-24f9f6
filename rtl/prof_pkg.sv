// prof_pkg: types and constants shared by the TM profiling hardware.
//
// Every message on the invalidation ring is 34 bits. An event packet is
//   [33:32] message type  [31:28] sender CPU  [27:8] delta timestamp
//   [7:4]   event type    [3:0]   event data
// (2 + 4 + 20 + 4 + 4 bits, header first). An invalidation uses the same
// 6-bit header followed by a 28-bit cache-line address (32-bit byte
// address, 16-byte lines). The field widths of the event packet follow the
// published format; the message-type codes, the invalidation layout and the
// event-type numbering are this design's choices.
package prof_pkg;

  localparam int unsigned MSG_W   = 34;
  localparam int unsigned TS_W    = 20;   // delta timestamp field
  localparam int unsigned CPU_W   = 4;    // up to 16 cores
  localparam int unsigned ETYPE_W = 4;    // 16 event types per class
  localparam int unsigned EDATA_W = 4;
  localparam int unsigned LADDR_W = 28;   // cache-line address

  // Message type. EMPTY marks an idle ring slot, which is what a node looks
  // for before injecting an event.
  typedef enum logic [1:0] {
    MSG_EMPTY = 2'b00,
    MSG_INV   = 2'b01,
    MSG_HWEV  = 2'b10,
    MSG_SWEV  = 2'b11
  } msg_type_e;

  // Hardware event types, one per hook on the cache FSM. TS_OVF is the
  // extra, rarely used type that reports timestamp-counter wraparounds: its
  // timestamp field carries the number of wraps instead of a delta.
  typedef enum logic [ETYPE_W-1:0] {
    EV_TX_START  = 4'd0,
    EV_TX_READ   = 4'd1,
    EV_TX_WRITE  = 4'd2,
    EV_TX_INV    = 4'd3,
    EV_TX_ABORT  = 4'd4,
    EV_LOCK_BUS  = 4'd5,
    EV_UNLOCK_BUS= 4'd6,
    EV_TX_COMMIT = 4'd7,
    EV_TS_OVF    = 4'd15
  } hw_event_e;

  localparam int unsigned N_HOOKS = 8;   // EV_TX_START .. EV_TX_COMMIT

  // Abort causes carried in the data field of EV_TX_ABORT.
  typedef enum logic [EDATA_W-1:0] {
    ABORT_INVALIDATION = 4'd1,
    ABORT_CAPACITY     = 4'd2,
    ABORT_SOFTWARE     = 4'd3
  } abort_cause_e;

  typedef struct packed {
    msg_type_e              mtype;
    logic [CPU_W-1:0]       cpu;
    logic [TS_W-1:0]        ts;
    logic [ETYPE_W-1:0]     etype;
    logic [EDATA_W-1:0]     edata;
  } event_pkt_t;

  typedef struct packed {
    msg_type_e              mtype;
    logic [CPU_W-1:0]       cpu;
    logic [LADDR_W-1:0]     laddr;
  } inv_pkt_t;

  // Raw ring slot; decode with the two views above.
  typedef logic [MSG_W-1:0] ring_msg_t;

  // One event leaving the event generation unit, before timestamping.
  typedef struct packed {
    logic                   sw;      // 1: software (event instruction)
    logic [ETYPE_W-1:0]     etype;
    logic [EDATA_W-1:0]     edata;
  } raw_event_t;

  function automatic msg_type_e msg_type(input ring_msg_t m);
    return msg_type_e'(m[MSG_W-1 -: 2]);
  endfunction

endpackage
