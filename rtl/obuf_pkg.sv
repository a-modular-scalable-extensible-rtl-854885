// obuf_pkg: types and constants shared by the time-slotted packet buffer.
//
// In this digital model one clock cycle is one packet timeslot. A packet is a
// single word: a presence flag (what the module's tap receivers detect), the
// 7-bit packet label used to identify packets, and an opaque payload. The
// buffer never looks at label or payload, just as the optical buffer is
// transparent to them. The payload width is 900 bits, which is one 90-ns
// packet at 10 Gb/s. Change PAYLOAD_W to model another packet length.
//
// gates_t holds the nine gate enables of a full 3x3 cross-connect. Each is
// named <from>2<to>. The sources are D (down input: from the module below, or
// from the source for the root), B (the module's own delay line) and U (up
// input: from the module above). The destinations are D (down output: towards
// the root and then the network), B (into the delay line) and U (up output).
package obuf_pkg;

  localparam int LABEL_W   = 7;
  localparam int PAYLOAD_W = 900;

  typedef struct packed {
    logic                 valid;
    logic [LABEL_W-1:0]   label;
    logic [PAYLOAD_W-1:0] payload;
  } pkt_t;

  localparam pkt_t NO_PKT = '0;

  typedef struct packed {
    logic d2d, d2b, d2u;
    logic b2d, b2b, b2u;
    logic u2d, u2b, u2u;
  } gates_t;

  localparam gates_t NO_GATES  = '0;
  localparam gates_t ALL_GATES = '1;

  typedef enum logic {
    MODE_FIFO = 1'b0,   // queue: oldest packet leaves first
    MODE_LIFO = 1'b1    // stack: newest packet leaves first
  } mode_e;

  // Gates a module's cross-connect is built with (Fig. 2 of the architecture):
  // a queue never uses B2U or U2U; a stack never uses D2U, and only its root
  // module uses D2D.
  function automatic gates_t gates_needed(mode_e mode, bit is_root);
    gates_t g;
    g = ALL_GATES;
    if (mode == MODE_FIFO) begin
      g.b2u = 1'b0;
      g.u2u = 1'b0;
    end else begin
      g.d2u = 1'b0;
      if (!is_root) g.d2d = 1'b0;
    end
    return g;
  endfunction

endpackage
