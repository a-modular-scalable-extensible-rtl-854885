// buffer_module: one building block of the cascaded packet buffer.
//
// Each module stores at most one packet, in its own delay line (fdl). In
// every timeslot the routing logic looks at which of its three inputs carry a
// packet: the down input from the module below, its own delay line, and the
// up input from the module above. It also looks at the incoming read request.
// The routing logic opens the cross-connect gates that send each packet down,
// into the delay line or up, and it may pass the read request on to the
// module above. The decision is the queue or stack truth table of the
// architecture (MODE). The modules are identical. IS_ROOT matters only for
// the set of gates that are built, which follows the architecture's module
// drawings: a stack module above the root has no D2D gate.
//
// Timing, one clock edge per timeslot: d_out, u_out, rreq_out and gates
// depend combinationally on d_in, u_in, rreq_in and the delay-line content.
// A packet sent up or a propagated request therefore reaches the next module
// in the same timeslot. A packet put into the delay line is seen again in
// the next timeslot. The fiber that carries d_out down to the module below,
// with its one-slot delay, sits outside this module, so u_in must arrive
// registered. The presence bits are the packets' valid flags; the optical
// module gets them from low-speed receivers on taps of its three inputs.
//
// Interface: d_in/d_out, u_in/u_out packet ports, rreq_in/rreq_out, and two
// monitors: buf_mon (the packet circulating in the delay line) and gates (the
// gate enables, which drive the switching gates).
module buffer_module
  import obuf_pkg::*;
#(
  parameter mode_e MODE    = MODE_FIFO,
  parameter bit    IS_ROOT = 1'b1
) (
  input  logic   clk,
  input  logic   rst,
  input  pkt_t   d_in,
  input  logic   rreq_in,
  output pkt_t   d_out,
  input  pkt_t   u_in,
  output pkt_t   u_out,
  output logic   rreq_out,
  output pkt_t   buf_mon,
  output gates_t gates
);

  localparam gates_t PRESENT = gates_needed(MODE, IS_ROOT);

  pkt_t b_pkt;     // packet leaving the delay line this timeslot
  pkt_t b_next;    // packet entering the delay line this timeslot

  routing_logic #(.MODE(MODE)) u_logic (
    .d     (d_in.valid),
    .b     (b_pkt.valid),
    .u     (u_in.valid),
    .r     (rreq_in),
    .gates (gates),
    .ro    (rreq_out)
  );

  cross_connect #(.PRESENT(PRESENT)) u_xc (
    .d_in  (d_in),
    .b_in  (b_pkt),
    .u_in  (u_in),
    .gates (gates),
    .d_out (d_out),
    .b_out (b_next),
    .u_out (u_out)
  );

  fdl #(.DELAY_SLOTS(1)) u_fdl (
    .clk     (clk),
    .rst     (rst),
    .pkt_in  (b_next),
    .pkt_out (b_pkt)
  );

  assign buf_mon = b_pkt;

  // A module never holds a packet while another arrives from above: the
  // upper module only sends one down after a read request, and a read request
  // empties the delay line first.
  a_no_b_and_u: assert property (@(posedge clk) disable iff (rst)
    !(b_pkt.valid && u_in.valid));

  // Every gate the routing logic opens is one the module is built with.
  a_gate_built: assert property (@(posedge clk) disable iff (rst)
    (gates & ~PRESENT) == NO_GATES);

  // No packet that reaches the module is dropped inside it.
  a_conserve: assert property (@(posedge clk) disable iff (rst)
    (32'(d_in.valid) + 32'(b_pkt.valid) + 32'(u_in.valid)) ==
    (32'(d_out.valid) + 32'(b_next.valid) + 32'(u_out.valid)));

endmodule
