// optical_packet_buffer: a self-managing FIFO or LIFO packet buffer built
// from a cascade of identical one-packet modules.
//
// NUM_MODULES buffer_module instances are stacked with the root (index 0) at
// the bottom. Packets enter and leave through the root only: pkt_in is the
// root's down input and pkt_out its down output. A packet sent up by module k
// reaches module k+1 in the same timeslot, as does the read request module k
// passes on. A packet sent down by module k+1 goes through a one-slot fiber
// delay (fdl) and reaches module k's up input in the next timeslot. There is
// no central control: each module decides from its own inputs alone. The
// capacity is NUM_MODULES packets. With NUM_MODULES = 2, the default, this is
// the two-module system the architecture was demonstrated with. On overflow
// one packet leaves the top module through up_out and is lost, unless more
// modules are cascaded there. A stack overflows when it is full and is
// written without a read; it loses its oldest packet. A queue overflows
// whenever it is full and written, even if it is read in the same slot:
// its routing table sends the new packet up past every occupied module, and
// the read frees a place only at the bottom. It loses the new packet. (The
// architecture's prose names only the no-read case; this follows its
// routing table.) up_out, rreq_out and up_in let the cascade be extended:
// connect them to the pkt_in, rreq_in and pkt_out of another buffer of the
// same mode, and the two behave as one buffer with the modules of both. up_in
// goes through the same one-slot descending fiber as the links inside. Tie
// up_in to NO_PKT when nothing is attached. Those extension ports and the monitor
// ports are this model's own; the structure, the routing and the timing
// follow the architecture.
//
// Timing: one clock edge per timeslot. pkt_out depends combinationally on
// pkt_in, rreq_in and the state, so a packet written and read in the same
// slot leaves in that slot. Reset is synchronous and empties every delay
// line.
//
// Monitor outputs, per module: buf_mon (packet in the delay line), rreq_mon
// (read request arriving at the module) and gate_mon (gate enables, which in
// the optical module drive the switching amplifiers).
module optical_packet_buffer
  import obuf_pkg::*;
#(
  parameter mode_e       MODE        = MODE_FIFO,
  parameter int unsigned NUM_MODULES = 2
) (
  input  logic   clk,
  input  logic   rst,
  input  pkt_t   pkt_in,
  input  logic   rreq_in,
  output pkt_t   pkt_out,
  output pkt_t   up_out,
  input  pkt_t   up_in,
  output logic   rreq_out,
  output pkt_t   buf_mon  [NUM_MODULES],
  output logic   rreq_mon [NUM_MODULES],
  output gates_t gate_mon [NUM_MODULES]
);

  // Links between module k (below) and k+1 (above); index NUM_MODULES is the
  // open top end of the cascade.
  pkt_t up_link   [NUM_MODULES+1];  // packet from module k-1 into module k's down input
  logic rreq_link [NUM_MODULES+1];  // read request into module k
  pkt_t down_src  [NUM_MODULES+1];  // down output of module k, or up_in for k = NUM_MODULES
  pkt_t down_dst  [NUM_MODULES+1];  // module k-1's up input, after the fiber

  assign up_link[0]   = pkt_in;
  assign rreq_link[0] = rreq_in;
  assign down_src[0]  = NO_PKT;
  assign down_dst[0]  = NO_PKT;
  assign down_src[NUM_MODULES] = up_in;

  for (genvar k = 0; k < int'(NUM_MODULES); k++) begin : g_mod
    pkt_t d_out_k;

    buffer_module #(.MODE(MODE), .IS_ROOT(k == 0)) u_module (
      .clk      (clk),
      .rst      (rst),
      .d_in     (up_link[k]),
      .rreq_in  (rreq_link[k]),
      .d_out    (d_out_k),
      .u_in     (down_dst[k+1]),
      .u_out    (up_link[k+1]),
      .rreq_out (rreq_link[k+1]),
      .buf_mon  (buf_mon[k]),
      .gates    (gate_mon[k])
    );

    assign rreq_mon[k] = rreq_link[k];

    if (k == 0) begin : g_root
      assign pkt_out = d_out_k;
    end else begin : g_out
      assign down_src[k] = d_out_k;
    end
  end

  // Fiber from module k (or, for k = NUM_MODULES, from whatever is cascaded
  // above) down to module k-1: one timeslot.
  for (genvar k = 1; k <= int'(NUM_MODULES); k++) begin : g_down_fiber
    fdl #(.DELAY_SLOTS(1)) u_fiber (
      .clk     (clk),
      .rst     (rst),
      .pkt_in  (down_src[k]),
      .pkt_out (down_dst[k])
    );
  end

  assign up_out   = up_link[NUM_MODULES];
  assign rreq_out = rreq_link[NUM_MODULES];

  initial assert (NUM_MODULES >= 1);

endmodule
