// obuf_cascade: two optical_packet_buffer instances chained through their
// extension ports. The lower one's up_out and rreq_out feed the upper one's
// pkt_in and rreq_in, and the upper one's pkt_out feeds the lower one's
// up_in. The ports are those of a single buffer of N_LOW + N_HIGH modules,
// with the monitors of both joined, lower modules first, so the pair can be
// checked exactly like one buffer of that size.
module obuf_cascade
  import obuf_pkg::*;
#(
  parameter mode_e MODE   = MODE_FIFO,
  parameter int    N_LOW  = 2,
  parameter int    N_HIGH = 2
) (
  input  logic   clk,
  input  logic   rst,
  input  pkt_t   pkt_in,
  input  logic   rreq_in,
  output pkt_t   pkt_out,
  output pkt_t   up_out,
  output logic   rreq_out,
  output pkt_t   buf_mon  [N_LOW + N_HIGH],
  output logic   rreq_mon [N_LOW + N_HIGH],
  output gates_t gate_mon [N_LOW + N_HIGH]
);

  pkt_t   link_up, link_down;
  logic   link_rreq;
  pkt_t   bm_lo [N_LOW],  bm_hi [N_HIGH];
  logic   rm_lo [N_LOW],  rm_hi [N_HIGH];
  gates_t gm_lo [N_LOW],  gm_hi [N_HIGH];

  optical_packet_buffer #(.MODE(MODE), .NUM_MODULES(N_LOW)) u_low (
    .clk, .rst, .pkt_in, .rreq_in, .pkt_out,
    .up_out(link_up), .up_in(link_down), .rreq_out(link_rreq),
    .buf_mon(bm_lo), .rreq_mon(rm_lo), .gate_mon(gm_lo));

  optical_packet_buffer #(.MODE(MODE), .NUM_MODULES(N_HIGH)) u_high (
    .clk, .rst, .pkt_in(link_up), .rreq_in(link_rreq), .pkt_out(link_down),
    .up_out, .up_in(NO_PKT), .rreq_out,
    .buf_mon(bm_hi), .rreq_mon(rm_hi), .gate_mon(gm_hi));

  always_comb begin
    for (int k = 0; k < N_LOW; k++) begin
      buf_mon[k] = bm_lo[k]; rreq_mon[k] = rm_lo[k]; gate_mon[k] = gm_lo[k];
    end
    for (int k = 0; k < N_HIGH; k++) begin
      buf_mon[N_LOW+k] = bm_hi[k]; rreq_mon[N_LOW+k] = rm_hi[k]; gate_mon[N_LOW+k] = gm_hi[k];
    end
  end

endmodule
