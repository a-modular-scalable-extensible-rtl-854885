// fdl: a fiber delay line in the time-slotted model.
//
// A packet written in one timeslot comes out DELAY_SLOTS timeslots later.
// Each module's own delay line holds one packet for one timeslot, so that a
// packet circulating through it is seen again in the next timeslot. The fiber
// from a module down to the module below has the same effect: a packet sent
// down reaches the lower module at the start of the next timeslot. Both use
// DELAY_SLOTS = 1; the architecture sets the fiber lengths to make this so.
// The line is empty after reset; the reset is this model's addition.
//
// Interface: clk (one edge per timeslot), rst (synchronous, active high),
// pkt_in, pkt_out. Latency DELAY_SLOTS cycles, one packet per cycle.
module fdl
  import obuf_pkg::*;
#(
  parameter int unsigned DELAY_SLOTS = 1
) (
  input  logic clk,
  input  logic rst,
  input  pkt_t pkt_in,
  output pkt_t pkt_out
);

  pkt_t line [DELAY_SLOTS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(DELAY_SLOTS); i++) line[i] <= NO_PKT;
    end else begin
      line[0] <= pkt_in;
      for (int i = 1; i < int'(DELAY_SLOTS); i++) line[i] <= line[i-1];
    end
  end

  assign pkt_out = line[DELAY_SLOTS-1];

  initial assert (DELAY_SLOTS >= 1);

endmodule
