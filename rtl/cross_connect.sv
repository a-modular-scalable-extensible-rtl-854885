// cross_connect: the gated 3x3 cross-connect of one buffer module.
//
// Three packet inputs (d_in from below, b_in from the delay line, u_in from
// above) reach three outputs (d_out downwards, b_out into the delay line,
// u_out upwards) through up to nine on/off gates. In the optical module these
// are semiconductor optical amplifiers between passive couplers. Here each
// output is the OR of the inputs whose gate to it is open and whose gate is
// built. PRESENT lists the gates that are built: a gate left out never passes
// a packet, whatever its enable says. The routing tables never open two gates
// into the same output, so the OR never merges two packets. An assertion
// checks that rule. Which gates exist follows the architecture's module
// drawings. Representing the couplers as an OR of whole packet words is
// this model's choice.
//
// Interface: three pkt_t in, gates_t enables in, three pkt_t out.
// Purely combinational: a packet passes in the timeslot it arrives.
module cross_connect
  import obuf_pkg::*;
#(
  parameter gates_t PRESENT = ALL_GATES
) (
  input  pkt_t   d_in,
  input  pkt_t   b_in,
  input  pkt_t   u_in,
  input  gates_t gates,
  output pkt_t   d_out,
  output pkt_t   b_out,
  output pkt_t   u_out
);

  gates_t g;
  assign g = gates & PRESENT;

  function automatic pkt_t pass(pkt_t p, logic en);
    return en ? p : NO_PKT;
  endfunction

  always_comb begin
    d_out = pass(d_in, g.d2d) | pass(b_in, g.b2d) | pass(u_in, g.u2d);
    b_out = pass(d_in, g.d2b) | pass(b_in, g.b2b) | pass(u_in, g.u2b);
    u_out = pass(d_in, g.d2u) | pass(b_in, g.b2u) | pass(u_in, g.u2u);
  end

  // At most one packet is steered into each output.
  always_comb begin
    assert ($countones({g.d2d & d_in.valid, g.b2d & b_in.valid, g.u2d & u_in.valid}) <= 1);
    assert ($countones({g.d2b & d_in.valid, g.b2b & b_in.valid, g.u2b & u_in.valid}) <= 1);
    assert ($countones({g.d2u & d_in.valid, g.b2u & b_in.valid, g.u2u & u_in.valid}) <= 1);
  end

endmodule
