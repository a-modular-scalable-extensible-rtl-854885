// tb_cross_connect: drives the cross-connect with random packets and random
// gate settings that steer at most one packet into each output, and compares
// each output with the packet the open gate should deliver. A second
// instance is built without the stack's unused gates (D2U, D2D) and is
// checked to pass nothing through them.
module tb_cross_connect;
  import obuf_pkg::*;

  localparam gates_t LIFO_UPPER = gates_needed(MODE_LIFO, 1'b0);

  pkt_t   d_in, b_in, u_in;
  gates_t gates;
  pkt_t   d_out, b_out, u_out;
  pkt_t   d_out2, b_out2, u_out2;
  int     checks = 0, failures = 0;

  cross_connect dut (.d_in, .b_in, .u_in, .gates, .d_out, .b_out, .u_out);
  cross_connect #(.PRESENT(LIFO_UPPER)) dut2 (.d_in, .b_in, .u_in, .gates,
                                              .d_out(d_out2), .b_out(b_out2), .u_out(u_out2));

  // Random payload; built 32 bits at a time in a wider vector and cut to size.
  function automatic logic [PAYLOAD_W-1:0] rand_payload();
    logic [PAYLOAD_W+31:0] wide;
    for (int i = 0; i < PAYLOAD_W; i += 32) wide[i +: 32] = $urandom;
    return wide[PAYLOAD_W-1:0];
  endfunction

  function automatic pkt_t rand_pkt();
    pkt_t p;
    p.valid = 1'b1;
    p.label = LABEL_W'($urandom);
    p.payload = rand_payload();
    return p;
  endfunction

  function automatic pkt_t pick(int src);
    case (src)
      0: return d_in;
      1: return b_in;
      2: return u_in;
      default: return NO_PKT;
    endcase
  endfunction

  task automatic check(string what, pkt_t got, pkt_t exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got label %0d valid %0b, expected label %0d valid %0b",
               what, got.label, got.valid, exp.label, exp.valid);
    end
  endtask

  initial begin
    for (int t = 0; t < 500; t++) begin
      int src_d, src_b, src_u;   // source feeding each output, 3 = none
      d_in = rand_pkt(); b_in = rand_pkt(); u_in = rand_pkt();
      // A random assignment of distinct sources to the outputs.
      src_d = $urandom_range(3); src_b = $urandom_range(3); src_u = $urandom_range(3);
      if (src_b == src_d) src_b = 3;
      if (src_u == src_d || src_u == src_b) src_u = 3;
      gates = NO_GATES;
      gates.d2d = (src_d == 0); gates.b2d = (src_d == 1); gates.u2d = (src_d == 2);
      gates.d2b = (src_b == 0); gates.b2b = (src_b == 1); gates.u2b = (src_b == 2);
      gates.d2u = (src_u == 0); gates.b2u = (src_u == 1); gates.u2u = (src_u == 2);
      #1;
      check("d_out", d_out, pick(src_d));
      check("b_out", b_out, pick(src_b));
      check("u_out", u_out, pick(src_u));
      check("d_out (no D2D)", d_out2, src_d == 0 ? NO_PKT : pick(src_d));
      check("b_out (no D2D)", b_out2, pick(src_b));
      check("u_out (no D2U)", u_out2, src_u == 0 ? NO_PKT : pick(src_u));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
