// routing_logic: the per-module routing decision of the packet buffer.
//
// It is memoryless. From four bits it decides, in each timeslot, which
// cross-connect gates to open and whether to pass the read request on to the
// module above. The four bits are: a packet is present on the down input
// (d), in the delay line (b) or on the up input (u), and a read request has
// arrived (r). MODE selects the queue (FIFO) truth table or the stack (LIFO)
// one. Both tables are the architecture's own, row for row. The one choice
// made here is for the input state b & u, which cannot occur: every output is
// 0 there, and an assertion in buffer_module reports it.
//
// Interface: d, b, u, r in; gates (gates_t) and ro out. Purely combinational;
// the outputs act in the same timeslot.
module routing_logic
  import obuf_pkg::*;
#(
  parameter mode_e MODE = MODE_FIFO
) (
  input  logic   d,
  input  logic   b,
  input  logic   u,
  input  logic   r,
  output gates_t gates,
  output logic   ro
);

  always_comb begin
    gates = NO_GATES;
    ro    = 1'b0;
    if (MODE == MODE_FIFO) begin
      unique case ({d, b, u, r})
        4'b1000: gates.d2b = 1'b1;                              // write
        4'b0100: gates.b2b = 1'b1;                              // hold
        4'b1100: begin gates.d2u = 1'b1; gates.b2b = 1'b1; end  // subsequent write
        4'b0010: gates.u2b = 1'b1;                              // after read
        4'b1010: begin gates.d2u = 1'b1; gates.u2b = 1'b1; end  // write after read
        4'b1001: gates.d2d = 1'b1;                              // read and write, last module
        4'b0101: begin gates.b2d = 1'b1; ro = 1'b1; end         // read
        4'b1101: begin                                          // read and write
          gates.d2u = 1'b1; gates.b2d = 1'b1; ro = 1'b1;
        end
        4'b0011: begin gates.u2d = 1'b1; ro = 1'b1; end         // subsequent read
        4'b1011: begin                                          // subsequent read and write
          gates.d2u = 1'b1; gates.u2d = 1'b1; ro = 1'b1;
        end
        default: ;                                              // empty, or b & u
      endcase
    end else begin
      unique case ({d, b, u, r})
        4'b1000: gates.d2b = 1'b1;                              // write
        4'b0100: gates.b2b = 1'b1;                              // hold
        4'b1100: begin gates.d2b = 1'b1; gates.b2u = 1'b1; end  // subsequent write (push)
        4'b0010: gates.u2b = 1'b1;                              // after read
        4'b1010: begin gates.d2b = 1'b1; gates.u2u = 1'b1; end  // write after read
        4'b1001: gates.d2d = 1'b1;                              // read and write
        4'b0101: begin gates.b2d = 1'b1; ro = 1'b1; end         // read
        4'b1101: begin gates.d2d = 1'b1; gates.b2b = 1'b1; end  // read and write
        4'b0011: begin gates.u2d = 1'b1; ro = 1'b1; end         // subsequent read
        4'b1011: begin gates.d2d = 1'b1; gates.u2b = 1'b1; end  // subsequent read and write
        default: ;                                              // empty, or b & u
      endcase
    end
  end

endmodule
