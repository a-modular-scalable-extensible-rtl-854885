// tb_routing_logic: exhaustive check of the queue and stack routing tables.
//
// Both MODE settings are instantiated and driven with all 16 combinations of
// d, b, u, r. The expected gate enables and propagated read request are
// written out below, one row per input state, as a 10-bit vector
// {d2d,d2b,d2u, b2d,b2b,b2u, u2d,u2b,u2u, ro}. The states with b and u both
// set cannot occur and are expected to open nothing.
module tb_routing_logic;
  import obuf_pkg::*;

  logic   d, b, u, r;
  gates_t g_fifo, g_lifo;
  logic   ro_fifo, ro_lifo;
  int     checks = 0, failures = 0;

  routing_logic #(.MODE(MODE_FIFO)) dut_fifo (.d, .b, .u, .r, .gates(g_fifo), .ro(ro_fifo));
  routing_logic #(.MODE(MODE_LIFO)) dut_lifo (.d, .b, .u, .r, .gates(g_lifo), .ro(ro_lifo));

  // Indexed by {d, b, u, r}.
  logic [9:0] exp_fifo [16];
  logic [9:0] exp_lifo [16];

  initial begin
    foreach (exp_fifo[i]) begin exp_fifo[i] = '0; exp_lifo[i] = '0; end
    //                d2d d2b d2u b2d b2b b2u u2d u2b u2u ro
    exp_fifo[4'b1000] = 10'b0_1_0_0_0_0_0_0_0_0;  // write
    exp_fifo[4'b0100] = 10'b0_0_0_0_1_0_0_0_0_0;  // hold
    exp_fifo[4'b1100] = 10'b0_0_1_0_1_0_0_0_0_0;  // subsequent write
    exp_fifo[4'b0010] = 10'b0_0_0_0_0_0_0_1_0_0;  // after read
    exp_fifo[4'b1010] = 10'b0_0_1_0_0_0_0_1_0_0;  // write after read
    exp_fifo[4'b1001] = 10'b1_0_0_0_0_0_0_0_0_0;  // read and write (last module)
    exp_fifo[4'b0101] = 10'b0_0_0_1_0_0_0_0_0_1;  // read
    exp_fifo[4'b1101] = 10'b0_0_1_1_0_0_0_0_0_1;  // read and write
    exp_fifo[4'b0011] = 10'b0_0_0_0_0_0_1_0_0_1;  // subsequent read
    exp_fifo[4'b1011] = 10'b0_0_1_0_0_0_1_0_0_1;  // subsequent read and write

    exp_lifo[4'b1000] = 10'b0_1_0_0_0_0_0_0_0_0;  // write
    exp_lifo[4'b0100] = 10'b0_0_0_0_1_0_0_0_0_0;  // hold
    exp_lifo[4'b1100] = 10'b0_1_0_0_0_1_0_0_0_0;  // subsequent write (push)
    exp_lifo[4'b0010] = 10'b0_0_0_0_0_0_0_1_0_0;  // after read
    exp_lifo[4'b1010] = 10'b0_1_0_0_0_0_0_0_1_0;  // write after read
    exp_lifo[4'b1001] = 10'b1_0_0_0_0_0_0_0_0_0;  // read and write
    exp_lifo[4'b0101] = 10'b0_0_0_1_0_0_0_0_0_1;  // read
    exp_lifo[4'b1101] = 10'b1_0_0_0_1_0_0_0_0_0;  // read and write
    exp_lifo[4'b0011] = 10'b0_0_0_0_0_0_1_0_0_1;  // subsequent read
    exp_lifo[4'b1011] = 10'b1_0_0_0_0_0_0_1_0_0;  // subsequent read and write

    for (int i = 0; i < 16; i++) begin
      {d, b, u, r} = 4'(i);
      #1;
      checks++;
      if ({g_fifo, ro_fifo} !== exp_fifo[i]) begin
        failures++;
        $display("FIFO dbur=%4b: got %10b expected %10b", 4'(i), {g_fifo, ro_fifo}, exp_fifo[i]);
      end
      checks++;
      if ({g_lifo, ro_lifo} !== exp_lifo[i]) begin
        failures++;
        $display("LIFO dbur=%4b: got %10b expected %10b", 4'(i), {g_lifo, ro_lifo}, exp_lifo[i]);
      end
      // Gates the architecture leaves out of each configuration.
      checks++;
      if (g_fifo.b2u || g_fifo.u2u || g_lifo.d2u) begin
        failures++;
        $display("dbur=%4b: unused gate opened", 4'(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
