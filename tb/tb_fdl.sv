// tb_fdl: checks that a packet written into a delay line leaves exactly
// DELAY_SLOTS timeslots later, for delays of 1 and 3, and that reset
// empties the line.
module tb_fdl;
  import obuf_pkg::*;

  logic clk = 0, rst = 1;
  pkt_t in_pkt;
  pkt_t out1, out3;
  int   checks = 0, failures = 0;
  pkt_t hist [$];

  fdl #(.DELAY_SLOTS(1)) dut1 (.clk, .rst, .pkt_in(in_pkt), .pkt_out(out1));
  fdl #(.DELAY_SLOTS(3)) dut3 (.clk, .rst, .pkt_in(in_pkt), .pkt_out(out3));

  always #5 clk = ~clk;

  // Random payload; built 32 bits at a time in a wider vector and cut to size.
  function automatic logic [PAYLOAD_W-1:0] rand_payload();
    logic [PAYLOAD_W+31:0] wide;
    for (int i = 0; i < PAYLOAD_W; i += 32) wide[i +: 32] = $urandom;
    return wide[PAYLOAD_W-1:0];
  endfunction

  function automatic pkt_t rand_pkt();
    pkt_t p;
    p.valid = 1'($urandom);
    p.label = LABEL_W'($urandom);
    p.payload = rand_payload();
    return p;
  endfunction

  initial begin
    in_pkt = rand_pkt();
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (out1 != NO_PKT || out3 != NO_PKT) begin failures++; $display("not empty after reset"); end
    for (int t = 0; t < 200; t++) begin
      in_pkt = rand_pkt();
      @(posedge clk);
      hist.push_front(in_pkt);
      #1;
      checks++;
      if (out1 != hist[0]) begin failures++; $display("slot %0d: delay 1 mismatch", t); end
      checks++;
      if (t >= 2 && out3 != hist[2]) begin failures++; $display("slot %0d: delay 3 mismatch", t); end
      if (t < 2 && out3 != NO_PKT) begin failures++; $display("slot %0d: delay 3 early", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
