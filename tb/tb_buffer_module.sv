// tb_buffer_module: one queue module and one stack module, each driven alone
// with random packets on the down and up inputs and random read requests.
//
// The reference says, for each input state, where each present packet goes
// (down, into the delay line, up) and whether the read request is passed on.
// It is written per packet, not per gate, from the behaviour the
// architecture describes for each state. A packet is followed by its label
// and payload, so a packet taking the wrong path, or a delay line that does
// not hold its packet for one slot, is caught. A packet is offered on the up
// input only while the module's delay line is empty, as the architecture
// guarantees.
module tb_buffer_module;
  import obuf_pkg::*;

  typedef enum int {TO_NONE, TO_DOWN, TO_BUF, TO_UP} dest_e;

  logic   clk = 0, rst = 1;
  pkt_t   d_in, u_in;
  logic   rreq_in;
  pkt_t   d_out [2], u_out [2], buf_mon [2];
  logic   rreq_out [2];
  gates_t gates [2];
  int     checks = 0, failures = 0;

  buffer_module #(.MODE(MODE_FIFO)) dut_fifo (
    .clk, .rst, .d_in, .rreq_in, .d_out(d_out[0]), .u_in, .u_out(u_out[0]),
    .rreq_out(rreq_out[0]), .buf_mon(buf_mon[0]), .gates(gates[0]));
  buffer_module #(.MODE(MODE_LIFO)) dut_lifo (
    .clk, .rst, .d_in, .rreq_in, .d_out(d_out[1]), .u_in, .u_out(u_out[1]),
    .rreq_out(rreq_out[1]), .buf_mon(buf_mon[1]), .gates(gates[1]));

  always #5 clk = ~clk;

  // Destinations of the packets on D, B, U and the request passed on.
  task automatic reference(input int m, input logic d, b, u, r,
                           output dest_e dd, bd, ud, output logic ro);
    dd = TO_NONE; bd = TO_NONE; ud = TO_NONE; ro = 1'b0;
    if (!r) begin
      // No read: everything present is kept. The queue sends a new packet
      // on up if the module is taken; the stack keeps the new packet and
      // pushes the held or returning one up.
      if (b) bd = TO_BUF;
      if (u) ud = TO_BUF;
      if (d) begin
        if (!b && !u) dd = TO_BUF;
        else if (m == 0) dd = TO_UP;
        else begin
          dd = TO_BUF;
          if (b) bd = TO_UP;
          if (u) ud = TO_UP;
        end
      end
    end else begin
      if (m == 0) begin
        // Queue read: the oldest present packet leaves downwards and the
        // request moves up; a new packet goes up behind it, or straight
        // down if the module is empty.
        if (b)      begin bd = TO_DOWN; ro = 1'b1; if (d) dd = TO_UP; end
        else if (u) begin ud = TO_DOWN; ro = 1'b1; if (d) dd = TO_UP; end
        else if (d) dd = TO_DOWN;
      end else begin
        // Stack read: a new packet leaves at once and nothing moves;
        // otherwise the held or returning packet leaves and the request
        // moves up.
        if (d) begin
          dd = TO_DOWN;
          if (b) bd = TO_BUF;
          if (u) ud = TO_BUF;
        end else if (b) begin bd = TO_DOWN; ro = 1'b1; end
        else if (u) begin ud = TO_DOWN; ro = 1'b1; end
      end
    end
  endtask

  // Random payload; built 32 bits at a time in a wider vector and cut to size.
  function automatic logic [PAYLOAD_W-1:0] rand_payload();
    logic [PAYLOAD_W+31:0] wide;
    for (int i = 0; i < PAYLOAD_W; i += 32) wide[i +: 32] = $urandom;
    return wide[PAYLOAD_W-1:0];
  endfunction

  function automatic pkt_t rand_pkt(logic v);
    pkt_t p;
    p.valid = v;
    p.label = LABEL_W'($urandom);
    p.payload = rand_payload();
    return v ? p : NO_PKT;
  endfunction

  task automatic check(string what, pkt_t got, pkt_t exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t %s: got v=%0b label %0d, expected v=%0b label %0d",
               $time, what, got.valid, got.label, exp.valid, exp.label);
    end
  endtask

  pkt_t model_buf [2];

  initial begin
    d_in = NO_PKT; u_in = NO_PKT; rreq_in = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    model_buf[0] = NO_PKT; model_buf[1] = NO_PKT;
    for (int t = 0; t < 4000; t++) begin
      // The two modules hold different packets, so drive the up input only
      // when both are empty.
      d_in    = rand_pkt(1'($urandom));
      u_in    = rand_pkt(!model_buf[0].valid && !model_buf[1].valid && ($urandom_range(2) == 0));
      rreq_in = 1'($urandom);
      #1;
      for (int m = 0; m < 2; m++) begin
        dest_e dd, bd, ud;
        logic  ro;
        pkt_t  e_down, e_buf, e_up;
        string tag;
        tag = (m == 0) ? "FIFO" : "LIFO";
        reference(m, d_in.valid, model_buf[m].valid, u_in.valid, rreq_in, dd, bd, ud, ro);
        e_down = NO_PKT; e_buf = NO_PKT; e_up = NO_PKT;
        if (dd == TO_DOWN) e_down = d_in; if (dd == TO_BUF) e_buf = d_in; if (dd == TO_UP) e_up = d_in;
        if (bd == TO_DOWN) e_down = model_buf[m]; if (bd == TO_BUF) e_buf = model_buf[m];
        if (bd == TO_UP) e_up = model_buf[m];
        if (ud == TO_DOWN) e_down = u_in; if (ud == TO_BUF) e_buf = u_in; if (ud == TO_UP) e_up = u_in;
        check({tag, " buf_mon"}, buf_mon[m], model_buf[m]);
        check({tag, " d_out"}, d_out[m], e_down);
        check({tag, " u_out"}, u_out[m], e_up);
        checks++;
        if (rreq_out[m] !== ro) begin failures++; $display("%s rreq_out wrong", tag); end
        model_buf[m] = e_buf;
      end
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
