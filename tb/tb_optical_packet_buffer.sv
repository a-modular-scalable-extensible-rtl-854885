// tb_optical_packet_buffer: end-to-end test of the cascaded buffer.
//
// Four buffers run side by side: a queue and a stack of two modules, which
// first replay the architecture's illustrative sequences, and a queue and a
// stack of six modules. Each is driven and checked by its own obuf_env (see
// there): packet order against a reference queue or stack, loss on
// overflow, gate counts per packet, and coverage of every routing mechanism.
module tb_optical_packet_buffer;
  import obuf_pkg::*;

  localparam int NCFG = 4;
  localparam mode_e CFG_MODE [NCFG] = '{MODE_FIFO, MODE_LIFO, MODE_FIFO, MODE_LIFO};
  localparam int    CFG_N    [NCFG] = '{2, 2, 6, 6};

  logic clk = 0;
  always #5 clk = ~clk;

  int   chk [NCFG], fl [NCFG];
  logic dn  [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int N = CFG_N[c];
    logic   rst, rreq_in, rreq_out;
    pkt_t   pkt_in, pkt_out, up_out;
    pkt_t   buf_mon [N];
    logic   rreq_mon [N];
    gates_t gate_mon [N];

    optical_packet_buffer #(.MODE(CFG_MODE[c]), .NUM_MODULES(N)) dut (
      .clk, .rst, .pkt_in, .rreq_in, .pkt_out, .up_out, .up_in(NO_PKT), .rreq_out,
      .buf_mon, .rreq_mon, .gate_mon);

    obuf_env #(.MODE(CFG_MODE[c]), .N(N), .SLOTS(3000)) env (
      .clk, .rst, .pkt_in, .rreq_in, .pkt_out, .up_out, .rreq_out,
      .buf_mon, .rreq_mon, .gate_mon,
      .checks(chk[c]), .failures(fl[c]), .done(dn[c]));
  end

  initial begin
    int checks, failures;
    repeat (4) @(posedge clk);
    wait (dn[0] && dn[1] && dn[2] && dn[3]);
    checks = 0; failures = 0;
    for (int c = 0; c < NCFG; c++) begin checks += chk[c]; failures += fl[c]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (20000) @(posedge clk);
    checks = 0; failures = 1;
    for (int c = 0; c < NCFG; c++) begin checks += chk[c]; failures += fl[c]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
