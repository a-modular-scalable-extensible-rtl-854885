// tb_obuf_cascade: extension of a buffer by cascading another at its top.
// A two-module buffer with a two-module buffer attached above it (and a
// three-module one with a one-module one) must behave exactly like a single
// four-module buffer, in both modes. obuf_env checks order, overflow losses,
// gate counts and mechanism coverage as for one buffer.
module tb_obuf_cascade;
  import obuf_pkg::*;

  localparam int NCFG = 4;
  localparam mode_e CFG_MODE [NCFG] = '{MODE_FIFO, MODE_LIFO, MODE_FIFO, MODE_LIFO};
  localparam int    CFG_LO   [NCFG] = '{2, 2, 3, 3};
  localparam int    CFG_HI   [NCFG] = '{2, 2, 1, 1};

  logic clk = 0;
  always #5 clk = ~clk;

  int   chk [NCFG], fl [NCFG];
  logic dn  [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int N = CFG_LO[c] + CFG_HI[c];
    logic   rst, rreq_in, rreq_out;
    pkt_t   pkt_in, pkt_out, up_out;
    pkt_t   buf_mon [N];
    logic   rreq_mon [N];
    gates_t gate_mon [N];

    obuf_cascade #(.MODE(CFG_MODE[c]), .N_LOW(CFG_LO[c]), .N_HIGH(CFG_HI[c])) dut (
      .clk, .rst, .pkt_in, .rreq_in, .pkt_out, .up_out, .rreq_out,
      .buf_mon, .rreq_mon, .gate_mon);

    obuf_env #(.MODE(CFG_MODE[c]), .N(N), .SLOTS(2000)) env (
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
    repeat (10000) @(posedge clk);
    checks = 0; failures = 1;
    for (int c = 0; c < NCFG; c++) begin checks += chk[c]; failures += fl[c]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
