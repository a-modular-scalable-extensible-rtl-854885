// tb_obuf_load: the buffer under random (Bernoulli) traffic, the load model
// of the architecture's analysis.
//
// In every slot a packet is written with probability p and a read request
// arrives with probability q = 0.5, independently. A queue and a stack of
// 32 modules run at p = 0.20, 0.30 and 0.40, i.e. load rho = p/q of 0.4,
// 0.6 and 0.8. At this size overflow is too rare to affect the means; any
// packet lost is still accounted for. Every packet carries its write slot
// in its payload, so the testbench measures each packet's stay T (exit slot
// minus write slot).
//
// Expected values come from the slot-level birth-death chain of this kind
// of buffer: a write and a read in the same slot cancel. Let
// r = p(1-q) / (q(1-p)). Then the mean number of stored packets is
// r / (1 - r), and by Little's law the mean stay is T = r / ((1 - r) p).
// The measured mean stay must be within 12 % of that for both modes. Both
// modes have the same mean stay.
//
// The gates each packet crosses are counted from the gate monitors. For the
// queue, the mean must equal N + T + 1 averaged over packets, where N is the
// number of packets stored when a packet arrives. The testbench tracks N
// itself. For the stack the mean is printed next to T + 1.
module tb_obuf_load;
  import obuf_pkg::*;

  localparam int NM    = 32;
  localparam int SLOTS = 40000;
  localparam int NCFG  = 6;
  localparam mode_e CFG_MODE [NCFG] = '{MODE_FIFO, MODE_FIFO, MODE_FIFO,
                                        MODE_LIFO, MODE_LIFO, MODE_LIFO};
  localparam int    CFG_P    [NCFG] = '{200, 300, 400, 200, 300, 400};  // per mille
  localparam int    Q        = 500;                                     // per mille

  logic clk = 0;
  always #5 clk = ~clk;

  int   chk [NCFG], fl [NCFG];
  logic dn  [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    logic   rst, rreq_in, rreq_out;
    pkt_t   pkt_in, pkt_out, up_out;
    pkt_t   buf_mon [NM];
    logic   rreq_mon [NM];
    gates_t gate_mon [NM];

    optical_packet_buffer #(.MODE(CFG_MODE[c]), .NUM_MODULES(NM)) dut (
      .clk, .rst, .pkt_in, .rreq_in, .pkt_out, .up_out, .up_in(NO_PKT), .rreq_out,
      .buf_mon, .rreq_mon, .gate_mon);

    initial begin
      real    p, q, r, t_theory, t_meas, s_meas, n_meas;
      longint sum_t, sum_n, gates_total;
      int     delivered, written, lost, stored;
      string  tag;
      tag = (CFG_MODE[c] == MODE_FIFO) ? "queue" : "stack";
      chk[c] = 0; fl[c] = 0; dn[c] = 0;
      sum_t = 0; sum_n = 0; gates_total = 0; delivered = 0; written = 0; lost = 0; stored = 0;
      rst = 1; pkt_in = NO_PKT; rreq_in = 0;
      repeat (2) @(posedge clk);
      #1 rst = 0;
      for (int s = 0; s < SLOTS + 4 * NM; s++) begin
        logic w, rd;
        w  = (s < SLOTS) && ($urandom_range(999) < CFG_P[c]);
        rd = (s >= SLOTS) || ($urandom_range(999) < Q);
        pkt_in = NO_PKT;
        if (w) begin
          pkt_in.valid = 1'b1;
          pkt_in.label = LABEL_W'(s);
          pkt_in.payload[31:0]  = s;
          pkt_in.payload[63:32] = stored;
          written++;
        end
        rreq_in = rd;
        @(negedge clk);
        for (int k = 0; k < NM; k++) gates_total += $countones(gate_mon[k]);
        if (pkt_out.valid) begin
          delivered++;
          sum_t += s - int'(pkt_out.payload[31:0]);
          sum_n += int'(pkt_out.payload[63:32]);
        end
        if (up_out.valid) lost++;
        // Stored packets at the end of this slot.
        stored += (w ? 1 : 0) - (pkt_out.valid ? 1 : 0) - (up_out.valid ? 1 : 0);
        @(posedge clk);
        #1;
      end
      p = CFG_P[c] / 1000.0;
      q = Q / 1000.0;
      r = p * (1.0 - q) / (q * (1.0 - p));
      t_theory = r / ((1.0 - r) * p);
      t_meas = real'(sum_t) / delivered;
      n_meas = real'(sum_n) / delivered;
      s_meas = real'(gates_total) / delivered;
      $display("[%s p=%0.2f q=%0.2f rho=%0.2f] written=%0d delivered=%0d lost=%0d  mean stay %0.3f (theory %0.3f)  mean N at arrival %0.3f  mean gates %0.3f (N+T+1 = %0.3f, T+1 = %0.3f)",
               tag, p, q, p / q, written, delivered, lost, t_meas, t_theory, n_meas, s_meas,
               n_meas + t_meas + 1.0, t_meas + 1.0);
      chk[c]++;
      if (delivered + lost != written || stored != 0) begin
        fl[c]++; $display("[%s] packets unaccounted for", tag);
      end
      chk[c]++;
      if (t_meas < 0.88 * t_theory || t_meas > 1.12 * t_theory) begin
        fl[c]++; $display("[%s] mean stay off the theory by more than 12 %%", tag);
      end
      chk[c]++;
      if (CFG_MODE[c] == MODE_FIFO) begin
        if (gates_total != sum_n + sum_t + delivered) begin
          fl[c]++; $display("[%s] gates crossed differ from sum of N + T + 1", tag);
        end
      end else begin
        if (gates_total < sum_t + delivered) begin
          fl[c]++; $display("[%s] fewer gates than T + 1 per packet", tag);
        end
      end
      dn[c] = 1;
    end
  end

  initial begin
    int checks, failures;
    repeat (4) @(posedge clk);
    wait (dn[0] && dn[1] && dn[2] && dn[3] && dn[4] && dn[5]);
    checks = 0; failures = 0;
    for (int c = 0; c < NCFG; c++) begin checks += chk[c]; failures += fl[c]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (SLOTS + 4 * NM + 1000) @(posedge clk);
    checks = 0; failures = 1;
    for (int c = 0; c < NCFG; c++) begin checks += chk[c]; failures += fl[c]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
