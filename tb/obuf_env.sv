// obuf_env: stimulus and checking for one optical_packet_buffer instance.
//
// It drives the buffer's packet input and read request and reads all of its
// outputs, including the per-module monitors. It never reaches inside it.
//
// 1. With N = 2 it first replays the architecture's illustrative eight-slot
//    sequence. A queue gets W, W, R, -, WR, R, WR, -. A stack gets W, W, R,
//    R, W, WR, R, -. The gates each module opens in each slot are checked
//    against the walk-through of that sequence, as are the order of the
//    packets leaving, the read requests seen by each module, and the
//    longest stay (three slots).
// 2. Then it runs random traffic in phases of light load, heavy load (which
//    overflows the buffer) and drain. Each packet carries a serial number in
//    its payload. A reference queue or stack of capacity N predicts every
//    packet leaving and every packet lost on overflow. A full queue loses
//    the new packet even when it is read from in the same slot: the routing
//    table sends the new packet up past every occupied module before the
//    read frees one. The reference models this, and the count of such
//    losses is reported.
// 3. From the gate monitors it follows every packet through the modules and
//    counts the switching gates it crosses. For a queue each delivered packet
//    must cross N + T + 1 gates. N is the occupancy when it arrived and T the
//    number of slots it stayed.
//
// It also counts how often each mechanism occurs: write into the delay
// line, hold, pass up, read from the delay line, read of a returning packet,
// pass-through, bounce back down from a module above the root, push up and
// return up (stack), request curtailed, read of an empty buffer, overflow. A
// mechanism the mode uses that never occurs counts as a failure.
module obuf_env
  import obuf_pkg::*;
#(
  parameter mode_e MODE  = MODE_FIFO,
  parameter int    N     = 2,
  parameter int    SLOTS = 2000
) (
  input  logic   clk,
  output logic   rst,
  output pkt_t   pkt_in,
  output logic   rreq_in,
  input  pkt_t   pkt_out,
  input  pkt_t   up_out,
  input  logic   rreq_out,
  input  pkt_t   buf_mon  [N],
  input  logic   rreq_mon [N],
  input  gates_t gate_mon [N],
  output int     checks,
  output int     failures,
  output logic   done
);

  localparam bit FIFO = (MODE == MODE_FIFO);
  string tag;

  // ---------------------------------------------------------------- reference
  typedef struct {
    int unsigned id;
    int          t_in;
    int          n_in;
  } entry_t;
  entry_t ref_q [$];

  int unsigned hops [int unsigned];   // gates crossed so far, by packet id
  pkt_t        prev_down [N+1];       // what each module sent down last slot
  int unsigned next_id = 1;
  int          slot = 0;

  // Mechanism counters.
  typedef enum int {
    M_WRITE, M_HOLD, M_UP, M_READ_B, M_READ_U, M_THROUGH_ROOT, M_BOUNCE,
    M_PUSH, M_RETURN_UP, M_CURTAIL, M_EMPTY_READ, M_OVERFLOW, M_OVERFLOW_RW, M_NUM
  } mech_e;
  int mech [M_NUM];

  task automatic fail(string msg);
    failures++;
    $display("[%s N=%0d slot %0d] %s", tag, N, slot, msg);
  endtask

  // Random payload; built 32 bits at a time in a wider vector and cut to size.
  function automatic logic [PAYLOAD_W-1:0] rand_payload();
    logic [PAYLOAD_W+31:0] wide;
    for (int i = 0; i < PAYLOAD_W; i += 32) wide[i +: 32] = $urandom;
    return wide[PAYLOAD_W-1:0];
  endfunction

  function automatic pkt_t make_pkt(int unsigned id);
    pkt_t p;
    p.valid = 1'b1;
    p.label = LABEL_W'(id);
    p.payload = rand_payload();
    p.payload[31:0] = id;
    return p;
  endfunction

  function automatic int unsigned id_of(pkt_t p);
    return p.payload[31:0];
  endfunction

  // Follow the packets through the cascade for this slot, using only the
  // ports: the root's down input is pkt_in, module k's delay line is
  // buf_mon[k], its up input is what module k+1 sent down last slot, and its
  // down input is what module k-1 sends up now.
  task automatic trace_slot();
    pkt_t d_src, b_src, u_src, up_sent;
    pkt_t down_now [N+1];
    d_src = pkt_in;
    for (int k = 0; k < N; k++) begin
      gates_t g;
      g     = gate_mon[k];
      b_src = buf_mon[k];
      u_src = (k + 1 < N) ? prev_down[k+1] : NO_PKT;
      if (b_src.valid && u_src.valid) fail($sformatf("module %0d: delay line and up input both busy", k));
      if (g.d2d && d_src.valid) hops[id_of(d_src)]++;
      if (g.d2b && d_src.valid) hops[id_of(d_src)]++;
      if (g.d2u && d_src.valid) hops[id_of(d_src)]++;
      if (g.b2d && b_src.valid) hops[id_of(b_src)]++;
      if (g.b2b && b_src.valid) hops[id_of(b_src)]++;
      if (g.b2u && b_src.valid) hops[id_of(b_src)]++;
      if (g.u2d && u_src.valid) hops[id_of(u_src)]++;
      if (g.u2b && u_src.valid) hops[id_of(u_src)]++;
      if (g.u2u && u_src.valid) hops[id_of(u_src)]++;
      // Mechanisms.
      if (g.d2b) mech[M_WRITE]++;
      if (g.b2b) mech[M_HOLD]++;
      if (g.d2u) mech[M_UP]++;
      if (g.b2d) mech[M_READ_B]++;
      if (g.u2d) mech[M_READ_U]++;
      if (g.d2d && k == 0) mech[M_THROUGH_ROOT]++;
      if (g.d2d && k != 0) mech[M_BOUNCE]++;
      if (g.b2u) mech[M_PUSH]++;
      if (g.u2u) mech[M_RETURN_UP]++;
      if (rreq_mon[k] && !((k + 1 < N) ? rreq_mon[k+1] : rreq_out)) mech[M_CURTAIL]++;
      down_now[k] = g.d2d ? d_src : g.b2d ? b_src : g.u2d ? u_src : NO_PKT;
      up_sent     = g.d2u ? d_src : g.b2u ? b_src : g.u2u ? u_src : NO_PKT;
      d_src = up_sent;
    end
    for (int k = 0; k < N; k++) prev_down[k] = down_now[k];
    if (down_now[0] != pkt_out) fail("traced root output differs from pkt_out");
    if (d_src != up_out) fail("traced top output differs from up_out");
  endtask

  // Check one slot against the reference and advance it.
  task automatic model_slot(logic w, logic r, int unsigned wid);
    entry_t e_out, e_lost;
    logic   have_out, have_lost;
    entry_t e_new;
    int     size_before;
    have_out = 0; have_lost = 0;
    size_before = ref_q.size();
    e_new = '{id: wid, t_in: slot, n_in: size_before};
    if (r) begin
      if (FIFO) begin
        if (ref_q.size() > 0) begin e_out = ref_q.pop_front(); have_out = 1; end
        else if (w) begin e_out = e_new; have_out = 1; w = 0; end
      end else begin
        if (w) begin e_out = e_new; have_out = 1; w = 0; end
        else if (ref_q.size() > 0) begin e_out = ref_q.pop_back(); have_out = 1; end
      end
      if (!have_out) mech[M_EMPTY_READ]++;
    end
    if (w) begin
      if (FIFO) begin
        // The routing table sends a new packet up past every module that
        // holds or is receiving a packet, even when a read in the same slot
        // frees one at the bottom: a full queue loses the new packet whether
        // or not it is read from in that slot.
        if (size_before < N) ref_q.push_back(e_new);
        else begin
          e_lost = e_new; have_lost = 1;
          if (r) mech[M_OVERFLOW_RW]++;
        end
      end else begin
        ref_q.push_back(e_new);
        if (ref_q.size() > N) begin e_lost = ref_q.pop_front(); have_lost = 1; end
      end
    end
    checks++;
    if (pkt_out.valid !== have_out || (have_out && id_of(pkt_out) != e_out.id))
      fail($sformatf("output: got v=%0b id=%0d, expected v=%0b id=%0d",
                     pkt_out.valid, id_of(pkt_out), have_out, have_out ? e_out.id : 0));
    checks++;
    if (up_out.valid !== have_lost || (have_lost && id_of(up_out) != e_lost.id))
      fail($sformatf("overflow: got v=%0b id=%0d, expected v=%0b id=%0d",
                     up_out.valid, id_of(up_out), have_lost, have_lost ? e_lost.id : 0));
    if (have_lost) mech[M_OVERFLOW]++;
    if (have_out && FIFO) begin
      int unsigned s_exp;
      s_exp = e_out.n_in + (slot - e_out.t_in) + 1;
      checks++;
      if (hops[e_out.id] != s_exp)
        fail($sformatf("packet %0d crossed %0d gates, N+T+1 = %0d", e_out.id, hops[e_out.id], s_exp));
    end
    if (have_out) hops.delete(e_out.id);
    if (have_lost) hops.delete(e_lost.id);
  endtask

  // ---------------------------------------------------------------- directed
  // Expected gates per slot, module 0 then module 1, and the read request
  // each module sees.
  gates_t exp_g [8][2];
  logic   exp_r [8][2];
  logic   seq_w [8], seq_r [8];
  int     exp_out_pkt [8];      // index of the packet leaving in each slot, 0 = none
  int     exp_hops [5];         // gates crossed by packets 1..4

  function automatic gates_t gs(string names);
    gates_t g = NO_GATES;
    for (int i = 0; i + 2 < names.len() + 1; i += 4) begin
      string n = names.substr(i, i + 2);
      case (n)
        "D2D": g.d2d = 1; "D2B": g.d2b = 1; "D2U": g.d2u = 1;
        "B2D": g.b2d = 1; "B2B": g.b2b = 1; "B2U": g.b2u = 1;
        "U2D": g.u2d = 1; "U2B": g.u2b = 1; "U2U": g.u2u = 1;
        default: ;
      endcase
    end
    return g;
  endfunction

  task automatic setup_directed();
    foreach (exp_g[i, j]) begin exp_g[i][j] = NO_GATES; exp_r[i][j] = 0; end
    if (FIFO) begin
      seq_w = '{1, 1, 0, 0, 1, 0, 1, 0};
      seq_r = '{0, 0, 1, 0, 1, 1, 1, 0};
      exp_g[0][0] = gs("D2B");
      exp_g[1][0] = gs("D2U B2B");     exp_g[1][1] = gs("D2B");
      exp_g[2][0] = gs("B2D");         exp_g[2][1] = gs("B2D");
      exp_g[3][0] = gs("U2B");
      exp_g[4][0] = gs("D2U B2D");     exp_g[4][1] = gs("D2D");
      exp_g[5][0] = gs("U2D");
      exp_g[6][0] = gs("D2D");
      exp_r[2] = '{1, 1}; exp_r[4] = '{1, 1}; exp_r[5] = '{1, 1}; exp_r[6] = '{1, 0};
      exp_out_pkt = '{0, 0, 1, 0, 2, 3, 4, 0};
      exp_hops = '{0, 3, 5, 3, 1};
    end else begin
      seq_w = '{1, 1, 0, 0, 1, 1, 0, 0};
      seq_r = '{0, 0, 1, 1, 0, 1, 1, 0};
      exp_g[0][0] = gs("D2B");
      exp_g[1][0] = gs("D2B B2U");     exp_g[1][1] = gs("D2B");
      exp_g[2][0] = gs("B2D");         exp_g[2][1] = gs("B2D");
      exp_g[3][0] = gs("U2D");
      exp_g[4][0] = gs("D2B");
      exp_g[5][0] = gs("D2D B2B");
      exp_g[6][0] = gs("B2D");
      exp_r[2] = '{1, 1}; exp_r[3] = '{1, 1}; exp_r[5] = '{1, 0}; exp_r[6] = '{1, 1};
      exp_out_pkt = '{0, 0, 2, 1, 0, 4, 3, 0};
      // Packet 1 is pushed up once, which costs a second gate in that slot.
      exp_hops = '{0, 5, 2, 3, 1};
    end
  endtask

  int unsigned pkt_ids [5];
  int          t_written [5];
  int          max_stay;

  // ---------------------------------------------------------------- main
  initial begin
    tag = FIFO ? "FIFO" : "LIFO";
    checks = 0; failures = 0; done = 0;
    foreach (mech[i]) mech[i] = 0;
    foreach (prev_down[i]) prev_down[i] = NO_PKT;
    rst = 1; pkt_in = NO_PKT; rreq_in = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;

    if (N == 2) begin
      int np;
      np = 0;
      setup_directed();
      max_stay = 0;
      for (int s = 0; s < 8; s++) begin
        int unsigned wid;
        wid = 0;
        if (seq_w[s]) begin
          np++;
          wid = next_id++;
          pkt_ids[np] = wid;
          t_written[np] = slot;
          pkt_in = make_pkt(wid);
        end else pkt_in = NO_PKT;
        rreq_in = seq_r[s];
        @(negedge clk);
        for (int k = 0; k < 2; k++) begin
          checks++;
          if (gate_mon[k] !== exp_g[s][k])
            fail($sformatf("directed slot %0d module %0d: gates %9b, expected %9b",
                           s + 1, k, gate_mon[k], exp_g[s][k]));
        end
        checks++;
        if ({rreq_mon[0], rreq_mon[1]} !== {exp_r[s][0], exp_r[s][1]})
          fail($sformatf("directed slot %0d: read requests R0,R1 = %0b%0b", s + 1,
                         rreq_mon[0], rreq_mon[1]));
        checks++;
        if (exp_out_pkt[s] == 0 ? pkt_out.valid
                                : !(pkt_out.valid && id_of(pkt_out) == pkt_ids[exp_out_pkt[s]]))
          fail($sformatf("directed slot %0d: wrong packet out", s + 1));
        if (exp_out_pkt[s] != 0) begin
          int stay;
          stay = slot - t_written[exp_out_pkt[s]];
          if (stay > max_stay) max_stay = stay;
        end
        trace_slot();
        if (exp_out_pkt[s] != 0) begin
          checks++;
          if (hops[pkt_ids[exp_out_pkt[s]]] != exp_hops[exp_out_pkt[s]])
            fail($sformatf("directed: packet %0d crossed %0d gates, expected %0d", exp_out_pkt[s],
                           hops[pkt_ids[exp_out_pkt[s]]], exp_hops[exp_out_pkt[s]]));
        end
        model_slot(seq_w[s], seq_r[s], wid);
        @(posedge clk);
        slot++;
        #1;
      end
      checks++;
      if (max_stay != 3) fail($sformatf("directed: longest stay %0d slots, expected 3", max_stay));
    end

    // Random traffic: light load, heavy load, then drain.
    for (int s = 0; s < SLOTS; s++) begin
      int    phase;
      int    pw, pr;
      logic  w, r;
      int unsigned wid;
      phase = (s * 8) / SLOTS;
      case (phase % 4)
        0: begin pw = 30; pr = 50; end
        1: begin pw = 70; pr = 30; end
        2: begin pw = 90; pr = 10; end
        default: begin pw = 40; pr = 60; end
      endcase
      if (s >= SLOTS - 3 * N - 4) begin pw = 0; pr = 100; end
      w = ($urandom_range(99) < pw);
      r = ($urandom_range(99) < pr);
      wid = 0;
      if (w) begin wid = next_id; next_id++; end
      pkt_in  = w ? make_pkt(wid) : NO_PKT;
      rreq_in = r;
      @(negedge clk);
      trace_slot();
      model_slot(w, r, wid);
      @(posedge clk);
      slot++;
      #1;
    end
    checks++;
    if (ref_q.size() != 0) fail("reference not drained");
    for (int k = 0; k < N; k++) begin
      checks++;
      if (buf_mon[k].valid) fail($sformatf("module %0d still holds a packet after drain", k));
    end

    // Mechanism coverage.
    $display("[%s N=%0d] write=%0d hold=%0d up=%0d readB=%0d readU=%0d through=%0d bounce=%0d push=%0d return_up=%0d curtail=%0d empty_read=%0d overflow=%0d overflow_with_read=%0d",
             tag, N, mech[M_WRITE], mech[M_HOLD], mech[M_UP], mech[M_READ_B], mech[M_READ_U],
             mech[M_THROUGH_ROOT], mech[M_BOUNCE], mech[M_PUSH], mech[M_RETURN_UP],
             mech[M_CURTAIL], mech[M_EMPTY_READ], mech[M_OVERFLOW], mech[M_OVERFLOW_RW]);
    for (int m = 0; m < M_NUM; m++) begin
      logic used;
      used = 1;
      if (FIFO && (m == M_PUSH || m == M_RETURN_UP)) used = 0;
      if (!FIFO && (m == M_UP || m == M_BOUNCE || m == M_OVERFLOW_RW)) used = 0;
      if (N == 1 && m == M_READ_U) used = 0;
      if (N == 1 && m == M_BOUNCE) used = 0;
      checks++;
      if (used && mech[m] == 0) fail($sformatf("mechanism %0d never occurred", m));
      if (!used && mech[m] != 0) fail($sformatf("mechanism %0d should not occur", m));
    end
    done = 1;
  end

endmodule
