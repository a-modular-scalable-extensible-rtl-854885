// tb_optical_packet_buffer_full: the buffer exactly as configured by
// default (a two-module queue) taken through the illustrative sequence and
// then random traffic with overflow and drain, checked by obuf_env.
module tb_optical_packet_buffer_full;
  import obuf_pkg::*;

  localparam int N = 2;   // the default module count

  logic   clk = 0;
  logic   rst, rreq_in, rreq_out;
  pkt_t   pkt_in, pkt_out, up_out;
  pkt_t   buf_mon [N];
  logic   rreq_mon [N];
  gates_t gate_mon [N];
  int     checks, failures;
  logic   done;

  always #5 clk = ~clk;

  optical_packet_buffer dut (
    .clk, .rst, .pkt_in, .rreq_in, .pkt_out, .up_out, .up_in(NO_PKT), .rreq_out,
    .buf_mon, .rreq_mon, .gate_mon);

  obuf_env #(.MODE(MODE_FIFO), .N(N), .SLOTS(2000)) env (
    .clk, .rst, .pkt_in, .rreq_in, .pkt_out, .up_out, .rreq_out,
    .buf_mon, .rreq_mon, .gate_mon, .checks, .failures, .done);

  initial begin
    repeat (4) @(posedge clk);
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
