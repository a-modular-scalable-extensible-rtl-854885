// tb_obuf_pkg: checks the gate sets the package assigns to each kind of
// module. A queue module is built with seven gates (no B2U, no U2U), a stack
// module above the root with seven (no D2U, no D2D), and the stack's root
// with eight (no D2U). Also checks the packet word width: presence flag,
// 7-bit label and 900-bit payload.
module tb_obuf_pkg;
  import obuf_pkg::*;

  int checks = 0, failures = 0;

  task automatic expect_gates(string what, gates_t got, gates_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %9b, expected %9b", what, got, exp);
    end
  endtask

  initial begin
    //                                                       d2d d2b d2u b2d b2b b2u u2d u2b u2u
    expect_gates("queue root",  gates_needed(MODE_FIFO, 1'b1), 9'b1_1_1_1_1_0_1_1_0);
    expect_gates("queue upper", gates_needed(MODE_FIFO, 1'b0), 9'b1_1_1_1_1_0_1_1_0);
    expect_gates("stack root",  gates_needed(MODE_LIFO, 1'b1), 9'b1_1_0_1_1_1_1_1_1);
    expect_gates("stack upper", gates_needed(MODE_LIFO, 1'b0), 9'b0_1_0_1_1_1_1_1_1);
    checks++;
    if ($countones(gates_needed(MODE_FIFO, 1'b0)) != 7 || $countones(gates_needed(MODE_LIFO, 1'b0)) != 7) begin
      failures++;
      $display("module drawings have seven gates each");
    end
    checks++;
    if ($bits(pkt_t) != 1 + 7 + 900) begin
      failures++;
      $display("packet word is %0d bits", $bits(pkt_t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
