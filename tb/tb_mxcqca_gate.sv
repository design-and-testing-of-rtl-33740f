// tb_mxcqca_gate -- exhaustive self-check of the MX-CQCA gate.
// All eight input vectors are applied; each output is compared with the
// gate equations written out here as sums of products, and the conservative
// property (as many 1s out as in) is checked for every vector. The package
// functions are checked against the same reference.
`timescale 1ns/1ps
module tb_mxcqca_gate;
  import mxcqca_pkg::*;

  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;

  mxcqca_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (a=%0b b=%0b c=%0b -> p=%0b q=%0b r=%0b)", what, a, b, c, p, q, r);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      check(p == (a & b), "P = AB");
      check(q == ((a & ~b) | (b & c)), "Q = AB' + BC");
      check(r == (b | c), "R = B + C");
      check(($countones({p, q, r}) == $countones({a, b, c})), "conservative");
      check(mx_q(a, b, c) == ((a & ~b) | (b & c)), "package mx_q");
    end
    // the enum codes used by every testable latch
    check(CTRL_NORMAL == 2'b01 && CTRL_TEST0 == 2'b00 && CTRL_TEST1 == 2'b11, "control codes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
