// tb_mx_d_latch -- self-check of the single-gate D latch.
// A random sequence changes either E or D, one at a time, and after each step
// compares Q with a behavioural latch (Q follows D while E = 1, holds while
// E = 0). It also shows why this latch is not two-vector testable: after the
// all-1s vector, applying the all-0s vector leaves Q at 1.
`timescale 1ns/1ps
module tb_mx_d_latch;
  logic e, d, q;
  logic [1:0] g;
  logic model;
  int checks = 0, failures = 0;

  mx_d_latch dut (.e(e), .d(d), .q(q), .garbage(g));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (e=%0b d=%0b q=%0b model=%0b)", what, e, d, q, model); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    e = 1; d = 0; model = 0; #1;
    check(q == 0, "transparent load 0");
    for (int i = 0; i < 400; i++) begin
      if ($urandom_range(1) != 0) e = ~e; else d = ~d;
      if (e) model = d;
      #1;
      check(q == model, "latch behaviour");
      check(g == {e & q, e | d}, "garbage outputs P, R");
    end
    // all-1s then all-0s: Q stays 1, the flaw the testable latch removes
    e = 1; d = 1; #1; e = 0; #1; d = 0; #1;
    check(q == 1'b1, "Q keeps 1 after all-1s -> all-0s");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
