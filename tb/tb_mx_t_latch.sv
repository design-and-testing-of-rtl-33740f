// tb_mx_t_latch -- self-check of the T latch.
// T is set at random while E = 0 and gate 3's R output (garbage[5]) is
// compared with the next state Q ^ T. E is pulsed only with T = 0 (T = 1
// with E = 1 keeps the level-sensitive loop toggling); Q must then hold.
// Q' must always be the inverse of Q. The latch has no reset or data input,
// so the testbench loads a known state by briefly forcing the fed-back Q net
// and then checks that the loop keeps it.
`timescale 1ns/1ps
module tb_mx_t_latch;
  logic e = 0, t = 0;  // E = 1 with T = 1 at power-up would oscillate
  logic q, qn;
  logic [6:0] g;
  int checks = 0, failures = 0;

  mx_t_latch dut (.e(e), .t(t), .q(q), .qn(qn), .garbage(g));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (e=%0b t=%0b q=%0b qn=%0b g=%b)", what, e, t, q, qn, g); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    e = 0; t = 0; #1;
    for (int i = 0; i < 300; i++) begin
      logic held;
      if (i % 10 == 0) begin
        held = 1'($urandom_range(1));
        force dut.q = held; #1;
        release dut.q; #1;
        check(q == held, "loaded state is kept by the loop");
      end
      held = q;
      t = 1'($urandom_range(1)); #1;
      check(q == held, "hold while E = 0");
      check(qn == ~q, "Q' = ~Q");
      check(g[5] == (held ^ t), "next state Q ^ T");
      check(g[0] == t, "gate 1 copies T");
      if (!t) begin
        e = 1; #1;
        check(q == held, "T = 0 holds while E = 1");
        e = 0; #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
