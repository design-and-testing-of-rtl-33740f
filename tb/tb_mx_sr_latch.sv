// tb_mx_sr_latch -- self-check of the SR latch.
// Random S, R with E pulses; Q and Q' are compared with the behavioural
// next state S + R'.Q after each pulse, and must hold while E = 0 whatever
// S and R do. S = R = 1 sets the latch. The next state is also checked on
// gate 2's R output (garbage[5] is gate 3's R = E + next, so while E = 0 it
// equals the next state).
`timescale 1ns/1ps
module tb_mx_sr_latch;
  logic e, s, r, q, qn;
  logic [6:0] g;
  logic model;
  int checks = 0, failures = 0;

  mx_sr_latch dut (.e(e), .s(s), .r(r), .q(q), .qn(qn), .garbage(g));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (e=%0b s=%0b r=%0b q=%0b qn=%0b model=%0b)", what, e, s, r, q, qn, model); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    e = 0; s = 0; r = 1; #1; e = 1; #1; e = 0; #1; model = 0;
    check(q == 0 && qn == 1, "reset");
    for (int i = 0; i < 300; i++) begin
      s = 1'($urandom_range(1)); r = 1'($urandom_range(1)); #1;
      check(q == model && qn == ~model, "hold while E = 0");
      check(g[5] == (s | (~r & model)), "next state S + R'.Q");
      e = 1; #1; model = s | (~r & model);
      check(q == model && qn == ~model, "update while E = 1");
      s = 1'($urandom_range(1)); r = 1'($urandom_range(1)); #1;  // still transparent
      model = s | (~r & model);
      check(q == model, "transparent while E = 1");
      e = 0; #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
