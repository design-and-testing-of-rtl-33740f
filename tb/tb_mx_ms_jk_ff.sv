// tb_mx_ms_jk_ff -- self-check of the testable master-slave JK flip-flop.
// E is a clock of period 10; the inputs change at random away from the
// edges. At every falling edge of E, Q must take the next state J.Q' + K'.Q
// computed here from the previous Q, and Q' must be its inverse; Q must not
// change at rising edges or between edges (one update per clock period).
// Then the two test vectors: every input 0 with all controls 0 must give
// the fault-free all-0s response worked out by hand from the gate
// equations (the constant 1 inputs of the copy gates show up as 1s), and
// every input 1 with all controls 1 must give the fault-free all-1s
// response, likewise worked out by hand (the constant 0 inputs of the copy
// gates leave some 0s).
`timescale 1ns/1ps
module tb_mx_ms_jk_ff;
  logic e = 0, j = 0, k = 0;
  logic mc1 = 0, mc2 = 1, sc1 = 0, sc2 = 1;
  logic q, qn, mt1, mt2, st1, st2;
  logic [11:0] g;
  logic model;
  int checks = 0, failures = 0, updates = 0, changes = 0;

  mx_ms_jk_ff dut (.e(e), .j(j), .k(k), .mc1(mc1), .mc2(mc2), .sc1(sc1), .sc2(sc2),
                  .q(q), .qn(qn), .mt1(mt1), .mt2(mt2), .st1(st1), .st2(st2), .garbage(g));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s (q=%0b model=%0b)", $time, what, q, model); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    j = 0; k = 1;
    e = 1; #5; e = 0; #5;
    model = q;
    check(qn == ~q, "Q' after power-up");
    check(q == 0, "initial clear");
    for (int cyc = 0; cyc < 200; cyc++) begin
      logic nq;
      j = 1'($urandom_range(1)); k = 1'($urandom_range(1)); #2;
      check(q == model, "hold while E = 0");
      e = 1; #1;
      check(q == model, "no change at rising edge");
      j = 1'($urandom_range(1)); k = 1'($urandom_range(1)); #2;
      check(q == model, "hold while E = 1");
      nq = (j & ~model) | (~k & model);
      e = 0; #1;
      if (nq != model) changes++;
      model = nq;
      check(q == model && qn == ~model, "update at falling edge: J.Q' + K'.Q");
      updates++;
      #2;
    end
    check(updates == 200 && changes > 20, "one update per clock period, Q changing");
    // two-vector test
    {mc1, mc2, sc1, sc2} = 4'b0000; e = 0; j = 0; k = 0; #1;
    check({q, qn, mt1, mt2, st1, st2, g} == 18'b010101_1000_0000_0000, "all-0s test vector response");
    {mc1, mc2, sc1, sc2} = 4'b1111; e = 1; j = 1; k = 1; #1;
    check({q, qn, mt1, mt2, st1, st2, g} == 18'b101111_1111_0111_1101, "all-1s test vector response");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
