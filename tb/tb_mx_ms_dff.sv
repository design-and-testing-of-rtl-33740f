// tb_mx_ms_dff -- self-check of the testable master-slave D flip-flop.
// E is a clock with period 10. D changes at random times away from the
// edges. Q must take the value D had at each falling edge of E, immediately
// (zero delay, checked 1 time unit later), and must not change at rising
// edges or while D moves. Then the two test vectors are applied: all 0s with
// all controls 0 gives all outputs 0 (except mT2, sT2, which pass the
// constant 1 on gate 3 of each latch); all 1s with all controls 1 gives all 1s.
`timescale 1ns/1ps
module tb_mx_ms_dff;
  logic e = 0, d = 0;
  logic mc1, mc2, sc1, sc2;
  logic q, mt1, mt2, st1, st2;
  logic [7:0] g;
  logic model = 0;
  int checks = 0, failures = 0, captures = 0;

  mx_ms_dff dut (.e(e), .d(d), .mc1(mc1), .mc2(mc2), .sc1(sc1), .sc2(sc2),
                 .q(q), .mt1(mt1), .mt2(mt2), .st1(st1), .st2(st2), .garbage(g));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s (e=%0b d=%0b q=%0b model=%0b)", $time, what, e, d, q, model); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {mc1, mc2, sc1, sc2} = 4'b0101;  // normal mode
    e = 1; d = 0; #5; e = 0; #5;      // first falling edge loads 0
    check(q == 0, "initial capture");
    for (int cyc = 0; cyc < 200; cyc++) begin
      logic q_before;
      d = 1'($urandom_range(1)); #2;        // change while E = 0 (slave open, master closed)
      check(q == model, "Q holds while E = 0");
      e = 1; #1;                            // rising edge: nothing captured
      check(q == model, "no change at rising edge");
      d = 1'($urandom_range(1)); #2;        // master follows D
      q_before = q;
      check(q_before == model, "Q holds while E = 1");
      d = 1'($urandom_range(1)); #2;
      model = d;
      e = 0; #1;                            // falling edge captures D
      check(q == model, "capture at falling edge");
      check(mt1 == model && st1 == model, "T1 carries the stored values");
      captures++;
      #2;
    end
    check(captures == 200, "one capture per clock period");
    {mc1, mc2, sc1, sc2} = 4'b0000; e = 0; d = 0; #1;
    check({q, mt1, st1, g} == '0, "all-0s test vector");
    check(mt2 && st2, "T2 outputs carry the constant 1 of gate 3");
    {mc1, mc2, sc1, sc2} = 4'b1111; e = 1; d = 1; #1;
    check({q, mt1, mt2, st1, st2, g} == '1, "all-1s test vector");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
