// tb_mx_det_dff -- self-check of the testable double-edge-triggered D
// flip-flop.
//  * normal mode (dC2 dC1 = 1 0, pC1 pC2 nC1 nC2 = 0 1 0 1): E is a clock of
//    period 10; D changes between edges. Q must take D at every rising and
//    every falling edge (checked 1 time unit after the edge) and hold between
//    edges, i.e. two captures per clock period.
//  * the two static operating points shown in the source's simulation plots
//    (E = D = 1 with dC2 dC1 = 1 0): all latch controls 1 gives Q, pT1, pT2,
//    nT1, nT2 all 1; all latch controls 0 gives pT1 = nT1 = 0, pT2 = nT2 = 1.
//  * the two test vectors: all inputs 0 gives every output 0 (except pT2
//    and nT2, which pass the constant 1 on gates 4 and 7), all inputs 1
//    gives every output 1.
`timescale 1ns/1ps
module tb_mx_det_dff;
  logic e = 0, d = 0, dc1, dc2, pc1, pc2, nc1, nc2;
  logic q, pt1, pt2, nt1, nt2;
  logic [10:0] g;
  logic model = 0;
  int checks = 0, failures = 0, rise_caps = 0, fall_caps = 0;

  mx_det_dff dut (.e(e), .d(d), .dc1(dc1), .dc2(dc2), .pc1(pc1), .pc2(pc2), .nc1(nc1), .nc2(nc2),
                  .q(q), .pt1(pt1), .pt2(pt2), .nt1(nt1), .nt2(nt2), .garbage(g));

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
    {dc2, dc1} = 2'b10; {pc1, pc2, nc1, nc2} = 4'b0101;
    e = 0; d = 0; #5; e = 1; #5; e = 0; #5;   // both latches hold 0
    check(q == 0, "initial capture");
    for (int cyc = 0; cyc < 200; cyc++) begin
      d = 1'($urandom_range(1)); #1; check(q == model, "hold while E = 0");
      d = 1'($urandom_range(1)); #1; check(q == model, "hold while E = 0");
      model = d; e = 1; #1;
      check(q == model, "capture at rising edge");
      if (q == model) rise_caps++;
      d = 1'($urandom_range(1)); #1; check(q == model, "hold while E = 1");
      d = 1'($urandom_range(1)); #1; check(q == model, "hold while E = 1");
      model = d; e = 0; #1;
      check(q == model, "capture at falling edge");
      if (q == model) fall_caps++;
    end
    check(rise_caps == 200 && fall_caps == 200, "two captures per clock period");
    // operating points from the source's waveforms
    e = 1; d = 1; {dc2, dc1} = 2'b10; {pc1, pc2, nc1, nc2} = 4'b1111; #1;
    check({q, nt1, nt2, pt1, pt2} == 5'b11111, "controls 1111: Q, nT1, nT2, pT1, pT2 all 1");
    {pc1, pc2, nc1, nc2} = 4'b0000; #1;
    check({nt1, nt2, pt1, pt2} == 4'b0101, "controls 0000: nT1 0, nT2 1, pT1 0, pT2 1");
    // the two test vectors
    e = 0; d = 0; {dc2, dc1} = 2'b00; {pc1, pc2, nc1, nc2} = 4'b0000; #1;
    check({q, pt1, nt1, g} == '0, "all-0s test vector");
    check(pt2 && nt2, "pT2, nT2 carry the constant 1 of gates 4 and 7");
    e = 1; d = 1; {dc2, dc1} = 2'b11; {pc1, pc2, nc1, nc2} = 4'b1111; #1;
    check({q, pt1, pt2, nt1, nt2, g} == '1, "all-1s test vector");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
