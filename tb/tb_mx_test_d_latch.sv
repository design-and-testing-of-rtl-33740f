// tb_mx_test_d_latch -- self-check of the testable D latch, both polarities.
// A positive-enable and a negative-enable instance get the same stimulus.
//  * normal mode {C1,C2} = 01: random E/D changes, Q compared with a
//    behavioural latch of the right polarity, T1 = Q, T2 = 1;
//  * test modes 00 and 11 with random E/D: T1 is the forced constant and the
//    latch node is E ? D : const (positive) or E ? const : D (negative);
//  * the two test vectors: all inputs 0 in mode 00 gives every output 0,
//    all inputs 1 in mode 11 gives every output 1. T2 is gate 3's R = B + C
//    with B tied to 1, so it stays 1 under the all-0s vector too.
`timescale 1ns/1ps
module tb_mx_test_d_latch;
  import mxcqca_pkg::*;

  logic e, d;
  ctrl_e ctrl;
  logic qp, t1p, t2p, qn, t1n, t2n;
  logic [3:0] gp, gn;
  logic mp, mn;  // behavioural state
  int checks = 0, failures = 0;

  mx_test_d_latch #(.NEG_EN(1'b0)) dut_p (.e(e), .d(d), .c1(ctrl[1]), .c2(ctrl[0]),
                                          .q(qp), .t1(t1p), .t2(t2p), .garbage(gp));
  mx_test_d_latch #(.NEG_EN(1'b1)) dut_n (.e(e), .d(d), .c1(ctrl[1]), .c2(ctrl[0]),
                                          .q(qn), .t1(t1n), .t2(t2n), .garbage(gn));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (ctrl=%b e=%0b d=%0b qp=%0b t1p=%0b qn=%0b t1n=%0b mp=%0b mn=%0b)",
               what, ctrl, e, d, qp, t1p, qn, t1n, mp, mn);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl = CTRL_NORMAL;
    e = 1; d = 1; #1; mp = 1;  // positive latch loaded
    e = 0; #1; d = 0; #1; mn = 0;  // negative latch loaded
    check(qp == 1 && qn == 0, "initial load");
    for (int i = 0; i < 400; i++) begin
      if ($urandom_range(1) != 0) e = ~e; else d = ~d;
      if (e) mp = d; else mn = d;
      #1;
      check(qp == mp, "positive latch Q");
      check(qn == mn, "negative latch Q");
      check(t1p == qp && t1n == qn, "normal mode T1 = Q");
      check(t2p && t2n, "T2 = 1");
    end
    // test modes: feedback broken, T1 constant
    for (int m = 0; m < 2; m++) begin
      logic k;
      ctrl = (m != 0) ? CTRL_TEST1 : CTRL_TEST0;
      k = m[0];
      for (int i = 0; i < 50; i++) begin
        e = 1'($urandom_range(1)); d = 1'($urandom_range(1));
        #1;
        check(t1p == k && t1n == k, "test mode forces T1");
        check(qp == (e ? d : k), "positive latch node in test mode");
        check(qn == (e ? k : d), "negative latch node in test mode");
      end
    end
    // the two test vectors
    ctrl = CTRL_TEST0; e = 0; d = 0; #1;
    check({qp, t1p, gp, qn, t1n, gn} == '0, "all-0s vector gives all 0s");
    check(t2p && t2n, "T2 carries the constant 1 of gate 3");
    ctrl = CTRL_TEST1; e = 1; d = 1; #1;
    check({qp, t1p, t2p, gp, qn, t1n, t2n, gn} == '1, "all-1s vector gives all 1s");
    // back to normal mode: the latch works again
    ctrl = CTRL_NORMAL; e = 1; d = 0; #1; e = 0; #1; d = 1; #1;
    check(qp == 0 && qn == 1, "normal mode restored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
