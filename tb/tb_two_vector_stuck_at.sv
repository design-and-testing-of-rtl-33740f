// tb_two_vector_stuck_at -- single stuck-at fault campaign for the two-vector
// test of the testable circuits.
//
// The claim under test: with its feedback broken by the test controls, a
// testable MX-CQCA circuit detects every single stuck-at-1 fault with the
// all-0s vector and every single stuck-at-0 fault with the all-1s vector,
// because each gate is conservative (a wrong 1 or 0 on a gate input changes
// the number of 1s on its outputs and cannot be masked downstream).
// For the testable D latch, the master-slave D flip-flop, the DET D
// flip-flop and the master-slave JK, SR and T flip-flops, every internal net (each gate output, including the ones that
// feed other gates) is forced in turn: to 1 while the all-0s vector is
// applied and to 0 while the all-1s vector is applied. A fault counts as
// detected when any observed output (Q, the T outputs and all garbage
// outputs) differs from its fault-free value. A fault is only excited if the
// vector drives the net to the opposite value; every excited fault must be
// detected, and the unexcited ones (test escapes) are counted. The D-type
// circuits and the SR flip-flop have none; the JK and T flip-flops have 6,
// because their next-state gates invert K and T.
// All-0s vector: every data, enable and control input 0; the T2-type outputs
// still read 1, because gate 3 of each latch has its B input tied to 1.
`timescale 1ns/1ps
module tb_two_vector_stuck_at;
  logic e = 0, d = 0, c = 0;          // one vector drives every input
  // testable D latch
  logic tl_q, tl_t1, tl_t2; logic [3:0] tl_g;
  // master-slave D flip-flop
  logic ms_q, ms_mt1, ms_mt2, ms_st1, ms_st2; logic [7:0] ms_g;
  // DET D flip-flop
  logic det_q, det_pt1, det_pt2, det_nt1, det_nt2; logic [10:0] det_g;
  // master-slave JK, SR and T flip-flops
  logic jk_q, jk_qn, jk_mt1, jk_mt2, jk_st1, jk_st2; logic [11:0] jk_g;
  logic sr_q, sr_qn, sr_mt1, sr_mt2, sr_st1, sr_st2; logic [11:0] sr_g;
  logic t_q, t_qn, t_mt1, t_mt2, t_st1, t_st2; logic [11:0] t_g;
  int checks = 0, failures = 0, injected = 0, esc_d = 0, esc_jkt = 0, esc_sr = 0;

  mx_ms_jk_ff u_jk (.e(e), .j(d), .k(d), .mc1(c), .mc2(c), .sc1(c), .sc2(c),
    .q(jk_q), .qn(jk_qn), .mt1(jk_mt1), .mt2(jk_mt2), .st1(jk_st1), .st2(jk_st2), .garbage(jk_g));
  mx_ms_sr_ff u_sr (.e(e), .s(d), .r(d), .mc1(c), .mc2(c), .sc1(c), .sc2(c),
    .q(sr_q), .qn(sr_qn), .mt1(sr_mt1), .mt2(sr_mt2), .st1(sr_st1), .st2(sr_st2), .garbage(sr_g));
  mx_ms_t_ff u_t (.e(e), .t(d), .mc1(c), .mc2(c), .sc1(c), .sc2(c),
    .q(t_q), .qn(t_qn), .mt1(t_mt1), .mt2(t_mt2), .st1(t_st1), .st2(t_st2), .garbage(t_g));
  wire [17:0] jk_obs = {jk_q, jk_qn, jk_mt1, jk_mt2, jk_st1, jk_st2, jk_g};
  wire [17:0] sr_obs = {sr_q, sr_qn, sr_mt1, sr_mt2, sr_st1, sr_st2, sr_g};
  wire [17:0] t_obs  = {t_q, t_qn, t_mt1, t_mt2, t_st1, t_st2, t_g};

  mx_test_d_latch #(.NEG_EN(1'b0)) u_tl (.e(e), .d(d), .c1(c), .c2(c),
    .q(tl_q), .t1(tl_t1), .t2(tl_t2), .garbage(tl_g));
  mx_ms_dff u_ms (.e(e), .d(d), .mc1(c), .mc2(c), .sc1(c), .sc2(c),
    .q(ms_q), .mt1(ms_mt1), .mt2(ms_mt2), .st1(ms_st1), .st2(ms_st2), .garbage(ms_g));
  mx_det_dff u_det (.e(e), .d(d), .dc1(c), .dc2(c), .pc1(c), .pc2(c), .nc1(c), .nc2(c),
    .q(det_q), .pt1(det_pt1), .pt2(det_pt2), .nt1(det_nt1), .nt2(det_nt2), .garbage(det_g));

  wire [6:0]  tl_obs  = {tl_q, tl_t1, tl_t2, tl_g};
  wire [12:0] ms_obs  = {ms_q, ms_mt1, ms_mt2, ms_st1, ms_st2, ms_g};
  wire [15:0] det_obs = {det_q, det_pt1, det_pt2, det_nt1, det_nt2, det_g};

  // fault-free responses, worked out by hand from the gate equations
  localparam logic [6:0]  TL_GOOD0  = 7'b0010000;            // only T2
  localparam logic [12:0] MS_GOOD0  = 13'b0010100000000;     // mT2, sT2
  localparam logic [15:0] DET_GOOD0 = 16'b0010100000000000;  // pT2, nT2
  // master-slave JK/SR/T: the copy gates' constant inputs show through
  localparam logic [17:0] FF_GOOD0  = 18'b010101_1000_0000_0000;
  localparam logic [17:0] JKT_GOOD1 = 18'b101111_1111_0111_1101;
  localparam logic [17:0] SR_GOOD1  = 18'b101111_1011_1111_1111;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic apply(input logic v);
    e = v; d = v; c = v; #1;
  endtask

  // Inject a stuck-at fault on NET and compare the observed bundle OBS.
  // Inject a stuck-at fault on NET and compare the observed bundle OBS.
  // A fault is excited when the vector drives NET to the opposite value;
  // an excited fault must be detected, an unexcited one is a test escape.
  `define STUCK_AT(NET, OBS, GOOD0, GOOD1, ESC) \
    begin \
      apply(1'b0); \
      if (NET == 1'b0) begin \
        force NET = 1'b1; #1; \
        check(OBS != GOOD0, `"stuck-at-1 on NET detected by all-0s`"); \
        release NET; #1; \
      end else ESC++; \
      apply(1'b1); \
      if (NET == 1'b1) begin \
        force NET = 1'b0; #1; \
        check(OBS != GOOD1, `"stuck-at-0 on NET detected by all-1s`"); \
        release NET; #1; \
      end else ESC++; \
      injected += 2; \
    end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fault-free responses first
    apply(1'b0);
    check(tl_obs == TL_GOOD0 && ms_obs == MS_GOOD0 && det_obs == DET_GOOD0, "fault-free all-0s response");
    apply(1'b1);
    check(&tl_obs && &ms_obs && &det_obs, "fault-free all-1s response");
    check(jk_obs == JKT_GOOD1 && t_obs == JKT_GOOD1 && sr_obs == SR_GOOD1, "fault-free all-1s response, JK/SR/T");
    apply(1'b0);
    check(jk_obs == FF_GOOD0 && t_obs == FF_GOOD0 && sr_obs == FF_GOOD0, "fault-free all-0s response, JK/SR/T");

    // testable D latch: latch node, gate-2 output, gate-3 outputs, garbage
    `STUCK_AT(u_tl.n, tl_obs, TL_GOOD0, '1, esc_d)
    `STUCK_AT(u_tl.sel_fb, tl_obs, TL_GOOD0, '1, esc_d)
    `STUCK_AT(u_tl.t1, tl_obs, TL_GOOD0, '1, esc_d)
    `STUCK_AT(u_tl.q, tl_obs, TL_GOOD0, '1, esc_d)
    `STUCK_AT(u_tl.garbage[3], tl_obs, TL_GOOD0, '1, esc_d)
    `STUCK_AT(u_tl.garbage[0], tl_obs, TL_GOOD0, '1, esc_d)
    // master-slave flip-flop: both latches and the master-to-slave net
    `STUCK_AT(u_ms.u_master.n, ms_obs, MS_GOOD0, '1, esc_d)
    `STUCK_AT(u_ms.u_master.sel_fb, ms_obs, MS_GOOD0, '1, esc_d)
    `STUCK_AT(u_ms.mq, ms_obs, MS_GOOD0, '1, esc_d)
    `STUCK_AT(u_ms.mt1, ms_obs, MS_GOOD0, '1, esc_d)
    `STUCK_AT(u_ms.u_slave.n, ms_obs, MS_GOOD0, '1, esc_d)
    `STUCK_AT(u_ms.u_slave.sel_fb, ms_obs, MS_GOOD0, '1, esc_d)
    `STUCK_AT(u_ms.st1, ms_obs, MS_GOOD0, '1, esc_d)
    `STUCK_AT(u_ms.q, ms_obs, MS_GOOD0, '1, esc_d)
    // DET flip-flop: D copies, both latches, latch outputs, gate 8
    `STUCK_AT(u_det.d_pos, det_obs, DET_GOOD0, '1, esc_d)
    `STUCK_AT(u_det.d_neg, det_obs, DET_GOOD0, '1, esc_d)
    `STUCK_AT(u_det.u_pos.n, det_obs, DET_GOOD0, '1, esc_d)
    `STUCK_AT(u_det.u_pos.sel_fb, det_obs, DET_GOOD0, '1, esc_d)
    `STUCK_AT(u_det.pt1, det_obs, DET_GOOD0, '1, esc_d)
    `STUCK_AT(u_det.q_pos, det_obs, DET_GOOD0, '1, esc_d)
    `STUCK_AT(u_det.u_neg.n, det_obs, DET_GOOD0, '1, esc_d)
    `STUCK_AT(u_det.u_neg.sel_fb, det_obs, DET_GOOD0, '1, esc_d)
    `STUCK_AT(u_det.nt1, det_obs, DET_GOOD0, '1, esc_d)
    `STUCK_AT(u_det.q_neg, det_obs, DET_GOOD0, '1, esc_d)
    `STUCK_AT(u_det.q, det_obs, DET_GOOD0, '1, esc_d)

    // master-slave JK flip-flop: next state, both latches, output copy
    `STUCK_AT(u_jk.nxt, jk_obs, FF_GOOD0, JKT_GOOD1, esc_jkt)
    `STUCK_AT(u_jk.u_master.n, jk_obs, FF_GOOD0, JKT_GOOD1, esc_jkt)
    `STUCK_AT(u_jk.mq, jk_obs, FF_GOOD0, JKT_GOOD1, esc_jkt)
    `STUCK_AT(u_jk.u_slave.n, jk_obs, FF_GOOD0, JKT_GOOD1, esc_jkt)
    `STUCK_AT(u_jk.sq, jk_obs, FF_GOOD0, JKT_GOOD1, esc_jkt)
    `STUCK_AT(u_jk.q_fb, jk_obs, FF_GOOD0, JKT_GOOD1, esc_jkt)
    // master-slave SR flip-flop: next state, both latches, output copy
    `STUCK_AT(u_sr.nxt, sr_obs, FF_GOOD0, SR_GOOD1, esc_sr)
    `STUCK_AT(u_sr.u_master.n, sr_obs, FF_GOOD0, SR_GOOD1, esc_sr)
    `STUCK_AT(u_sr.mq, sr_obs, FF_GOOD0, SR_GOOD1, esc_sr)
    `STUCK_AT(u_sr.u_slave.n, sr_obs, FF_GOOD0, SR_GOOD1, esc_sr)
    `STUCK_AT(u_sr.sq, sr_obs, FF_GOOD0, SR_GOOD1, esc_sr)
    `STUCK_AT(u_sr.q_fb, sr_obs, FF_GOOD0, SR_GOOD1, esc_sr)
    // master-slave T flip-flop: next state, both latches, output copy
    `STUCK_AT(u_t.nxt, t_obs, FF_GOOD0, JKT_GOOD1, esc_jkt)
    `STUCK_AT(u_t.u_master.n, t_obs, FF_GOOD0, JKT_GOOD1, esc_jkt)
    `STUCK_AT(u_t.mq, t_obs, FF_GOOD0, JKT_GOOD1, esc_jkt)
    `STUCK_AT(u_t.u_slave.n, t_obs, FF_GOOD0, JKT_GOOD1, esc_jkt)
    `STUCK_AT(u_t.sq, t_obs, FF_GOOD0, JKT_GOOD1, esc_jkt)
    `STUCK_AT(u_t.q_fb, t_obs, FF_GOOD0, JKT_GOOD1, esc_jkt)

    $display("stuck-at faults injected: %0d", injected);
    $display("not excited by either vector: D-type circuits %0d, MS JK and T %0d, MS SR %0d",
             esc_d, esc_jkt, esc_sr);
    check(injected == 86, "all faults injected");
    check(esc_d == 0, "D latch, MS D and DET D flip-flops: every fault excited");
    check(esc_sr == 0, "MS SR flip-flop: every fault excited");
    // The JK and T front ends invert K and T, so under the all-1s vector the
    // next-state net and the master latch are 0: stuck-at-0 on the next-state
    // net, the master node and the master output (3 nets in each of the two
    // flip-flops) cannot be excited by the two vectors.
    check(esc_jkt == 6, "MS JK and T flip-flops: the 6 known escapes only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
