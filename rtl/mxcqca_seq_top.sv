// mxcqca_seq_top -- the family of MX-CQCA sequential circuits, side by side.
//
// The circuits are separate designs built with one method (conservative
// MX-CQCA gates, with feedback that test controls can force to 0 or 1); they
// share no signals. This top instantiates each of them once and brings all
// of its ports out under a prefix:
//   dl_   plain one-gate D latch                      (mx_d_latch)
//   tl_   testable D latch, positive enable           (mx_test_d_latch)
//   ms_   testable master-slave D flip-flop           (mx_ms_dff)
//   det_  testable double-edge-triggered D flip-flop  (mx_det_dff)
//   jk_, sr_, t_  JK, SR and T latches                (mx_jk_latch, ...)
//   msjk_, mssr_, mst_  testable master-slave JK, SR and T flip-flops
//                                                     (mx_ms_jk_ff, ...)
// Every output is a zero-delay combinational function of the inputs and of
// the state held in the circuits' feedback loops; there is no clock or reset
// common to the circuits. Lint and synthesis report the combinational loops
// of the sub-blocks; they are the storage of the latches and stay.
module mxcqca_seq_top (
  // plain D latch
  input  logic        dl_e,
  input  logic        dl_d,
  output logic        dl_q,
  output logic [1:0]  dl_garbage,
  // testable D latch
  input  logic        tl_e,
  input  logic        tl_d,
  input  logic        tl_c1,
  input  logic        tl_c2,
  output logic        tl_q,
  output logic        tl_t1,
  output logic        tl_t2,
  output logic [3:0]  tl_garbage,
  // master-slave D flip-flop
  input  logic        ms_e,
  input  logic        ms_d,
  input  logic        ms_mc1,
  input  logic        ms_mc2,
  input  logic        ms_sc1,
  input  logic        ms_sc2,
  output logic        ms_q,
  output logic        ms_mt1,
  output logic        ms_mt2,
  output logic        ms_st1,
  output logic        ms_st2,
  output logic [7:0]  ms_garbage,
  // double-edge-triggered D flip-flop
  input  logic        det_e,
  input  logic        det_d,
  input  logic        det_dc1,
  input  logic        det_dc2,
  input  logic        det_pc1,
  input  logic        det_pc2,
  input  logic        det_nc1,
  input  logic        det_nc2,
  output logic        det_q,
  output logic        det_pt1,
  output logic        det_pt2,
  output logic        det_nt1,
  output logic        det_nt2,
  output logic [10:0] det_garbage,
  // JK latch
  input  logic        jk_e,
  input  logic        jk_j,
  input  logic        jk_k,
  output logic        jk_q,
  output logic        jk_qn,
  output logic [6:0]  jk_garbage,
  // SR latch
  input  logic        sr_e,
  input  logic        sr_s,
  input  logic        sr_r,
  output logic        sr_q,
  output logic        sr_qn,
  output logic [6:0]  sr_garbage,
  // master-slave JK flip-flop
  input  logic        msjk_e,
  input  logic        msjk_j,
  input  logic        msjk_k,
  input  logic        msjk_mc1,
  input  logic        msjk_mc2,
  input  logic        msjk_sc1,
  input  logic        msjk_sc2,
  output logic        msjk_q,
  output logic        msjk_qn,
  output logic        msjk_mt1,
  output logic        msjk_mt2,
  output logic        msjk_st1,
  output logic        msjk_st2,
  output logic [11:0] msjk_garbage,
  // master-slave SR flip-flop
  input  logic        mssr_e,
  input  logic        mssr_s,
  input  logic        mssr_r,
  input  logic        mssr_mc1,
  input  logic        mssr_mc2,
  input  logic        mssr_sc1,
  input  logic        mssr_sc2,
  output logic        mssr_q,
  output logic        mssr_qn,
  output logic        mssr_mt1,
  output logic        mssr_mt2,
  output logic        mssr_st1,
  output logic        mssr_st2,
  output logic [11:0] mssr_garbage,
  // master-slave T flip-flop
  input  logic        mst_e,
  input  logic        mst_t,
  input  logic        mst_mc1,
  input  logic        mst_mc2,
  input  logic        mst_sc1,
  input  logic        mst_sc2,
  output logic        mst_q,
  output logic        mst_qn,
  output logic        mst_mt1,
  output logic        mst_mt2,
  output logic        mst_st1,
  output logic        mst_st2,
  output logic [11:0] mst_garbage,
  // T latch
  input  logic        t_e,
  input  logic        t_t,
  output logic        t_q,
  output logic        t_qn,
  output logic [6:0]  t_garbage
);

  mx_d_latch u_dl (.e(dl_e), .d(dl_d), .q(dl_q), .garbage(dl_garbage));

  mx_test_d_latch #(.NEG_EN(1'b0)) u_tl (
    .e(tl_e), .d(tl_d), .c1(tl_c1), .c2(tl_c2),
    .q(tl_q), .t1(tl_t1), .t2(tl_t2), .garbage(tl_garbage)
  );

  mx_ms_dff u_ms (
    .e(ms_e), .d(ms_d), .mc1(ms_mc1), .mc2(ms_mc2), .sc1(ms_sc1), .sc2(ms_sc2),
    .q(ms_q), .mt1(ms_mt1), .mt2(ms_mt2), .st1(ms_st1), .st2(ms_st2), .garbage(ms_garbage)
  );

  mx_det_dff u_det (
    .e(det_e), .d(det_d), .dc1(det_dc1), .dc2(det_dc2),
    .pc1(det_pc1), .pc2(det_pc2), .nc1(det_nc1), .nc2(det_nc2),
    .q(det_q), .pt1(det_pt1), .pt2(det_pt2), .nt1(det_nt1), .nt2(det_nt2), .garbage(det_garbage)
  );

  mx_jk_latch u_jk (.e(jk_e), .j(jk_j), .k(jk_k), .q(jk_q), .qn(jk_qn), .garbage(jk_garbage));
  mx_sr_latch u_sr (.e(sr_e), .s(sr_s), .r(sr_r), .q(sr_q), .qn(sr_qn), .garbage(sr_garbage));
  mx_t_latch  u_t  (.e(t_e),  .t(t_t),  .q(t_q),  .qn(t_qn),  .garbage(t_garbage));

  mx_ms_jk_ff u_msjk (
    .e(msjk_e), .j(msjk_j), .k(msjk_k), .mc1(msjk_mc1), .mc2(msjk_mc2), .sc1(msjk_sc1), .sc2(msjk_sc2),
    .q(msjk_q), .qn(msjk_qn), .mt1(msjk_mt1), .mt2(msjk_mt2), .st1(msjk_st1), .st2(msjk_st2),
    .garbage(msjk_garbage)
  );

  mx_ms_sr_ff u_mssr (
    .e(mssr_e), .s(mssr_s), .r(mssr_r), .mc1(mssr_mc1), .mc2(mssr_mc2), .sc1(mssr_sc1), .sc2(mssr_sc2),
    .q(mssr_q), .qn(mssr_qn), .mt1(mssr_mt1), .mt2(mssr_mt2), .st1(mssr_st1), .st2(mssr_st2),
    .garbage(mssr_garbage)
  );

  mx_ms_t_ff u_mst (
    .e(mst_e), .t(mst_t), .mc1(mst_mc1), .mc2(mst_mc2), .sc1(mst_sc1), .sc2(mst_sc2),
    .q(mst_q), .qn(mst_qn), .mt1(mst_mt1), .mt2(mst_mt2), .st1(mst_st1), .st2(mst_st2),
    .garbage(mst_garbage)
  );

endmodule
