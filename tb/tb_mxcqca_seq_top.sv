// tb_mxcqca_seq_top -- end-to-end test of every circuit in the top level.
//
// Each circuit is taken through normal operation and, where it has test
// controls, through both two-vector test modes; results are compared with
// behavioural models written here. Each mechanism of the design is counted
// and a mechanism that never happens counts as a failure:
//   latch transparent / latch hold          (all latches)
//   feedback forced to 0 / forced to 1      (testable latch, MS and DET FFs)
//   all-0s and all-1s test vector passes    (testable latch, MS and DET FFs)
//   capture at falling edge                 (MS flip-flop)
//   capture at rising and at falling edge   (DET flip-flop)
//   JK set, reset, hold, toggle next state  (JK latch)
//   SR set, reset, set-dominant S = R = 1   (SR latch)
//   T toggle next state                     (T latch)
//   JK toggle at a falling edge, SR set-dominant update, T toggle at a
//   falling edge, and both test vectors     (master-slave JK/SR/T FFs)
// The top has no parameters, so this is also the full-size run. The JK and
// T latch inputs start at 0: with E = 1 and a toggle input of 1 their loops
// would oscillate from power-up.
`timescale 1ns/1ps
module tb_mxcqca_seq_top;
  import mxcqca_pkg::*;

  logic dl_e, dl_d, dl_q; logic [1:0] dl_g;
  logic tl_e, tl_d, tl_c1, tl_c2, tl_q, tl_t1, tl_t2; logic [3:0] tl_g;
  logic ms_e, ms_d, ms_mc1, ms_mc2, ms_sc1, ms_sc2, ms_q, ms_mt1, ms_mt2, ms_st1, ms_st2; logic [7:0] ms_g;
  logic det_e, det_d, det_dc1, det_dc2, det_pc1, det_pc2, det_nc1, det_nc2;
  logic det_q, det_pt1, det_pt2, det_nt1, det_nt2; logic [10:0] det_g;
  logic jk_e = 0, jk_j = 0, jk_k = 0; logic jk_q, jk_qn; logic [6:0] jk_g;
  logic sr_e = 0, sr_s = 0, sr_r = 0; logic sr_q, sr_qn; logic [6:0] sr_g;
  logic t_e = 0, t_t = 0; logic t_q, t_qn; logic [6:0] t_g;
  logic msjk_e = 0, msjk_j = 0, msjk_k = 0, mssr_e = 0, mssr_s = 0, mssr_r = 0, mst_e = 0, mst_t = 0;
  logic msjk_mc1, msjk_mc2, msjk_sc1, msjk_sc2, mssr_mc1, mssr_mc2, mssr_sc1, mssr_sc2;
  logic mst_mc1, mst_mc2, mst_sc1, mst_sc2;
  logic msjk_q, msjk_qn, msjk_mt1, msjk_mt2, msjk_st1, msjk_st2; logic [11:0] msjk_garbage;
  logic mssr_q, mssr_qn, mssr_mt1, mssr_mt2, mssr_st1, mssr_st2; logic [11:0] mssr_garbage;
  logic mst_q, mst_qn, mst_mt1, mst_mt2, mst_st1, mst_st2; logic [11:0] mst_garbage;

  mxcqca_seq_top dut (.*,
    .dl_garbage(dl_g), .tl_garbage(tl_g), .ms_garbage(ms_g), .det_garbage(det_g),
    .jk_garbage(jk_g), .sr_garbage(sr_g), .t_garbage(t_g));

  int checks = 0, failures = 0;
  typedef enum int {M_TRANSPARENT, M_HOLD, M_FORCE0, M_FORCE1, M_VEC0, M_VEC1,
                    M_MS_FALL, M_DET_RISE, M_DET_FALL,
                    M_JK_SET, M_JK_RESET, M_JK_HOLD, M_JK_TOGGLE,
                    M_SR_SET, M_SR_RESET, M_SR_BOTH, M_T_TOGGLE,
                    M_MSJK_TOGGLE, M_MSSR_BOTH, M_MST_TOGGLE, M_COUNT} mech_e;
  int seen [M_COUNT];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- latches
  task automatic run_d_latches();
    logic m_dl, m_tl;
    {tl_c1, tl_c2} = CTRL_NORMAL;
    dl_e = 1; dl_d = 0; tl_e = 1; tl_d = 0; #1; m_dl = 0; m_tl = 0;
    for (int i = 0; i < 200; i++) begin
      logic v;
      v = 1'($urandom_range(1));
      if ($urandom_range(1) != 0) begin dl_e = ~dl_e; tl_e = ~tl_e; end
      else begin dl_d = v; tl_d = ~v; end
      if (dl_e) m_dl = dl_d;
      if (tl_e) m_tl = tl_d;
      #1;
      check(dl_q == m_dl, "plain D latch");
      check(tl_q == m_tl && tl_t1 == m_tl, "testable D latch, normal mode");
      seen[dl_e ? M_TRANSPARENT : M_HOLD]++;
    end
    // test modes of the testable latch
    {tl_c1, tl_c2} = CTRL_TEST0; tl_e = 0; tl_d = 1; #1;
    check(tl_t1 == 0 && tl_q == 0, "C1C2=00 forces T1 to 0"); seen[M_FORCE0]++;
    tl_d = 0; #1;
    check({tl_q, tl_t1, tl_g} == '0 && tl_t2, "testable latch, all-0s vector"); seen[M_VEC0]++;
    {tl_c1, tl_c2} = CTRL_TEST1; tl_e = 0; tl_d = 0; #1;
    check(tl_t1 == 1 && tl_q == 1, "C1C2=11 forces T1 to 1"); seen[M_FORCE1]++;
    tl_e = 1; tl_d = 1; #1;
    check({tl_q, tl_t1, tl_t2, tl_g} == '1, "testable latch, all-1s vector"); seen[M_VEC1]++;
    {tl_c1, tl_c2} = CTRL_NORMAL; #1;
  endtask

  // ------------------------------------------------------ MS and DET flip-flops
  task automatic run_flip_flops();
    logic m_ms, m_det;
    {ms_mc1, ms_mc2, ms_sc1, ms_sc2} = 4'b0101;
    {det_dc2, det_dc1} = 2'b10; {det_pc1, det_pc2, det_nc1, det_nc2} = 4'b0101;
    ms_e = 1; det_e = 1; ms_d = 0; det_d = 0; #5;
    ms_e = 0; det_e = 0; #5; m_ms = 0; m_det = 0;
    check(ms_q == 0 && det_q == 0, "flip-flops loaded");
    for (int cyc = 0; cyc < 100; cyc++) begin
      ms_d = 1'($urandom_range(1)); det_d = 1'($urandom_range(1)); #2;
      check(ms_q == m_ms && det_q == m_det, "flip-flops hold while E = 0");
      m_det = det_d; ms_e = 1; det_e = 1; #1;
      check(ms_q == m_ms, "MS: no capture at rising edge");
      check(det_q == m_det, "DET: capture at rising edge"); seen[M_DET_RISE] += int'(det_q == m_det);
      ms_d = 1'($urandom_range(1)); det_d = 1'($urandom_range(1)); #2;
      check(ms_q == m_ms && det_q == m_det, "flip-flops hold while E = 1");
      m_ms = ms_d; m_det = det_d; ms_e = 0; det_e = 0; #1;
      check(ms_q == m_ms, "MS: capture at falling edge"); seen[M_MS_FALL] += int'(ms_q == m_ms);
      check(det_q == m_det, "DET: capture at falling edge"); seen[M_DET_FALL] += int'(det_q == m_det);
      #2;
    end
    // test modes
    {ms_mc1, ms_mc2, ms_sc1, ms_sc2} = 4'b0000; ms_e = 0; ms_d = 0;
    {det_dc2, det_dc1} = 2'b00; {det_pc1, det_pc2, det_nc1, det_nc2} = 4'b0000; det_e = 0; det_d = 0; #1;
    check(ms_mt1 == 0 && ms_st1 == 0 && det_pt1 == 0 && det_nt1 == 0, "controls 0 force T1 to 0"); seen[M_FORCE0]++;
    check({ms_q, ms_mt1, ms_st1, ms_g} == '0 && ms_mt2 && ms_st2, "MS all-0s vector"); seen[M_VEC0]++;
    check({det_q, det_pt1, det_nt1, det_g} == '0 && det_pt2 && det_nt2, "DET all-0s vector"); seen[M_VEC0]++;
    {ms_mc1, ms_mc2, ms_sc1, ms_sc2} = 4'b1111; ms_e = 1; ms_d = 1;
    {det_dc2, det_dc1} = 2'b11; {det_pc1, det_pc2, det_nc1, det_nc2} = 4'b1111; det_e = 1; det_d = 1; #1;
    check(ms_mt1 && ms_st1 && det_pt1 && det_nt1, "controls 1 force T1 to 1"); seen[M_FORCE1]++;
    check({ms_q, ms_mt1, ms_mt2, ms_st1, ms_st2, ms_g} == '1, "MS all-1s vector"); seen[M_VEC1]++;
    check({det_q, det_pt1, det_pt2, det_nt1, det_nt2, det_g} == '1, "DET all-1s vector"); seen[M_VEC1]++;
  endtask

  // ------------------------------------------------------ JK, SR, T latches
  task automatic run_jk_sr_t();
    logic m_jk, m_sr;
    jk_e = 0; jk_j = 0; jk_k = 1; #1; jk_e = 1; #1; jk_e = 0; #1; m_jk = 0;
    sr_e = 0; sr_s = 0; sr_r = 1; #1; sr_e = 1; #1; sr_e = 0; #1; m_sr = 0;
    t_e = 0; t_t = 0; #1;
    for (int i = 0; i < 200; i++) begin
      logic nj, ns, held_t;
      jk_j = 1'($urandom_range(1)); jk_k = 1'($urandom_range(1));
      sr_s = 1'($urandom_range(1)); sr_r = 1'($urandom_range(1));
      t_t = 1'($urandom_range(1)); held_t = t_q; #1;
      nj = (jk_j & ~m_jk) | (~jk_k & m_jk);
      ns = sr_s | (~sr_r & m_sr);
      check(jk_g[5] == nj, "JK next state");
      check(sr_g[5] == ns, "SR next state");
      check(t_g[5] == (held_t ^ t_t) && t_q == held_t && t_qn == ~t_q, "T next state");
      if (t_t) seen[M_T_TOGGLE]++;
      if (jk_j & jk_k) seen[M_JK_TOGGLE]++;
      else begin
        seen[jk_j ? M_JK_SET : (jk_k ? M_JK_RESET : M_JK_HOLD)]++;
        jk_e = 1; #1; m_jk = nj;
        check(jk_q == m_jk && jk_qn == ~m_jk, "JK latch update");
        jk_e = 0; #1;
      end
      seen[(sr_s & sr_r) ? M_SR_BOTH : sr_s ? M_SR_SET : M_SR_RESET] += (sr_s | sr_r) ? 1 : 0;
      sr_e = 1; #1; m_sr = ns;
      check(sr_q == m_sr && sr_qn == ~m_sr, "SR latch update");
      sr_e = 0; #1;
    end
  endtask

  // ------------------------------------- master-slave JK, SR, T flip-flops
  task automatic run_ms_jk_sr_t();
    logic m_jk, m_sr, m_t;
    {msjk_mc1, msjk_mc2, msjk_sc1, msjk_sc2} = 4'b0101;
    {mssr_mc1, mssr_mc2, mssr_sc1, mssr_sc2} = 4'b0101;
    {mst_mc1, mst_mc2, mst_sc1, mst_sc2} = 4'b0101;
    msjk_j = 0; msjk_k = 1; mssr_s = 0; mssr_r = 1; mst_t = 0;
    msjk_e = 1; mssr_e = 1; mst_e = 1; #5; msjk_e = 0; mssr_e = 0; mst_e = 0; #5;
    m_jk = 0; m_sr = 0; m_t = mst_q;
    check(msjk_q == 0 && mssr_q == 0, "MS flip-flops cleared");
    for (int cyc = 0; cyc < 100; cyc++) begin
      msjk_j = 1'($urandom_range(1)); msjk_k = 1'($urandom_range(1));
      mssr_s = 1'($urandom_range(1)); mssr_r = 1'($urandom_range(1));
      mst_t = 1'($urandom_range(1)); #2;
      msjk_e = 1; mssr_e = 1; mst_e = 1; #3;
      check(msjk_q == m_jk && mssr_q == m_sr && mst_q == m_t, "MS flip-flops hold while E = 1");
      if (msjk_j & msjk_k) seen[M_MSJK_TOGGLE]++;
      if (mssr_s & mssr_r) seen[M_MSSR_BOTH]++;
      if (mst_t) seen[M_MST_TOGGLE]++;
      m_jk = (msjk_j & ~m_jk) | (~msjk_k & m_jk);
      m_sr = mssr_s | (~mssr_r & m_sr);
      m_t = m_t ^ mst_t;
      msjk_e = 0; mssr_e = 0; mst_e = 0; #1;
      check(msjk_q == m_jk && msjk_qn == ~m_jk, "MS JK update at falling edge");
      check(mssr_q == m_sr && mssr_qn == ~m_sr, "MS SR update at falling edge");
      check(mst_q == m_t && mst_qn == ~m_t, "MS T update at falling edge");
      #4;
    end
    // two-vector test, responses worked out by hand from the gate equations
    {msjk_mc1, msjk_mc2, msjk_sc1, msjk_sc2} = 4'b0000; msjk_e = 0; msjk_j = 0; msjk_k = 0;
    {mst_mc1, mst_mc2, mst_sc1, mst_sc2} = 4'b0000; mst_e = 0; mst_t = 0; #1;
    check({msjk_q, msjk_qn, msjk_mt1, msjk_mt2, msjk_st1, msjk_st2, msjk_garbage} == 18'b010101_1000_0000_0000,
          "MS JK all-0s vector");
    check({mst_q, mst_qn, mst_mt1, mst_mt2, mst_st1, mst_st2, mst_garbage} == 18'b010101_1000_0000_0000,
          "MS T all-0s vector");
    seen[M_VEC0]++;
    {msjk_mc1, msjk_mc2, msjk_sc1, msjk_sc2} = 4'b1111; msjk_e = 1; msjk_j = 1; msjk_k = 1;
    {mst_mc1, mst_mc2, mst_sc1, mst_sc2} = 4'b1111; mst_e = 1; mst_t = 1; #1;
    check({msjk_q, msjk_qn, msjk_mt1, msjk_mt2, msjk_st1, msjk_st2, msjk_garbage} == 18'b101111_1111_0111_1101,
          "MS JK all-1s vector");
    check({mst_q, mst_qn, mst_mt1, mst_mt2, mst_st1, mst_st2, mst_garbage} == 18'b101111_1111_0111_1101,
          "MS T all-1s vector");
    seen[M_VEC1]++;
    {mssr_mc1, mssr_mc2, mssr_sc1, mssr_sc2} = 4'b0000; mssr_e = 0; mssr_s = 0; mssr_r = 0; #1;
    check({mssr_q, mssr_qn, mssr_mt1, mssr_mt2, mssr_st1, mssr_st2, mssr_garbage} == 18'b010101_1000_0000_0000,
          "MS SR all-0s vector");
    {mssr_mc1, mssr_mc2, mssr_sc1, mssr_sc2} = 4'b1111; mssr_e = 1; mssr_s = 1; mssr_r = 1; #1;
    check({mssr_q, mssr_qn, mssr_mt1, mssr_mt2, mssr_st1, mssr_st2, mssr_garbage} == 18'b101111_1011_1111_1111,
          "MS SR all-1s vector");
  endtask

  initial begin
    run_d_latches();
    run_flip_flops();
    run_jk_sr_t();
    run_ms_jk_sr_t();
    for (int m = 0; m < M_COUNT; m++) begin
      mech_e me;
      me = mech_e'(m);
      $display("mechanism %-14s happened %0d times", me.name(), seen[m]);
      check(seen[m] > 0, $sformatf("mechanism %s happened", me.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
