// mx_ms_t_ff -- testable master-slave T flip-flop of MX-CQCA gates.
//
// The master is a positive-enable T latch: the two next-state gates of the
// T latch (gate 1 (A = 1, B = T, C = 0) makes T'; gate 2 (A = T, B = Q,
// C = T') gives Q ? T' : T = Q ^ T) feed a positive-enable testable D latch
// with controls mC1/mC2. The slave is a negative-enable testable D latch with
// controls sC1/sC2. An output gate (A = 1, B = slave Q, C = 0) gives Q on P,
// Q' on its Q output and a second copy of Q on R for the next-state gate.
// As in the T latch, T itself drives gate 2's A input.
//
// Q takes Q ^ T at the falling edge of E: with T = 1 it toggles once per
// clock period, because the next-state gate reads the slave, which is closed
// while the master is open.
//
// Modes: normal mC1 mC2 sC1 sC2 = 0 1 0 1; all-0s test all four 0; all-1s
// test all four 1. The latch types follow the source; the source only names
// this flip-flop, so the slave-fed next-state select and the output copy
// gate are this design's own choices. Storage is in the latches'
// combinational loops (reported by lint and synthesis, and kept); no reset.
module mx_ms_t_ff (
  input  logic        e,
  input  logic        t,
  input  logic        mc1,
  input  logic        mc2,
  input  logic        sc1,
  input  logic        sc2,
  output logic        q,
  output logic        qn,
  output logic        mt1,
  output logic        mt2,
  output logic        st1,
  output logic        st2,
  output logic [11:0] garbage  // {g2.R, g2.P, g1.R, g1.P, slave[3:0], master[3:0]}
);

  logic tn, nxt, mq, sq, q_fb;

  mxcqca_gate u_g1 (.a(1'b1), .b(t),    .c(1'b0), .p(garbage[8]),  .q(tn),  .r(garbage[9]));
  mxcqca_gate u_g2 (.a(t),    .b(q_fb), .c(tn),   .p(garbage[10]), .q(nxt), .r(garbage[11]));

  mx_test_d_latch #(.NEG_EN(1'b0)) u_master (
    .e(e), .d(nxt), .c1(mc1), .c2(mc2), .q(mq), .t1(mt1), .t2(mt2), .garbage(garbage[3:0])
  );
  mx_test_d_latch #(.NEG_EN(1'b1)) u_slave (
    .e(e), .d(mq), .c1(sc1), .c2(sc2), .q(sq), .t1(st1), .t2(st2), .garbage(garbage[7:4])
  );

  mxcqca_gate u_gout (.a(1'b1), .b(sq), .c(1'b0), .p(q), .q(qn), .r(q_fb));

endmodule
