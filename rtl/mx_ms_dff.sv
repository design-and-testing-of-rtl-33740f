// mx_ms_dff -- testable master-slave D flip-flop of six MX-CQCA gates.
//
// A positive-enable testable D latch (the master, controls mC1/mC2) feeds a
// negative-enable testable D latch (the slave, controls sC1/sC2). While E = 1
// the master follows D and the slave holds; when E falls the master closes
// and the slave opens, so Q takes the value D had at the falling edge of E
// and keeps it for the next full clock period. The master's latch output
// (its gate 3 P) is the slave's data input.
//
// Modes, as in the source design:
//   normal     : mC1 mC2 sC1 sC2 = 0 1 0 1
//   all-0s test: all four controls 0 (mT1 = sT1 = 0, feedbacks broken)
//   all-1s test: all four controls 1 (mT1 = sT1 = 1, feedbacks broken)
// The latch polarities (master positive, slave negative) follow the source;
// the way the negative-enable latch is made is described in mx_test_d_latch.
// Storage is in the two latches' combinational loops, which lint and
// synthesis report as combinational loops; they stay. There is no reset.
module mx_ms_dff (
  input  logic       e,
  input  logic       d,
  input  logic       mc1,
  input  logic       mc2,
  input  logic       sc1,
  input  logic       sc2,
  output logic       q,
  output logic       mt1,
  output logic       mt2,
  output logic       st1,
  output logic       st2,
  output logic [7:0] garbage   // {slave garbage, master garbage}
);

  logic mq;  // master latch output

  mx_test_d_latch #(.NEG_EN(1'b0)) u_master (
    .e(e), .d(d), .c1(mc1), .c2(mc2),
    .q(mq), .t1(mt1), .t2(mt2), .garbage(garbage[3:0])
  );

  mx_test_d_latch #(.NEG_EN(1'b1)) u_slave (
    .e(e), .d(mq), .c1(sc1), .c2(sc2),
    .q(q), .t1(st1), .t2(st2), .garbage(garbage[7:4])
  );

endmodule
