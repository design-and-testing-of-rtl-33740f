// mx_det_dff -- testable double-edge-triggered (DET) D flip-flop of eight
// MX-CQCA gates.
//
// Gate 1 (A = dC2, B = D, C = dC1) makes two copies of D, since reversible
// logic allows no fan-out: with dC2 = 1 and dC1 = 0 both P and R equal D.
// P feeds the positive-enable testable latch (gates 2-4, controls pC1/pC2)
// and R the negative-enable one (gates 5-7, controls nC1/nC2); the two
// latches work in parallel. Gate 8 (A = positive latch, B = E, C = negative
// latch) multiplexes to Q whichever latch is holding: the negative latch
// while E = 1, the positive latch while E = 0. Q therefore takes the value of
// D at both the rising and the falling edge of E.
//
// Modes, as in the source design:
//   normal     : dC2 dC1 = 1 0, pC1 pC2 nC1 nC2 = 0 1 0 1
//   all-0s test: dC2 dC1 = 0 0, all four latch controls 0
//   all-1s test: dC2 dC1 = 1 1, all four latch controls 1
// In both test modes both latch feedbacks are broken (pT1, nT1 forced), so
// the all-0s vector must give all 0s and the all-1s vector all 1s on every
// output. Which copy of D goes to which latch, and the gate-8 input order,
// are read from the schematic and the stated function; the negative-enable
// latch construction is this design's own (see mx_test_d_latch).
// Storage is in the latches' combinational loops, which lint and synthesis
// report as combinational loops; they stay. There is no reset.
module mx_det_dff (
  input  logic        e,
  input  logic        d,
  input  logic        dc1,
  input  logic        dc2,
  input  logic        pc1,
  input  logic        pc2,
  input  logic        nc1,
  input  logic        nc2,
  output logic        q,
  output logic        pt1,
  output logic        pt2,
  output logic        nt1,
  output logic        nt2,
  output logic [10:0] garbage  // {g8.R, g8.P, neg latch[3:0], pos latch[3:0], g1.Q}
);

  logic d_pos, d_neg;  // copies of D from gate 1
  logic q_pos, q_neg;  // latch outputs

  mxcqca_gate u_g1 (.a(dc2), .b(d), .c(dc1), .p(d_pos), .q(garbage[0]), .r(d_neg));

  mx_test_d_latch #(.NEG_EN(1'b0)) u_pos (  // gates 2, 3, 4
    .e(e), .d(d_pos), .c1(pc1), .c2(pc2),
    .q(q_pos), .t1(pt1), .t2(pt2), .garbage(garbage[4:1])
  );

  mx_test_d_latch #(.NEG_EN(1'b1)) u_neg (  // gates 5, 6, 7
    .e(e), .d(d_neg), .c1(nc1), .c2(nc2),
    .q(q_neg), .t1(nt1), .t2(nt2), .garbage(garbage[8:5])
  );

  mxcqca_gate u_g8 (.a(q_pos), .b(e), .c(q_neg), .p(garbage[9]), .q(q), .r(garbage[10]));

endmodule
