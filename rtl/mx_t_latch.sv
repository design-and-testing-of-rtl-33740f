// mx_t_latch -- T latch of four MX-CQCA gates.
//
//   gate 1 (A = 1, B = T, C = 0)         : Q output = T'
//   gate 2 (A = T, B = Q, C = T')        : Q output = Q ? T' : T = Q ^ T
//   gate 3 (A = Q, B = E, C = next)      : Q output = E ? next : Q, the latch
//   gate 4 (A = 1, B = latch, C = 0)     : P = Q, Q output = Q'
// So Q+ = E.(Q ^ T) + E'.Q. Storage is the combinational loop, which lint
// and synthesis report and which stays. Being level
// sensitive, the latch keeps toggling while T = 1 and E = 1; in a zero-delay
// simulation that never settles, so T = 1 must only be applied while E = 0.
// Gate 3's R output equals the next state Q ^ T while E = 0. The gate
// connections follow the source schematic; no reset.
module mx_t_latch (
  input  logic       e,
  input  logic       t,
  output logic       q,
  output logic       qn,
  output logic [6:0] garbage   // {g4.R, g3.R, g3.P, g2.R, g2.P, g1.R, g1.P}
);

  logic tn, nxt, lat;

  mxcqca_gate u_g1 (.a(1'b1), .b(t),   .c(1'b0), .p(garbage[0]), .q(tn),  .r(garbage[1]));
  mxcqca_gate u_g2 (.a(t),    .b(q),   .c(tn),   .p(garbage[2]), .q(nxt), .r(garbage[3]));
  mxcqca_gate u_g3 (.a(q),    .b(e),   .c(nxt),  .p(garbage[4]), .q(lat), .r(garbage[5]));
  mxcqca_gate u_g4 (.a(1'b1), .b(lat), .c(1'b0), .p(q),          .q(qn),  .r(garbage[6]));

endmodule
