// mx_jk_latch -- JK latch of four MX-CQCA gates.
//
//   gate 1 (A = 1, B = K,   C = 0)      : Q output = K'
//   gate 2 (A = J, B = Q,   C = K')     : Q output = Q ? K' : J, the JK next state
//   gate 3 (A = Q, B = E,   C = next)   : Q output = E ? next : Q, the latch
//   gate 4 (A = 1, B = latch, C = 0)    : P = Q, Q output = Q'
// So Q+ = E.(J.Q' + K'.Q) + E'.Q. The fed-back Q is gate 4's P output.
// Storage is the combinational loop (reported as such by lint and
// synthesis, and kept); it is a level-sensitive latch, so with
// J = K = 1 and E = 1 the loop keeps toggling for as long as E stays high
// (race-around). In a zero-delay simulation that never settles, so J = K = 1
// must only be applied while E = 0. Gate 3's R output equals the next state
// while E = 0 and is brought out with the other garbage outputs.
// The gate connections follow the source schematic; no reset.
module mx_jk_latch (
  input  logic       e,
  input  logic       j,
  input  logic       k,
  output logic       q,
  output logic       qn,
  output logic [6:0] garbage   // {g4.R, g3.R, g3.P, g2.R, g2.P, g1.R, g1.P}
);

  logic kn, nxt, lat;

  mxcqca_gate u_g1 (.a(1'b1), .b(k),   .c(1'b0), .p(garbage[0]), .q(kn),  .r(garbage[1]));
  mxcqca_gate u_g2 (.a(j),    .b(q),   .c(kn),   .p(garbage[2]), .q(nxt), .r(garbage[3]));
  mxcqca_gate u_g3 (.a(q),    .b(e),   .c(nxt),  .p(garbage[4]), .q(lat), .r(garbage[5]));
  mxcqca_gate u_g4 (.a(1'b1), .b(lat), .c(1'b0), .p(q),          .q(qn),  .r(garbage[6]));

endmodule
