// mx_sr_latch -- SR latch of four MX-CQCA gates.
//
//   gate 1 (A = Q, B = R, C = 0)         : Q output = R'.Q
//   gate 2 (A = 1, B = R'.Q, C = S)      : R output = S + R'.Q, the next state
//   gate 3 (A = Q, B = E, C = next)      : Q output = E ? next : Q, the latch
//   gate 4 (A = 1, B = latch, C = 0)     : P = Q, Q output = Q'
// So Q+ = E.(S + R'.Q) + E'.Q; S = R = 1 sets the latch. The fed-back Q is
// gate 4's P output. Storage is the combinational loop, which lint and
// synthesis report and which stays; no reset. The gate
// connections follow the source schematic.
module mx_sr_latch (
  input  logic       e,
  input  logic       s,
  input  logic       r,
  output logic       q,
  output logic       qn,
  output logic [6:0] garbage   // {g4.R, g3.R, g3.P, g2.Q, g2.P, g1.R, g1.P}
);

  logic rq, nxt, lat;

  mxcqca_gate u_g1 (.a(q),    .b(r),   .c(1'b0), .p(garbage[0]), .q(rq),         .r(garbage[1]));
  mxcqca_gate u_g2 (.a(1'b1), .b(rq),  .c(s),    .p(garbage[2]), .q(garbage[3]), .r(nxt));
  mxcqca_gate u_g3 (.a(q),    .b(e),   .c(nxt),  .p(garbage[4]), .q(lat),        .r(garbage[5]));
  mxcqca_gate u_g4 (.a(1'b1), .b(lat), .c(1'b0), .p(q),          .q(qn),         .r(garbage[6]));

endmodule
