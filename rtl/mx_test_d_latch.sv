// mx_test_d_latch -- D latch of three MX-CQCA gates that can be tested with
// only the all-0s and all-1s input vectors.
//
// Gate 1 is the latch multiplexer: its Q output (the latch node n) is the
// data input while enabled and the feedback T1 otherwise. Gate 2 takes the
// controls C1 (A) and C2 (C) with n as its select, so its Q output is
// n ? C2 : C1. Gate 3 (A = n, B = 1, C = gate-2 Q) copies n to its P output
// (the latch output Q), passes gate 2's value to T1, and gives T2 = 1.
//   {C1,C2} = 01 : T1 = n, the loop is closed and the circuit is a D latch
//   {C1,C2} = 00 : T1 = 0, loop broken, all-0s vector gives all-0s outputs
//   {C1,C2} = 11 : T1 = 1, loop broken, all-1s vector gives all-1s outputs
// Because every gate is conservative, a stuck-at-1 fault shows as a 1 under
// the all-0s vector and a stuck-at-0 fault as a 0 under the all-1s vector.
//
// NEG_EN = 0 gives a positive-enable latch (gate 1: A = T1, B = E, C = D;
// transparent while E = 1), as in the source schematic. NEG_EN = 1 gives the
// negative-enable latch that the flip-flops need; the source draws it with
// the same gate, and here it is made by swapping gate 1's two data inputs
// (A = D, C = T1), so it is transparent while E = 0 without any inverter.
// That swap is this design's own choice.
//
// The storage is the combinational loop through gates 1-3; lint and synthesis
// report it as a combinational loop, and it stays because it is the latch.
// No reset: the state is set by the enable. Outputs are combinational
// (zero-delay) functions of the inputs and the stored node.
module mx_test_d_latch #(
  parameter bit NEG_EN = 1'b0
) (
  input  logic       e,
  input  logic       d,
  input  logic       c1,
  input  logic       c2,
  output logic       q,
  output logic       t1,
  output logic       t2,
  output logic [3:0] garbage   // {g1.P, g1.R, g2.P, g2.R}
);

  logic n;       // latch node, gate 1 Q output
  logic sel_fb;  // gate 2 Q output: the value returned on T1

  if (NEG_EN) begin : g_neg
    mxcqca_gate u_g1 (.a(d),  .b(e), .c(t1), .p(garbage[3]), .q(n), .r(garbage[2]));
  end else begin : g_pos
    mxcqca_gate u_g1 (.a(t1), .b(e), .c(d),  .p(garbage[3]), .q(n), .r(garbage[2]));
  end

  mxcqca_gate u_g2 (.a(c1), .b(n),    .c(c2),     .p(garbage[1]), .q(sel_fb), .r(garbage[0]));
  mxcqca_gate u_g3 (.a(n),  .b(1'b1), .c(sel_fb), .p(q),          .q(t1),     .r(t2));

endmodule
