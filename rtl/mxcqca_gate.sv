// mxcqca_gate -- the multiplexer conservative QCA (MX-CQCA) gate.
//
// A purely combinational 3-input, 3-output gate:
//   P = A & B
//   Q = A & ~B | B & C   (a 2:1 multiplexer: B selects C, otherwise A)
//   R = B | C
// The gate is conservative: the number of 1s on P,Q,R always equals the
// number of 1s on A,B,C. All the latches and flip-flops in this library are
// networks of this one gate. The equations are those of the source design;
// there is no timing beyond zero-delay combinational logic.
module mxcqca_gate
  import mxcqca_pkg::*;
(
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  assign p = mx_p(a, b);
  assign q = mx_q(a, b, c);
  assign r = mx_r(b, c);

endmodule
