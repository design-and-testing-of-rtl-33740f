// mx_d_latch -- plain D latch made of a single MX-CQCA gate.
//
// The gate's multiplexer output Q is wired back to its A input, E drives the
// select B and D drives C, so Q = E ? D : Q: transparent while E = 1 and
// holding while E = 0 (Q+ = E.D + E'.Q). The storage is this combinational
// feedback loop itself, exactly as in the source schematic, so lint and
// synthesis report a combinational loop here: it is the latch, and it stays.
// The latch has no reset; it is initialised by raising E. P and R of the gate
// carry no function and are brought out as garbage outputs so that every
// gate output can be observed.
//
// This circuit cannot be tested with the two vectors all-0s / all-1s: going
// from all 1s to all 0s leaves Q latched at 1. mx_test_d_latch fixes that.
module mx_d_latch (
  input  logic       e,
  input  logic       d,
  output logic       q,
  output logic [1:0] garbage   // {P, R} of the gate
);

  logic fb;

  mxcqca_gate u_g1 (.a(fb), .b(e), .c(d), .p(garbage[1]), .q(fb), .r(garbage[0]));

  assign q = fb;

endmodule
