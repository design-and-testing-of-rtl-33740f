// mxcqca_pkg -- shared definitions for the MX-CQCA sequential circuits.
//
// The MX-CQCA gate maps (A,B,C) to P = A&B, Q = B ? C : A, R = B|C. It is
// conservative: every output vector holds as many 1s as its input vector,
// which is what makes the circuits built from it testable with just two
// vectors, all 0s and all 1s. The functions below give the three outputs so
// that the gate module and the testbenches' reference models share one
// definition.
//
// Every testable latch has a pair of controls {C1,C2} that decide what the
// latch feedback T1 carries: 01 passes the latch node (normal operation),
// 00 forces T1 to 0 (all-0s test), 11 forces T1 to 1 (all-1s test). These
// three codes follow the source description; the fourth code (10) is never
// used by the design and would feed back the inverted latch node.
//
// The latches built from the gate store their state in combinational
// feedback loops through mx_q(); lint reports those loops against this
// function. They are the storage elements of the design and stay.
package mxcqca_pkg;

  typedef enum logic [1:0] {
    CTRL_TEST0  = 2'b00,  // feedback forced to 0: test with all-0s vector
    CTRL_NORMAL = 2'b01,  // feedback closed: the circuit stores data
    CTRL_SWAP   = 2'b10,  // unused: feedback carries the inverted node
    CTRL_TEST1  = 2'b11   // feedback forced to 1: test with all-1s vector
  } ctrl_e;

  function automatic logic mx_p(input logic a, input logic b);
    return a & b;
  endfunction

  function automatic logic mx_q(input logic a, input logic b, input logic c);
    return b ? c : a;
  endfunction

  function automatic logic mx_r(input logic b, input logic c);
    return b | c;
  endfunction

endpackage
