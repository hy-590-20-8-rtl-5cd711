// Serial four-phase controller: output handshake first.
//
// A request r on the left starts a complete four-phase cycle on the right
// (R+, A+, R-, A-) and only then is the left acknowledged (a+); the left
// return-to-zero (r-, a-) follows. One state signal csc0 separates the two
// halves. The synthesized equations are
//   a    = csc0 A'
//   R    = r csc0'
//   csc0 = A + r csc0        (an SR latch set by A and reset by r',
//                             equivalently a C-element of A and r with the
//                             r input acting only on the falling side)
// csc0 is built as a generalized C-element (set A, reset r'). The reset rst
// (active high, asynchronous, csc0 = 0) is this design's addition. No clock.
// Lint and synthesis report the state-holding cells as latches and the
// feedback through them as combinational loops: both are the intended
// asynchronous behaviour of this circuit, not a coding error.
module serial_ctrl (
  input  logic rst,
  input  logic r,   // left request
  input  logic A,   // right acknowledge
  output logic a,   // left acknowledge
  output logic R    // right request
);
  logic csc0;

  gc_element #(.INIT(1'b0)) u_csc0 (.rst(rst), .set(A), .clr(~r), .q(csc0));

  assign a = csc0 & ~A;
  assign R = r & ~csc0;
endmodule
