// Four-phase handshake controller with concurrent input and output cycles,
// complex-gate implementation.
//
// The controller sits between a push channel on its left (req r, ack a) and
// a push channel on its right (REQ R, ACK A). A request on the left starts a
// full four-phase cycle on the right, while the left acknowledge is allowed
// to run ahead: the return-to-zero phases of the two sides overlap. Because
// the same input values recur with different outputs, three internal state
// signals csc0..csc2 were inserted to give every state a unique code; they
// start at 1 and r, A, a, R start at 0.
//
// Every output is one complex gate with feedback, f(q, inputs):
//   a    = a (csc2 + csc0) + csc1'
//   R    = csc2 (csc0 (a + r) + R)
//   csc0 = csc0 (csc1' + a') + R' csc2
//   csc1 = r' (csc0 + csc1)
//   csc2 = A' (csc0' (csc1' + a') + csc2)
// Each is realised as a generalized C-element whose set is f(0, inputs) and
// whose clear is the complement of f(1, inputs), which is the same function.
//
// Interface: rst is an active-high asynchronous reset to the initial state
// (this design's addition). There is no clock; the circuit is speed
// independent and each output settles after its gate delay.
// Lint and synthesis report the state-holding cells as latches and the
// feedback through them as combinational loops: both are the intended
// asynchronous behaviour of this circuit, not a coding error.
module csc_ctrl_cg (
  input  logic rst,
  input  logic r,   // left request
  input  logic A,   // right acknowledge
  output logic a,   // left acknowledge
  output logic R    // right request
);
  logic csc0, csc1, csc2;

  // a = a (csc2 + csc0) + csc1'
  gc_element #(.INIT(1'b0)) u_a (
    .rst(rst), .set(~csc1), .clr(~(csc2 | csc0) & csc1), .q(a));
  // R = csc2 csc0 (a + r) + csc2 R
  gc_element #(.INIT(1'b0)) u_R (
    .rst(rst), .set(csc2 & csc0 & (a | r)), .clr(~csc2), .q(R));
  // csc0 = csc0 (csc1' + a') + R' csc2
  gc_element #(.INIT(1'b1)) u_csc0 (
    .rst(rst), .set(~R & csc2), .clr(csc1 & a & ~(~R & csc2)), .q(csc0));
  // csc1 = r' csc0 + r' csc1
  gc_element #(.INIT(1'b1)) u_csc1 (
    .rst(rst), .set(~r & csc0), .clr(r), .q(csc1));
  // csc2 = A' csc0' (csc1' + a') + A' csc2
  gc_element #(.INIT(1'b1)) u_csc2 (
    .rst(rst), .set(~A & ~csc0 & (~csc1 | ~a)), .clr(A), .q(csc2));
endmodule
