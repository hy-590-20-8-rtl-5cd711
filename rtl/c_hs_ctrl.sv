// Decoupled four-phase controller (one C-element).
//
// The left acknowledge is the right request, a = R, and the right request is
// a C-element of the left request and the inverted right acknowledge:
//   R = C(r, A')  i.e.  R = R (r' A)' + r A'
// R rises once a new request has arrived and the previous output cycle has
// been acknowledged back to zero, and falls once the request is withdrawn and
// the output has been acknowledged. This is the Muller pipeline stage; a
// chain of them is a data-less FIFO.
// rst (active high, asynchronous, R = 0) is this design's addition. No clock.
// Lint and synthesis report the state-holding cells as latches and the
// feedback through them as combinational loops: both are the intended
// asynchronous behaviour of this circuit, not a coding error.
module c_hs_ctrl (
  input  logic rst,
  input  logic r,   // left request
  input  logic A,   // right acknowledge
  output logic a,   // left acknowledge
  output logic R    // right request
);
  gc_element #(.INIT(1'b0)) u_R (.rst(rst), .set(r & ~A), .clr(~r & A), .q(R));
  assign a = R;
endmodule
