// Four-phase handshake controller with concurrent input and output cycles,
// generalized C-element implementation.
//
// Same specification and interface as csc_ctrl_cg: left push channel (r, a),
// right push channel (R, A), three state-coding signals csc0..csc2 that start
// at 1 while r, A, a, R start at 0. Here every signal is one generalized
// C-element, q = q & reset' + set, with these set / reset covers:
//   R    set csc0 csc2 (a + r)        reset csc2' A
//   csc0 set csc2                     reset a csc1 csc2'
//   csc1 set r' csc0                  reset r
//   csc2 set A' csc0' (csc1' + a')    reset R
//   a    set csc1'                    reset csc0' csc1 (R' + A)
// The covers are those of the synthesized netlist; only the reset input rst
// (active high, asynchronous, to the initial state) is this design's own.
// There is no clock.
// Lint and synthesis report the state-holding cells as latches and the
// feedback through them as combinational loops: both are the intended
// asynchronous behaviour of this circuit, not a coding error.
module csc_ctrl_gc (
  input  logic rst,
  input  logic r,   // left request
  input  logic A,   // right acknowledge
  output logic a,   // left acknowledge
  output logic R    // right request
);
  logic csc0, csc1, csc2;

  gc_element #(.INIT(1'b0)) u_R (
    .rst(rst), .set(csc0 & csc2 & (a | r)), .clr(~csc2 & A), .q(R));
  gc_element #(.INIT(1'b1)) u_csc0 (
    .rst(rst), .set(csc2), .clr(a & csc1 & ~csc2), .q(csc0));
  gc_element #(.INIT(1'b1)) u_csc1 (
    .rst(rst), .set(~r & csc0), .clr(r), .q(csc1));
  gc_element #(.INIT(1'b1)) u_csc2 (
    .rst(rst), .set(~A & ~csc0 & (~csc1 | ~a)), .clr(R), .q(csc2));
  gc_element #(.INIT(1'b0)) u_a (
    .rst(rst), .set(~csc1), .clr(~csc0 & csc1 & (~R | A)), .q(a));
endmodule
