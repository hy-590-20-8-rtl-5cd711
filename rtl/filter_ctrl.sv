// Controller of the asynchronous averaging filter.
//
// It sequences five four-phase handshakes: the input channel (Rin in, Ain
// out), the x latch (Rx, Ax), the y latch (Ry, Ay), the bundled-data adder
// (Ra, Aa) and the output channel (Rout out, Aout in). One cycle, from the
// initial state with every signal 0, runs
//   Rin+ -> Rx+ Ax+ Ra+ Aa+ Rout+ Aout+ z+ Rout- Aout- Ry+ Ay+ Rx- Ax-
//        -> (Ain+ Rin-) in parallel with (Ra- Aa-) -> z- -> Ry-
//        -> (Ay-) in parallel with (Ain-, then the next Rin+)
// x is opened only while the input is valid and y is closed; the output is
// handed out before y takes the new x, and the input is acknowledged only
// after x has closed again. The state signal z separates the two halves of
// the cycle in which the inputs look alike.
//
// Equations (derived from that cycle; they match the published gate-level
// implementation, which is five gates with inverted inputs, an OR and one
// C-element):
//   Rx   = Rin Ay'          Ry   = z Aout'         Ain = Ry Ax'
//   Ra   = Ax               Rout = Aa z'
//   z    = C(Aout, Rin + Aa)
// z is the only state-holding element; rst (active high, asynchronous,
// z = 0) is this design's addition. No clock.
// Lint and synthesis report the state-holding cells as latches and the
// feedback through them as combinational loops: both are the intended
// asynchronous behaviour of this circuit, not a coding error.
module filter_ctrl (
  input  logic rst,
  input  logic Rin,
  output logic Ain,
  output logic Rx,
  input  logic Ax,
  output logic Ry,
  input  logic Ay,
  output logic Ra,
  input  logic Aa,
  output logic Rout,
  input  logic Aout
);
  logic z;

  c_element #(.INIT(1'b0)) u_z (.rst(rst), .a(Aout), .b(Rin | Aa), .q(z));

  assign Rx   = Rin & ~Ay;
  assign Ry   = z & ~Aout;
  assign Ain  = Ry & ~Ax;
  assign Ra   = Ax;
  assign Rout = Aa & ~z;
endmodule
