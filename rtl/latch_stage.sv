// Latch-controlled pipeline stage (four-phase bundled data).
//
// The controller is the decoupled C-element controller with a latch-enable
// output: Rout = C(Rin, Aout'), Lt = Rout, Ain = Lt. The data latch is
// transparent while Lt = 0 and holds while Lt = 1, so the input word is
// captured at Lt+, before the input is acknowledged (Ain+) and so before the
// sender may change it; Lt- reopens the latch once the input request has been
// withdrawn and the output cycle acknowledged.
// Interface: bundled-data push channels (Rin, Ain, din) in and
// (Rout, Aout, dout) out; dout is valid while Rout = 1. W is the data width,
// which the specification leaves open (8 is this design's choice). rst
// (active high, asynchronous) clears the controller and the latch. No clock.
// Lint and synthesis report the state-holding cells as latches and the
// feedback through them as combinational loops: both are the intended
// asynchronous behaviour of this circuit, not a coding error.
module latch_stage #(
  parameter int W = 8
) (
  input  logic         rst,
  input  logic         Rin,
  output logic         Ain,
  input  logic [W-1:0] din,
  output logic         Rout,
  input  logic         Aout,
  output logic [W-1:0] dout,
  output logic         Lt     // latch enable: 1 = hold, 0 = transparent
);
  // The controller's left acknowledge equals its output request: it is Lt.
  c_hs_ctrl u_ctrl (.rst(rst), .r(Rin), .A(Aout), .a(Lt), .R(Rout));

  assign Ain = Lt;

  always_latch begin
    if (rst)      dout = '0;
    else if (!Lt) dout = din;
  end
endmodule
