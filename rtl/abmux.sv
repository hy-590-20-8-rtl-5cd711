// All-bundled handshake multiplexer (four-phase bundled data).
//
// A control token (Ctl1Req with select bit Ctl1) chooses which of two input
// channels is passed to the output: Ctl1 = 0 takes In0, Ctl1 = 1 takes In1.
// The handshakes are sequenced by abmux_ctrl; the data path is a plain
// two-way multiplexer steered by Ctl1, which stays valid until the control
// channel is acknowledged (at OutAck+), i.e. for as long as OutData must be
// valid. Interface: push channels In0 (In0Req, In0Ack, In0Data), In1 (In1Req,
// In1Ack, In1Data), Ctl (Ctl1Req, Ctl1Ack, Ctl1), Out (OutReq, OutAck,
// OutData). W (8) is this design's choice; rst is active high and
// asynchronous. No clock.
// Lint and synthesis report the state-holding cells as latches and the
// feedback through them as combinational loops: both are the intended
// asynchronous behaviour of this circuit, not a coding error.
module abmux #(
  parameter int W = 8
) (
  input  logic         rst,
  input  logic         In0Req,
  output logic         In0Ack,
  input  logic [W-1:0] In0Data,
  input  logic         In1Req,
  output logic         In1Ack,
  input  logic [W-1:0] In1Data,
  input  logic         Ctl1Req,
  output logic         Ctl1Ack,
  input  logic         Ctl1,
  output logic         OutReq,
  input  logic         OutAck,
  output logic [W-1:0] OutData
);
  abmux_ctrl u_ctrl (
    .rst(rst), .In0Req(In0Req), .In0Ack(In0Ack), .In1Req(In1Req),
    .In1Ack(In1Ack), .Ctl1(Ctl1), .Ctl1Req(Ctl1Req), .Ctl1Ack(Ctl1Ack),
    .OutReq(OutReq), .OutAck(OutAck));

  assign OutData = Ctl1 ? In1Data : In0Data;
endmodule
