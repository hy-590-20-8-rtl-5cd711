// Controller of the all-bundled handshake multiplexer.
//
// Channels: two input push channels (In0Req/In0Ack, In1Req/In1Ack), one
// bundled control channel (Ctl1Req/Ctl1Ack with the select bit Ctl1, valid
// while Ctl1Req = 1) and one output push channel (OutReq/OutAck). For each
// control token the input named by Ctl1 is passed on: OutReq rises once the
// control and that input have both requested, OutAck is returned to the
// selected input and to the control channel, and the output returns to zero
// once both have withdrawn their requests. The other input waits.
//
// The state signal csc0 remembers which input is being served (1: In0,
// 0: In1) after Ctl1Req has been withdrawn. Synthesized equations, with the
// three gC-mapped signals built as generalized C-elements:
//   In1Ack  = OutAck csc0'
//   In0Ack  = OutAck csc0
//   OutReq  set Ctl1Req (In1Req csc0' + In0Req Ctl1')
//           reset Ctl1Req' (In1Req' csc0' + In0Req' csc0)
//   Ctl1Ack set OutAck                reset OutAck' csc0
//   csc0    set OutAck' Ctl1Req'      reset Ctl1Req Ctl1
// The reset rst (active high, asynchronous; csc0 = 1, others 0) is this
// design's addition. No clock.
// Lint and synthesis report the state-holding cells as latches and the
// feedback through them as combinational loops: both are the intended
// asynchronous behaviour of this circuit, not a coding error.
module abmux_ctrl (
  input  logic rst,
  input  logic In0Req,
  output logic In0Ack,
  input  logic In1Req,
  output logic In1Ack,
  input  logic Ctl1,
  input  logic Ctl1Req,
  output logic Ctl1Ack,
  output logic OutReq,
  input  logic OutAck
);
  logic csc0;

  assign In1Ack = OutAck & ~csc0;
  assign In0Ack = OutAck & csc0;

  gc_element #(.INIT(1'b0)) u_outreq (
    .rst(rst),
    .set( Ctl1Req & ((In1Req & ~csc0) | (In0Req & ~Ctl1))),
    .clr(~Ctl1Req & ((~In1Req & ~csc0) | (~In0Req & csc0))),
    .q(OutReq));
  gc_element #(.INIT(1'b0)) u_ctl1ack (
    .rst(rst), .set(OutAck), .clr(~OutAck & csc0), .q(Ctl1Ack));
  gc_element #(.INIT(1'b1)) u_csc0 (
    .rst(rst), .set(~OutAck & ~Ctl1Req), .clr(Ctl1Req & Ctl1), .q(csc0));
endmodule
