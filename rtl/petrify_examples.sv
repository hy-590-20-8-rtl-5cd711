// Collection of speed-independent handshake circuits, side by side.
//
// The circuits are independent; each keeps its own ports, prefixed by its
// instance name, and all share the asynchronous reset rst (active high):
//   flt_*  averaging filter, OUT = (IN + previous IN) / 2   (filter)
//   abm_*  all-bundled handshake multiplexer               (abmux)
//   drm_*  handshake multiplexer with dual-rail control     (drmux)
//   cg_*   concurrent 4-phase controller, complex gates     (csc_ctrl_cg)
//   gc_*   the same controller, generalized C-elements      (csc_ctrl_gc)
//   ser_*  serial controller, output handshake first        (serial_ctrl)
//   dec_*  decoupled C-element controller                   (c_hs_ctrl)
//   lat_*  latch-controlled pipeline stage                  (latch_stage)
// Every four-phase controller has a left push channel (req, ack) and a right
// push channel (REQ, ACK), named *_r, *_a, *_R, *_A. W is the data width of
// the circuits that carry data (8, this design's choice). No clock.
// Lint and synthesis report the state-holding cells as latches and the
// feedback through them as combinational loops: both are the intended
// asynchronous behaviour of this circuit, not a coding error.
module petrify_examples #(
  parameter int W = 8
) (
  input  logic         rst,
  // averaging filter
  input  logic         flt_Rin,
  output logic         flt_Ain,
  input  logic [W-1:0] flt_IN,
  output logic         flt_Rout,
  input  logic         flt_Aout,
  output logic [W-1:0] flt_OUT,
  // all-bundled multiplexer
  input  logic         abm_In0Req,
  output logic         abm_In0Ack,
  input  logic [W-1:0] abm_In0Data,
  input  logic         abm_In1Req,
  output logic         abm_In1Ack,
  input  logic [W-1:0] abm_In1Data,
  input  logic         abm_Ctl1Req,
  output logic         abm_Ctl1Ack,
  input  logic         abm_Ctl1,
  output logic         abm_OutReq,
  input  logic         abm_OutAck,
  output logic [W-1:0] abm_OutData,
  // dual-rail-control multiplexer
  input  logic         drm_x_req,
  output logic         drm_x_ack,
  input  logic [W-1:0] drm_x,
  input  logic         drm_y_req,
  output logic         drm_y_ack,
  input  logic [W-1:0] drm_y,
  input  logic         drm_ctl_f,
  input  logic         drm_ctl_t,
  output logic         drm_ctl_ack,
  output logic         drm_z_req,
  input  logic         drm_z_ack,
  output logic [W-1:0] drm_z,
  // four-phase controllers
  input  logic         cg_r,
  output logic         cg_a,
  output logic         cg_R,
  input  logic         cg_A,
  input  logic         gc_r,
  output logic         gc_a,
  output logic         gc_R,
  input  logic         gc_A,
  input  logic         ser_r,
  output logic         ser_a,
  output logic         ser_R,
  input  logic         ser_A,
  input  logic         dec_r,
  output logic         dec_a,
  output logic         dec_R,
  input  logic         dec_A,
  // latch-controlled stage
  input  logic         lat_Rin,
  output logic         lat_Ain,
  input  logic [W-1:0] lat_din,
  output logic         lat_Rout,
  input  logic         lat_Aout,
  output logic [W-1:0] lat_dout,
  output logic         lat_Lt
);
  filter #(.W(W)) u_flt (
    .rst(rst), .Rin(flt_Rin), .Ain(flt_Ain), .IN(flt_IN),
    .Rout(flt_Rout), .Aout(flt_Aout), .OUT(flt_OUT));

  abmux #(.W(W)) u_abm (
    .rst(rst),
    .In0Req(abm_In0Req), .In0Ack(abm_In0Ack), .In0Data(abm_In0Data),
    .In1Req(abm_In1Req), .In1Ack(abm_In1Ack), .In1Data(abm_In1Data),
    .Ctl1Req(abm_Ctl1Req), .Ctl1Ack(abm_Ctl1Ack), .Ctl1(abm_Ctl1),
    .OutReq(abm_OutReq), .OutAck(abm_OutAck), .OutData(abm_OutData));

  drmux #(.W(W)) u_drm (
    .rst(rst),
    .x_req(drm_x_req), .x_ack(drm_x_ack), .x(drm_x),
    .y_req(drm_y_req), .y_ack(drm_y_ack), .y(drm_y),
    .ctl_f(drm_ctl_f), .ctl_t(drm_ctl_t), .ctl_ack(drm_ctl_ack),
    .z_req(drm_z_req), .z_ack(drm_z_ack), .z(drm_z));

  csc_ctrl_cg u_cg  (.rst(rst), .r(cg_r),  .A(cg_A),  .a(cg_a),  .R(cg_R));
  csc_ctrl_gc u_gc  (.rst(rst), .r(gc_r),  .A(gc_A),  .a(gc_a),  .R(gc_R));
  serial_ctrl u_ser (.rst(rst), .r(ser_r), .A(ser_A), .a(ser_a), .R(ser_R));
  c_hs_ctrl   u_dec (.rst(rst), .r(dec_r), .A(dec_A), .a(dec_a), .R(dec_R));

  latch_stage #(.W(W)) u_lat (
    .rst(rst), .Rin(lat_Rin), .Ain(lat_Ain), .din(lat_din),
    .Rout(lat_Rout), .Aout(lat_Aout), .dout(lat_dout), .Lt(lat_Lt));
endmodule
