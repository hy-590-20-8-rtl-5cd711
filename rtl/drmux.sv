// Handshake multiplexer with dual-rail control (four-phase bundled data).
//
// Two data push channels x and y and a control channel whose value is sent
// dual-rail (ctl_f = select x, ctl_t = select y, never both) share one
// acknowledge ctl_ack. The control and the chosen input meet in a C-element;
// the two C-element outputs, of which at most one is ever high, are merged
// into z_req. The output acknowledge z_ack is sent back to the control
// channel directly and to the chosen input through a second C-element, which
// holds the input acknowledge until both the input request and the control
// have returned to zero:
//   gx = C(x_req, ctl_f)          gy = C(ctl_t, y_req)
//   z_req = gx + gy
//   x_ack = C(gx, z_ack)          y_ack = C(gy, z_ack)
//   ctl_ack = z_ack
// The data path is a two-way multiplexer steered by ctl_t. W (8) is this
// design's choice; rst (active high, asynchronous) clears the C-elements.
// No clock.
// Lint and synthesis report the state-holding cells as latches and the
// feedback through them as combinational loops: both are the intended
// asynchronous behaviour of this circuit, not a coding error.
module drmux #(
  parameter int W = 8
) (
  input  logic         rst,
  input  logic         x_req,
  output logic         x_ack,
  input  logic [W-1:0] x,
  input  logic         y_req,
  output logic         y_ack,
  input  logic [W-1:0] y,
  input  logic         ctl_f,
  input  logic         ctl_t,
  output logic         ctl_ack,
  output logic         z_req,
  input  logic         z_ack,
  output logic [W-1:0] z
);
  logic gx, gy;

  c_element u_gx   (.rst(rst), .a(x_req), .b(ctl_f), .q(gx));
  c_element u_gy   (.rst(rst), .a(ctl_t), .b(y_req), .q(gy));
  c_element u_xack (.rst(rst), .a(gx),    .b(z_ack), .q(x_ack));
  c_element u_yack (.rst(rst), .a(gy),    .b(z_ack), .q(y_ack));

  assign z_req   = gx | gy;
  assign ctl_ack = z_ack;
  assign z       = ctl_t ? y : x;
endmodule
