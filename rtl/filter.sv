// Asynchronous averaging filter.
//
// Behaviour: y := 0; loop { x := READ(IN); WRITE(OUT, (x + y) / 2); y := x }.
// Each input word produces one output word, the average of it and the
// previous input (0 before the first).
//
// Structure: IN feeds latch x, x feeds latch y, and x and y feed the
// bundled-data adder whose result is OUT. Both latches are transparent while
// their request is 1. The controller (filter_ctrl) opens x while the input
// is valid, starts the adder, hands the sum out, then opens y so that y
// takes the current x, closes x and only then acknowledges the input.
//
// Interface: bundled-data push channel in (Rin, Ain, IN): IN must be stable
// from Rin+ until Ain+. Push channel out (Rout, Aout, OUT): OUT is valid from
// Rout+ until Aout+; the receiver is expected to capture it with a latch
// controlled by Rout/Aout. W (8) is this design's choice; rst (active high,
// asynchronous) starts the controller and clears y. No clock.
// Lint and synthesis report the state-holding cells as latches and the
// feedback through them as combinational loops: both are the intended
// asynchronous behaviour of this circuit, not a coding error.
module filter #(
  parameter int W = 8
) (
  input  logic         rst,
  input  logic         Rin,
  output logic         Ain,
  input  logic [W-1:0] IN,
  output logic         Rout,
  input  logic         Aout,
  output logic [W-1:0] OUT
);
  logic Rx, Ax, Ry, Ay, Ra, Aa;
  logic [W-1:0] x, y;

  filter_ctrl u_ctrl (
    .rst(rst), .Rin(Rin), .Ain(Ain), .Rx(Rx), .Ax(Ax), .Ry(Ry), .Ay(Ay),
    .Ra(Ra), .Aa(Aa), .Rout(Rout), .Aout(Aout));

  hs_latch #(.W(W)) u_x (.rst(rst), .R(Rx), .A(Ax), .d(IN), .q(x));
  hs_latch #(.W(W)) u_y (.rst(rst), .R(Ry), .A(Ay), .d(x),  .q(y));
  bd_adder #(.W(W)) u_add (.Ra(Ra), .Aa(Aa), .a(x), .b(y), .s(OUT));
endmodule
