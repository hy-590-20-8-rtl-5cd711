// Two-input Muller C-element.
//
// The output copies the inputs when they agree and keeps its value while they
// differ: q = a & b + q & (a + b). It is written as a generalized C-element
// with set = a & b and clr = ~a & ~b.
//
// rst (active high, asynchronous) forces q to INIT; the reset is this
// design's addition, the C-element itself has none.
// Lint and synthesis report the state-holding cells as latches and the
// feedback through them as combinational loops: both are the intended
// asynchronous behaviour of this circuit, not a coding error.
module c_element #(
  parameter bit INIT = 1'b0
) (
  input  logic rst,
  input  logic a,
  input  logic b,
  output logic q
);
  gc_element #(.INIT(INIT)) u_gc (
    .rst (rst),
    .set (a & b),
    .clr (~a & ~b),
    .q   (q)
  );
endmodule
