// Generalized C-element (set/reset state-holding gate).
//
// The output follows the equation q = set + q & ~clr, the "mappable onto gC"
// form that the synthesized controllers use for every signal with feedback:
// it goes high when set is 1, low when clr is 1 (and set is 0), and otherwise
// keeps its value. Set wins if both are asserted; in the speed-independent
// circuits built from it they never are.
//
// rst (active high, asynchronous) forces q to INIT. The controllers this cell
// serves have no reset in their equations; the reset and its value are this
// design's addition so that simulation and silicon start in the initial state
// of the specification.
//
// The cell is a level-sensitive latch by construction. Tools report it as a
// latch, and the feedback paths of the controllers that use it as
// combinational loops: both are the intended asynchronous behaviour.
module gc_element #(
  parameter bit INIT = 1'b0
) (
  input  logic rst,
  input  logic set,
  input  logic clr,
  output logic q
);
  always_latch begin
    if (rst)              q = INIT;
    else if (set || clr)  q = set;
  end
endmodule
