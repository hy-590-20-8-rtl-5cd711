// Level-sensitive data latch with a request/acknowledge pair (the x and y
// registers of the averaging filter).
//
// The latch is transparent while R = 1 and holds while R = 0. Its
// acknowledge A is R returned after the latch has followed: a matched delay
// in silicon, a plain copy here, where the data path settles in zero time.
// A+ thus tells the controller the latch is open and its output equals d;
// A- that it has closed. W is the data width, which the specification does
// not give (8 is this design's choice). rst (active high, asynchronous)
// clears the stored word: the filter's y starts at 0. No clock.
// Lint and synthesis report the state-holding cells as latches and the
// feedback through them as combinational loops: both are the intended
// asynchronous behaviour of this circuit, not a coding error.
module hs_latch #(
  parameter int W = 8
) (
  input  logic         rst,
  input  logic         R,
  output logic         A,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_latch begin
    if (rst)    q = '0;
    else if (R) q = d;
  end

  assign A = R;
endmodule
