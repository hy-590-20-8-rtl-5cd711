// Bundled-data averaging adder of the filter: s = (a + b) / 2.
//
// The sum is formed at W+1 bits and shifted right by one, so it never
// overflows; the division rounds down. The request Ra says that a and b are
// valid; the acknowledge Aa says that s is valid. In silicon Aa is Ra through
// a delay matched to the adder's worst-case carry path; here the data path
// is evaluated in zero time and Aa is Ra itself. W (8) is this design's
// choice. No clock.
module bd_adder #(
  parameter int W = 8
) (
  input  logic         Ra,
  output logic         Aa,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);
  // W+1-bit sum, halved back to W bits.
  always_comb s = W'(({1'b0, a} + {1'b0, b}) >> 1);

  assign Aa = Ra;
endmodule
