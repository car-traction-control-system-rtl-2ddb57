// fuzzy_sub: subtraction sub-block of the fuzzification unit.
//
// Computes result = a - b, where b is the centre of the fuzzy set being
// evaluated. Purely combinational. The inputs are W-bit two's-complement
// integers (the design's integer range -256..255 for W = 9); the result is
// one bit wider so that it can never wrap, which is this design's choice.
module fuzzy_sub #(
  parameter int W = 9
) (
  input  logic signed [W-1:0] a,       // crisp input
  input  logic signed [W-1:0] b,       // centre of the fuzzy set
  output logic signed [W:0]   result   // a - b
);

  always_comb result = (W+1)'(a) - (W+1)'(b);

endmodule
