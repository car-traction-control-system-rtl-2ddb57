// fuzzy_mult: multiplication sub-block of the fuzzification unit.
//
// Computes the full-width signed product prod = a * b. In the
// fuzzification unit a is the difference from the fuzzy-set centre and b
// is the slope of the set's edge. Purely combinational; the product is
// AW + BW bits wide so that it never overflows.
module fuzzy_mult #(
  parameter int AW = 10,
  parameter int BW = 9
) (
  input  logic signed [AW-1:0]    a,
  input  logic signed [BW-1:0]    b,
  output logic signed [AW+BW-1:0] prod
);

  always_comb prod = (AW+BW)'(a) * (AW+BW)'(b);

endmodule
