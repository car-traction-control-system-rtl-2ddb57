// output_scaling: maps the defuzzified spring rate onto a percentage.
//
// rate = round(y * 1000 / NORM_MAX), in tenths of a percent, so that the
// normalised output 0..1 becomes a spring rate of 0..100.0 %, the unit of
// the design's output MF tables. Purely combinational; the 0.1 % unit and
// the rounding are this design's choice.
module output_scaling
  import flc_pkg::*;
(
  input  norm_t y,
  output rate_t rate    // spring rate in units of 0.1 %
);

  localparam int PW = NORM_W + RATE_W + 1;

  always_comb
    rate = rate_t'((PW'(y) * PW'(1000) + PW'(NORM_MAX / 2)) / PW'(NORM_MAX));

endmodule
