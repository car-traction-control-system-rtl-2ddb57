// input_scaling: maps a physical sensor reading onto the normalised universe.
//
// norm = round(phys * NORM_MAX / RANGE), saturated at NORM_MAX, so that
// 0..RANGE physical units span 0..1 of the fuzzy universe. The full-scale
// RANGE of each input comes from the design's MF tables: 360 degrees of
// steering angle for corner, 350 kg of passenger weight for load and
// 180 km/h for speed. Purely combinational; the rounding and saturation
// are this design's choice.
module input_scaling
  import flc_pkg::*;
#(
  parameter int IN_W  = 10,   // width of the physical reading
  parameter int RANGE = 360   // physical value that maps to 1.0
) (
  input  logic [IN_W-1:0] phys,
  output norm_t           norm
);

  localparam int PW = IN_W + NORM_W + 1;

  logic [PW-1:0] scaled;

  always_comb begin
    scaled = (PW'(phys) * PW'(NORM_MAX) + PW'(RANGE / 2)) / PW'(RANGE);
    norm   = (PW'(phys) >= PW'(RANGE)) ? norm_t'(NORM_MAX) : norm_t'(scaled);
  end

endmodule
