// fuzzification: membership-degree unit for one fuzzy set.
//
// This is the fuzzification block built from three sub-blocks. The crisp
// input a takes two routes. A subtractor forms the difference a - centre
// and a multiplier scales it by the slope of the set's edge. A comparator
// tells whether a lies right of (x1), on (x2) or left of (x3) the centre.
// A mux then turns the product into a degree:
//   on the centre                 -> GRADE_MAX
//   right of centre               -> GRADE_MAX - slope*(a - centre)
//   left of centre                -> GRADE_MAX + slope*(a - centre)
//   on the flat side of a shoulder-> GRADE_MAX
// and the result is clamped at 0, giving a triangle or a shoulder.
// The centre, slope and shape come from the MF memory of the enclosing
// fuzzifier; here they are ports.
//
// Timing: the comparator is clocked, so the difference and product are
// registered alongside its flags. result, prod, x1..x3 and degree are valid
// one clock after a, centre, slope and shape are applied. The clamp and
// the shoulder choice of the mux are this design's own; the sub-blocks and
// their connection follow the block diagram.
module fuzzification
  import flc_pkg::*;
#(
  parameter int W         = DATA_W,     // signed input width
  parameter int SW        = SLOPE_W,    // unsigned slope width
  parameter int GW        = GRADE_W,    // degree width
  parameter int GMAX      = GRADE_MAX   // full membership
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [W-1:0]    a,        // crisp input
  input  logic signed [W-1:0]    centre,   // centre of the fuzzy set
  input  logic        [SW-1:0]   slope,    // edge slope
  input  mf_shape_e              shape,    // triangle or shoulder
  output logic signed [W:0]      result,   // a - centre (registered)
  output logic signed [W+SW+1:0] prod,     // slope * (a - centre) (registered)
  output logic                   x1,       // a > centre
  output logic                   x2,       // a = centre
  output logic                   x3,       // a < centre
  output logic        [GW-1:0]   degree    // membership degree 0..GMAX
);

  localparam int PW = W + SW + 2;

  logic signed [W:0]    diff;
  logic signed [PW-1:0] prod_c;
  mf_shape_e            shape_q;

  fuzzy_sub #(.W(W)) u_sub (
    .a      (a),
    .b      (centre),
    .result (diff)
  );

  fuzzy_mult #(.AW(W+1), .BW(SW+1)) u_mult (
    .a    (diff),
    .b    ($signed({1'b0, slope})),
    .prod (prod_c)
  );

  fuzzy_cmp #(.W(W)) u_cmp (
    .clk   (clk),
    .rst_n (rst_n),
    .a     (a),
    .b     (centre),
    .x1    (x1),
    .x2    (x2),
    .x3    (x3)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result  <= '0;
      prod    <= '0;
      shape_q <= MF_TRIANGLE;
    end else begin
      result  <= diff;
      prod    <= prod_c;
      shape_q <= shape;
    end
  end

  // Mux: pick the degree from the comparator flags and the product
  logic signed [PW:0] raw;
  always_comb begin
    if (x2)
      raw = (PW+1)'(GMAX);
    else if (x1)
      raw = (shape_q == MF_RIGHT_SHOULDER) ? (PW+1)'(GMAX)
                                           : (PW+1)'(GMAX) - (PW+1)'(prod);
    else
      raw = (shape_q == MF_LEFT_SHOULDER)  ? (PW+1)'(GMAX)
                                           : (PW+1)'(GMAX) + (PW+1)'(prod);
    if (raw < 0)
      degree = '0;
    else if (raw > (PW+1)'(GMAX))
      degree = GW'(GMAX);
    else
      degree = GW'(raw);
  end

endmodule
