// fuzzifier: fuzzification stage of the controller.
//
// Turns the three normalised crisp inputs (corner, load, speed, each
// 0..NORM_MAX) into the membership degrees of all their fuzzy sets: five
// for corner, two for load, five for speed. It holds one fuzzification
// unit per fuzzy set, all working in parallel; each unit reads its centre,
// slope and shape from the MF memory, a constant table in flc_pkg.
//
// Timing: degrees and out_valid appear one clock after the inputs and
// in_valid. The parallel layout (rather than one unit shared over time) is
// this design's choice.
module fuzzifier
  import flc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  norm_t  corner,
  input  norm_t  load,
  input  norm_t  speed,
  output logic   out_valid,
  output grade_t corner_deg [N_CORNER],
  output grade_t load_deg   [N_LOAD],
  output grade_t speed_deg  [N_SPEED]
);

  // Widen an unsigned normalised value to the signed datapath
  function automatic logic signed [DATA_W-1:0] to_data(norm_t v);
    return $signed({1'b0, v});
  endfunction

  for (genvar i = 0; i < N_CORNER; i++) begin : g_corner
    fuzzification u_mf (
      .clk (clk), .rst_n (rst_n),
      .a (to_data(corner)), .centre (to_data(CORNER_MF[i].centre)),
      .slope (CORNER_MF[i].slope), .shape (CORNER_MF[i].shape),
      .result (), .prod (), .x1 (), .x2 (), .x3 (),
      .degree (corner_deg[i])
    );
  end

  for (genvar i = 0; i < N_LOAD; i++) begin : g_load
    fuzzification u_mf (
      .clk (clk), .rst_n (rst_n),
      .a (to_data(load)), .centre (to_data(LOAD_MF[i].centre)),
      .slope (LOAD_MF[i].slope), .shape (LOAD_MF[i].shape),
      .result (), .prod (), .x1 (), .x2 (), .x3 (),
      .degree (load_deg[i])
    );
  end

  for (genvar i = 0; i < N_SPEED; i++) begin : g_speed
    fuzzification u_mf (
      .clk (clk), .rst_n (rst_n),
      .a (to_data(speed)), .centre (to_data(SPEED_MF[i].centre)),
      .slope (SPEED_MF[i].slope), .shape (SPEED_MF[i].shape),
      .result (), .prod (), .x1 (), .x2 (), .x3 (),
      .degree (speed_deg[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
