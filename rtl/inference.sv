// inference: rule evaluation of the Mamdani controller.
//
// For each of the twenty rules of the knowledge base it combines the
// degrees of the rule's three antecedents (corner, load, speed) into a
// firing strength. With CONNECTIVE = CONN_OR the strength is the maximum of
// the three degrees, as the rules are entered in the design's rule set;
// CONN_AND takes the minimum instead. Implication is min: a rule clips its
// consequent set at its strength. Aggregation is max: each output fuzzy set
// (very soft .. very stiff) is clipped at the largest strength among the
// rules that name it. So the outputs are, for the front and for the rear
// spring rate, one clip level per output fuzzy set; the defuzzifier builds
// the output shape from them.
//
// Timing: one clock from in_valid to out_valid; all outputs are registered.
module inference
  import flc_pkg::*;
#(
  parameter connective_e CONNECTIVE = CONN_OR
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  grade_t corner_deg [N_CORNER],
  input  grade_t load_deg   [N_LOAD],
  input  grade_t speed_deg  [N_SPEED],
  output logic   out_valid,
  output grade_t strength   [N_RULES],  // firing strength of each rule
  output grade_t front_clip [N_RATE],   // clip level of each front set
  output grade_t rear_clip  [N_RATE]    // clip level of each rear set
);

  function automatic grade_t gmax(grade_t x, grade_t y);
    return (x > y) ? x : y;
  endfunction

  function automatic grade_t gmin(grade_t x, grade_t y);
    return (x < y) ? x : y;
  endfunction

  grade_t w     [N_RULES];
  grade_t f_agg [N_RATE];
  grade_t r_agg [N_RATE];

  always_comb begin
    for (int r = 0; r < N_RULES; r++) begin
      grade_t dc, dl, ds;
      dc = corner_deg[RULES[r].corner];
      dl = load_deg[RULES[r].load];
      ds = speed_deg[RULES[r].speed];
      if (CONNECTIVE == CONN_OR) w[r] = gmax(gmax(dc, dl), ds);
      else                       w[r] = gmin(gmin(dc, dl), ds);
    end
    for (int k = 0; k < N_RATE; k++) begin
      f_agg[k] = '0;
      r_agg[k] = '0;
      for (int r = 0; r < N_RULES; r++) begin
        if (RULES[r].front == rate_mf_e'(k)) f_agg[k] = gmax(f_agg[k], w[r]);
        if (RULES[r].rear  == rate_mf_e'(k)) r_agg[k] = gmax(r_agg[k], w[r]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      strength   <= '{default: '0};
      front_clip <= '{default: '0};
      rear_clip  <= '{default: '0};
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        strength   <= w;
        front_clip <= f_agg;
        rear_clip  <= r_agg;
      end
    end
  end

endmodule
