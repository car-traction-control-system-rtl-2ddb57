// traction_controller: fuzzy-logic controller for the spring rates of a
// car's front and rear suspension while cornering.
//
// The controller reads three crisp inputs: the steering angle (how sharp
// the corner is), the passenger load and the vehicle speed. It returns two
// crisp outputs: the front and the rear spring rate, as percentages. It is
// a Mamdani fuzzy controller built as a chain of stages:
//   input scaling  - physical units onto the normalised universe 0..1
//   fuzzification  - membership degree of every input fuzzy set
//   inference      - 20 if-then rules (knowledge base in flc_pkg)
//   defuzzification- centroid of the clipped output sets, front and rear
//   output scaling - normalised rate onto 0..100.0 %
// The stage chain and the controller settings (min/max operators, centroid,
// rules, MF partitions) follow the design; the fixed-point formats, the
// stage timing and the handshake are this design's own.
//
// Interface: start (one clock, while busy is low) samples the three inputs.
// busy stays high while the request is processed; done pulses for one
// clock when front_rate, rear_rate and no_rule are valid. The outputs hold
// until the next done. A start while busy is ignored. active_rules marks
// the rules that fired for the request in progress (bit r = rule r+1).
// Latency from start to done: NPTS + NUM_W + 8 clocks, 273 at the default
// parameters (NPTS = 241 sample points, NUM_W = 24 divider steps), and
// NPTS + 7 = 248 when no rule fires.
module traction_controller
  import flc_pkg::*;
#(
  parameter connective_e CONNECTIVE   = CONN_OR,  // rule antecedent connective
  parameter int          DEFUZZ_STEP  = 1,        // defuzzifier sample spacing
  parameter int          IN_W         = 10,       // width of the sensor inputs
  parameter int          CORNER_RANGE = 360,      // steering angle full scale, deg
  parameter int          LOAD_RANGE   = 350,      // passenger weight full scale, kg
  parameter int          SPEED_RANGE  = 180       // speed full scale, km/h
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [IN_W-1:0] corner_angle,  // steering angle, degrees
  input  logic [IN_W-1:0] load_kg,       // passenger weight, kg
  input  logic [IN_W-1:0] speed_kmh,     // vehicle speed, km/h
  output logic            busy,
  output logic            done,
  output rate_t           front_rate,    // front spring rate, 0.1 % units
  output rate_t           rear_rate,     // rear spring rate, 0.1 % units
  output logic            no_rule,       // no rule fired; rates are 50 %
  output logic [N_RULES-1:0] active_rules // rules with non-zero strength
);

  // ---------------------------------------------------------------- input
  norm_t corner_n, load_n, speed_n;
  norm_t corner_q, load_q, speed_q;
  logic  in_valid;

  input_scaling #(.IN_W(IN_W), .RANGE(CORNER_RANGE)) u_scale_corner (
    .phys (corner_angle), .norm (corner_n)
  );
  input_scaling #(.IN_W(IN_W), .RANGE(LOAD_RANGE)) u_scale_load (
    .phys (load_kg), .norm (load_n)
  );
  input_scaling #(.IN_W(IN_W), .RANGE(SPEED_RANGE)) u_scale_speed (
    .phys (speed_kmh), .norm (speed_n)
  );

  logic accept;
  assign accept = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      corner_q <= '0;
      load_q   <= '0;
      speed_q  <= '0;
      in_valid <= 1'b0;
    end else begin
      in_valid <= accept;
      if (accept) begin
        corner_q <= corner_n;
        load_q   <= load_n;
        speed_q  <= speed_n;
      end
    end
  end

  // -------------------------------------------------------- fuzzification
  logic   fz_valid;
  grade_t corner_deg [N_CORNER];
  grade_t load_deg   [N_LOAD];
  grade_t speed_deg  [N_SPEED];

  fuzzifier u_fuzzifier (
    .clk (clk), .rst_n (rst_n),
    .in_valid (in_valid),
    .corner (corner_q), .load (load_q), .speed (speed_q),
    .out_valid (fz_valid),
    .corner_deg (corner_deg), .load_deg (load_deg), .speed_deg (speed_deg)
  );

  // ------------------------------------------------------------ inference
  logic   inf_valid;
  grade_t strength   [N_RULES];
  grade_t front_clip [N_RATE];
  grade_t rear_clip  [N_RATE];

  inference #(.CONNECTIVE(CONNECTIVE)) u_inference (
    .clk (clk), .rst_n (rst_n),
    .in_valid (fz_valid),
    .corner_deg (corner_deg), .load_deg (load_deg), .speed_deg (speed_deg),
    .out_valid (inf_valid),
    .strength (strength),
    .front_clip (front_clip), .rear_clip (rear_clip)
  );

  // ------------------------------------------------------ defuzzification
  logic  f_busy, f_done, f_none;
  logic  r_busy, r_done, r_none;
  norm_t f_y, r_y;

  defuzzifier #(.STEP(DEFUZZ_STEP)) u_defuzz_front (
    .clk (clk), .rst_n (rst_n),
    .start (inf_valid), .clip (front_clip),
    .busy (f_busy), .done (f_done), .y (f_y), .no_rule (f_none)
  );

  defuzzifier #(.STEP(DEFUZZ_STEP)) u_defuzz_rear (
    .clk (clk), .rst_n (rst_n),
    .start (inf_valid), .clip (rear_clip),
    .busy (r_busy), .done (r_done), .y (r_y), .no_rule (r_none)
  );

  // ------------------------------------------------------- output scaling
  rate_t f_rate, r_rate;

  output_scaling u_oscale_front (.y (f_y), .rate (f_rate));
  output_scaling u_oscale_rear  (.y (r_y), .rate (r_rate));

  // Both defuzzifiers start together and take the same number of clocks
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      front_rate <= rate_t'(500);
      rear_rate  <= rate_t'(500);
      no_rule    <= 1'b0;
      active_rules <= '0;
    end else begin
      done <= 1'b0;
      if (inf_valid)
        for (int r = 0; r < N_RULES; r++) active_rules[r] <= (strength[r] != '0);
      if (accept) busy <= 1'b1;
      if (f_done) begin
        busy       <= 1'b0;
        done       <= 1'b1;
        front_rate <= f_rate;
        rear_rate  <= r_rate;
        no_rule    <= f_none && r_none;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) f_done == r_done)
    else $error("traction_controller: front and rear defuzzifiers out of step");
  assert property (@(posedge clk) disable iff (!rst_n) f_busy == r_busy)
    else $error("traction_controller: defuzzifier busy flags differ");

endmodule
