// flc_pkg: knowledge base and shared number formats of the fuzzy traction
// controller.
//
// The controller has three crisp inputs (corner sharpness, vehicle load,
// vehicle speed) and two crisp outputs (front and rear spring rate). Every
// variable lives on a normalised universe 0..1, coded here as 0..NORM_MAX =
// 0..240, so the breakpoints of the membership functions (MFs), which sit at
// multiples of 1/6, fall on whole numbers (40, 80, 120, 160, 200). A
// membership degree 0..1 is coded as 0..GRADE_MAX = 0..200; with an MF
// half-width of 40 the slope of every MF edge is then exactly 200/40 = 5.
//
// The MF tables give each fuzzy set a centre, a slope and a shape: an
// isosceles triangle, or a shoulder that stays at full membership on one
// side of the centre. The centres and shapes follow the MF tables and plots
// of the design (five sets for corner and speed, two for load, five for each
// spring rate). The rule table holds the twenty if-then rules; every rule
// gives one consequent for the front and one for the rear spring rate.
//
// The number formats (NORM_MAX = 240, GRADE_MAX = 200) are this design's own
// choice; the design itself works in plain integers.
package flc_pkg;

  // Normalised universe 0..1 -> 0..NORM_MAX
  localparam int NORM_W   = 8;
  localparam int NORM_MAX = 240;
  // Membership degree 0..1 -> 0..GRADE_MAX
  localparam int GRADE_W   = 8;
  localparam int GRADE_MAX = 200;
  // Edge slope of every MF: GRADE_MAX / (NORM_MAX / 6)
  localparam int MF_SLOPE  = 5;
  localparam int SLOPE_W   = 8;
  // Signed width of the fuzzification datapath (integers -256..255)
  localparam int DATA_W    = 9;
  // Spring-rate output in tenths of a percent, 0..1000
  localparam int RATE_W    = 10;

  typedef logic [NORM_W-1:0]  norm_t;
  typedef logic [GRADE_W-1:0] grade_t;
  typedef logic [RATE_W-1:0]  rate_t;

  localparam int N_CORNER = 5;
  localparam int N_LOAD   = 2;
  localparam int N_SPEED  = 5;
  localparam int N_RATE   = 5;
  localparam int N_RULES  = 20;

  typedef enum logic [2:0] {
    VERY_SMOOTH = 3'd0, SMOOTH = 3'd1, RATHER_SHARP = 3'd2, SHARP = 3'd3,
    VERY_SHARP = 3'd4
  } corner_mf_e;

  typedef enum logic {
    NOT_HEAVY = 1'b0, HEAVY = 1'b1
  } load_mf_e;

  typedef enum logic [2:0] {
    VERY_SLOW = 3'd0, SLOW = 3'd1, RATHER_FAST = 3'd2, FAST = 3'd3,
    VERY_FAST = 3'd4
  } speed_mf_e;

  typedef enum logic [2:0] {
    VERY_SOFT = 3'd0, SOFT = 3'd1, ORDINARY = 3'd2, STIFF = 3'd3,
    VERY_STIFF = 3'd4
  } rate_mf_e;

  // Shape of a membership function
  typedef enum logic [1:0] {
    MF_TRIANGLE       = 2'd0,  // peak at centre, zero at centre +/- 40
    MF_LEFT_SHOULDER  = 2'd1,  // full membership left of centre
    MF_RIGHT_SHOULDER = 2'd2   // full membership right of centre
  } mf_shape_e;

  // Antecedent connective of a rule
  typedef enum logic {
    CONN_OR  = 1'b0,  // max of the three antecedent degrees
    CONN_AND = 1'b1   // min of the three antecedent degrees
  } connective_e;

  typedef struct packed {
    norm_t             centre;
    logic [SLOPE_W-1:0] slope;
    mf_shape_e         shape;
  } mf_param_t;

  typedef struct packed {
    corner_mf_e corner;
    load_mf_e   load;
    speed_mf_e  speed;
    rate_mf_e   front;
    rate_mf_e   rear;
  } rule_t;

  // Corner: very smooth 0-0.333 (shoulder), smooth 0.167-0.5,
  // rather sharp 0.333-0.667, sharp 0.5-0.833, very sharp 0.667-1 (shoulder)
  localparam mf_param_t CORNER_MF [N_CORNER] = '{
    '{centre: 8'd40,  slope: 8'(MF_SLOPE), shape: MF_LEFT_SHOULDER},
    '{centre: 8'd80,  slope: 8'(MF_SLOPE), shape: MF_TRIANGLE},
    '{centre: 8'd120, slope: 8'(MF_SLOPE), shape: MF_TRIANGLE},
    '{centre: 8'd160, slope: 8'(MF_SLOPE), shape: MF_TRIANGLE},
    '{centre: 8'd200, slope: 8'(MF_SLOPE), shape: MF_RIGHT_SHOULDER}
  };

  // Load: not heavy 0-0.333 (shoulder), heavy 0.167-0.5 (triangle)
  localparam mf_param_t LOAD_MF [N_LOAD] = '{
    '{centre: 8'd40,  slope: 8'(MF_SLOPE), shape: MF_LEFT_SHOULDER},
    '{centre: 8'd80,  slope: 8'(MF_SLOPE), shape: MF_TRIANGLE}
  };

  // Speed: same partition as corner
  localparam mf_param_t SPEED_MF [N_SPEED] = '{
    '{centre: 8'd40,  slope: 8'(MF_SLOPE), shape: MF_LEFT_SHOULDER},
    '{centre: 8'd80,  slope: 8'(MF_SLOPE), shape: MF_TRIANGLE},
    '{centre: 8'd120, slope: 8'(MF_SLOPE), shape: MF_TRIANGLE},
    '{centre: 8'd160, slope: 8'(MF_SLOPE), shape: MF_TRIANGLE},
    '{centre: 8'd200, slope: 8'(MF_SLOPE), shape: MF_RIGHT_SHOULDER}
  };

  // Front and rear spring rate: five triangles centred on 1/6 .. 5/6
  localparam mf_param_t RATE_MF [N_RATE] = '{
    '{centre: 8'd40,  slope: 8'(MF_SLOPE), shape: MF_TRIANGLE},
    '{centre: 8'd80,  slope: 8'(MF_SLOPE), shape: MF_TRIANGLE},
    '{centre: 8'd120, slope: 8'(MF_SLOPE), shape: MF_TRIANGLE},
    '{centre: 8'd160, slope: 8'(MF_SLOPE), shape: MF_TRIANGLE},
    '{centre: 8'd200, slope: 8'(MF_SLOPE), shape: MF_TRIANGLE}
  };

  // The twenty if-then rules
  localparam rule_t RULES [N_RULES] = '{
    '{VERY_SMOOTH,  NOT_HEAVY, VERY_FAST,   VERY_STIFF, VERY_SOFT},
    '{VERY_SMOOTH,  HEAVY,     RATHER_FAST, VERY_STIFF, VERY_SOFT},
    '{VERY_SMOOTH,  HEAVY,     FAST,        VERY_STIFF, VERY_SOFT},
    '{VERY_SMOOTH,  HEAVY,     VERY_FAST,   VERY_STIFF, VERY_SOFT},
    '{SMOOTH,       NOT_HEAVY, VERY_FAST,   STIFF,      SOFT},
    '{SMOOTH,       HEAVY,     RATHER_FAST, STIFF,      SOFT},
    '{SMOOTH,       HEAVY,     FAST,        STIFF,      SOFT},
    '{SMOOTH,       HEAVY,     VERY_FAST,   STIFF,      SOFT},
    '{RATHER_SHARP, NOT_HEAVY, VERY_FAST,   ORDINARY,   ORDINARY},
    '{RATHER_SHARP, HEAVY,     RATHER_FAST, ORDINARY,   ORDINARY},
    '{RATHER_SHARP, HEAVY,     FAST,        ORDINARY,   ORDINARY},
    '{RATHER_SHARP, HEAVY,     VERY_FAST,   ORDINARY,   ORDINARY},
    '{SHARP,        NOT_HEAVY, VERY_FAST,   SOFT,       STIFF},
    '{SHARP,        HEAVY,     RATHER_FAST, SOFT,       STIFF},
    '{SHARP,        HEAVY,     FAST,        SOFT,       STIFF},
    '{SHARP,        HEAVY,     VERY_FAST,   SOFT,       STIFF},
    '{VERY_SHARP,   NOT_HEAVY, VERY_FAST,   VERY_SOFT,  VERY_STIFF},
    '{VERY_SHARP,   HEAVY,     RATHER_FAST, VERY_SOFT,  VERY_STIFF},
    '{VERY_SHARP,   HEAVY,     FAST,        VERY_SOFT,  VERY_STIFF},
    '{VERY_SHARP,   HEAVY,     VERY_FAST,   VERY_SOFT,  VERY_STIFF}
  };

endpackage
