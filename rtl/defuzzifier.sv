// defuzzifier: centroid defuzzification of one output variable.
//
// Input: the clip level of each of the five output fuzzy sets, as produced
// by the inference stage (min implication, max aggregation). The output
// fuzzy set is mu(y) = max_k min(clip_k, MF_k(y)). Its centroid
//     y* = sum(y * mu(y)) / sum(mu(y))
// is found by sweeping y across the normalised universe 0..NORM_MAX in
// steps of STEP, one sample per clock. The five output MFs are evaluated at
// each sample by five fuzzification units (the same unit the input side
// uses), fed from the output MF table. Numerator and denominator are
// accumulated and then divided by a sequential divider, rounded to the
// nearest integer. When no rule fires (sum(mu) = 0) the result is the middle
// of the universe and no_rule is raised.
//
// Interface: start (one clock, while busy is low) latches clip[]; done
// pulses for one clock when y and no_rule are valid; they hold until the
// next done. Latency from start to done is NPTS + NUM_W + 4 clocks, where
// NPTS = NORM_MAX/STEP + 1 (241 + 24 + 4 = 269 at the default STEP = 1);
// it is NPTS + 3 when no rule fires, since no division is needed.
// Centroid defuzzification follows the design's controller settings; the
// sweep, the sample spacing and the no-rule value are this design's choice.
module defuzzifier
  import flc_pkg::*;
#(
  parameter int STEP  = 1,    // spacing of the sample points
  parameter int NUM_W = 24,   // numerator accumulator width
  parameter int DEN_W = 16    // denominator accumulator width
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  grade_t clip [N_RATE],
  output logic   busy,
  output logic   done,
  output norm_t  y,
  output logic   no_rule
);

  typedef enum logic [2:0] {
    S_IDLE, S_SWEEP, S_FLUSH, S_DIV_START, S_DIV_WAIT
  } state_e;

  state_e        state;
  grade_t        clip_q [N_RATE];
  norm_t         y_cnt, y_d;
  logic          feed_d;
  logic [NUM_W-1:0] num;
  logic [DEN_W-1:0] den;
  grade_t        deg [N_RATE];
  grade_t        agg;

  // Output MFs evaluated at the current sample
  for (genvar k = 0; k < N_RATE; k++) begin : g_mf
    fuzzification u_mf (
      .clk (clk), .rst_n (rst_n),
      .a ($signed({1'b0, y_cnt})),
      .centre ($signed({1'b0, RATE_MF[k].centre})),
      .slope (RATE_MF[k].slope), .shape (RATE_MF[k].shape),
      .result (), .prod (), .x1 (), .x2 (), .x3 (),
      .degree (deg[k])
    );
  end

  // Clip each set at its rule strength (min), then take the union (max)
  always_comb begin
    agg = '0;
    for (int k = 0; k < N_RATE; k++) begin
      grade_t c;
      c = (deg[k] < clip_q[k]) ? deg[k] : clip_q[k];
      if (c > agg) agg = c;
    end
  end

  logic             div_start, div_busy, div_done;
  logic [NUM_W-1:0] div_quot;
  logic [DEN_W-1:0] div_rem;

  assign div_start = (state == S_DIV_START) && (den != '0);

  fuzzy_div #(.NW(NUM_W), .DW(DEN_W)) u_div (
    .clk   (clk),
    .rst_n (rst_n),
    .start (div_start),
    .num   (num + NUM_W'(den >> 1)),
    .den   (den),
    .busy  (div_busy),
    .done  (div_done),
    .quot  (div_quot),
    .rem   (div_rem)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      clip_q  <= '{default: '0};
      y_cnt   <= '0;
      y_d     <= '0;
      feed_d  <= 1'b0;
      num     <= '0;
      den     <= '0;
      y       <= norm_t'(NORM_MAX / 2);
      no_rule <= 1'b0;
      done    <= 1'b0;
    end else begin
      done   <= 1'b0;
      feed_d <= 1'b0;
      y_d    <= y_cnt;
      if (feed_d) begin
        num <= num + NUM_W'(y_d) * NUM_W'(agg);
        den <= den + DEN_W'(agg);
      end
      unique case (state)
        S_IDLE: if (start) begin
          clip_q <= clip;
          y_cnt  <= '0;
          num    <= '0;
          den    <= '0;
          state  <= S_SWEEP;
        end
        S_SWEEP: begin
          feed_d <= 1'b1;
          if (int'(y_cnt) + STEP > NORM_MAX) state <= S_FLUSH;
          else y_cnt <= y_cnt + norm_t'(STEP);
        end
        S_FLUSH: state <= S_DIV_START;
        S_DIV_START: begin
          if (den == '0) begin
            y       <= norm_t'(NORM_MAX / 2);
            no_rule <= 1'b1;
            done    <= 1'b1;
            state   <= S_IDLE;
          end else begin
            state <= S_DIV_WAIT;
          end
        end
        S_DIV_WAIT: if (div_done) begin
          y       <= (div_quot > NUM_W'(NORM_MAX)) ? norm_t'(NORM_MAX)
                                                   : norm_t'(div_quot);
          no_rule <= 1'b0;
          done    <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  assert property (@(posedge clk) disable iff (!rst_n) !(div_start && div_busy))
    else $error("defuzzifier: divider restarted while busy");

endmodule
