// tb_defuzzifier: self-checking test of centroid defuzzification.
// Applies clip-level vectors (single sets, all sets, none, random) and
// checks the centroid against the reference, the no_rule flag, the
// latency from start to done (NPTS + 24 + 4 clocks, NPTS + 3 when no rule
// fires) and that busy covers
// it. A second unit samples every 4th point and is checked the same way.
module tb_defuzzifier;
  import flc_pkg::*;
  import tb_flc_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   start = 0;
  grade_t clip [N_RATE];
  logic   busy1, done1, nr1, busy4, done4, nr4;
  norm_t  y1, y4;

  defuzzifier dut1 (.clk, .rst_n, .start, .clip, .busy(busy1), .done(done1),
                    .y(y1), .no_rule(nr1));
  defuzzifier #(.STEP(4)) dut4 (.clk, .rst_n, .start, .clip, .busy(busy4),
                    .done(done4), .y(y4), .no_rule(nr4));

  int cl[5];

  task automatic run_one();
    int exp1, exp4, cyc = 0;
    bit seen1 = 0, seen4 = 0;
    int lat1 = -1, lat4 = -1;
    for (int k = 0; k < 5; k++) clip[k] = grade_t'(cl[k]);
    exp1 = centroid(cl, 1);
    exp4 = centroid(cl, 4);
    start = 1;
    @(posedge clk); #1;
    start = 0;
    while (!(seen1 && seen4) && cyc < 1000) begin
      cyc++;
      if (done1 && !seen1) begin seen1 = 1; lat1 = cyc; end
      if (done4 && !seen4) begin seen4 = 1; lat4 = cyc; end
      if (!seen1 && !busy1) begin failures++; $display("FAIL busy dropped"); end
      @(posedge clk); #1;
    end
    checks += 4;
    if (lat1 != (exp1 < 0 ? 241 + 3 : 241 + 24 + 4)) begin failures++; $display("FAIL latency %0d clip %p", lat1, cl); end
    if (lat4 != (exp4 < 0 ? 61 + 3 : 61 + 24 + 4)) begin failures++; $display("FAIL latency4 %0d", lat4); end
    if (exp1 < 0) begin
      if (!nr1 || y1 != 8'd120) begin failures++; $display("FAIL no-rule case"); end
    end else if (nr1 || int'(y1) != exp1) begin
      failures++; $display("FAIL clip %p y=%0d exp=%0d", cl, y1, exp1);
    end
    if (exp4 < 0) begin
      if (!nr4 || y4 != 8'd120) begin failures++; $display("FAIL no-rule case 4"); end
    end else if (nr4 || int'(y4) != exp4) begin
      failures++; $display("FAIL step4 clip %p y=%0d exp=%0d", cl, y4, exp4);
    end
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 5; k++) clip[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // nothing fires
    cl = '{0, 0, 0, 0, 0}; run_one();
    // each set alone at full strength: centroid at its centre
    for (int k = 0; k < 5; k++) begin
      cl = '{0, 0, 0, 0, 0}; cl[k] = 200; run_one();
      checks++;
      if (int'(y1) != 40 * (k + 1)) begin failures++; $display("FAIL centre %0d", k); end
    end
    cl = '{200, 200, 200, 200, 200}; run_one();
    checks++;
    if (y1 != 8'd120) begin failures++; $display("FAIL symmetric"); end
    // a start while busy must be ignored
    cl = '{0, 0, 0, 0, 200};
    for (int k = 0; k < 5; k++) clip[k] = grade_t'(cl[k]);
    start = 1; @(posedge clk); #1;
    for (int k = 0; k < 5; k++) clip[k] = (k == 0) ? 8'd200 : 8'd0;
    repeat (10) @(posedge clk); #1;
    start = 0;
    wait (done1); @(posedge clk); #1;
    checks++;
    if (y1 != 8'd200) begin failures++; $display("FAIL restart while busy"); end
    repeat (3) @(posedge clk); #1;
    for (int i = 0; i < 150; i++) begin
      for (int k = 0; k < 5; k++) cl[k] = ($urandom_range(2) == 0) ? 0 : $urandom_range(200);
      run_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
