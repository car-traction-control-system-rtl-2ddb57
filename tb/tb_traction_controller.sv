// tb_traction_controller: end-to-end test of the fuzzy traction controller.
//
// Two controllers receive the same requests: one with the default OR rule
// connective and one with AND. For every request the testbench works out
// the expected front and rear spring rates, the no_rule flag and the set
// of fired rules with its own reference model (scaling, trapezoid MFs,
// rule table, centroid), and checks the latency from start to done.
// It counts how often each mechanism occurs and fails if one never does:
// saturation of an out-of-range sensor reading, the flat side of a
// shoulder MF, a request for which no rule fires, a start that arrives
// while busy (must be ignored), and every one of the twenty rules firing
// under AND.
module tb_traction_controller;
  import flc_pkg::*;
  import tb_flc_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       start = 0;
  logic [9:0] angle = '0, load = '0, speed = '0;
  logic       busy_o, done_o, nr_o, busy_a, done_a, nr_a;
  rate_t      fr_o, rr_o, fr_a, rr_a;
  logic [19:0] act_o, act_a;

  traction_controller dut_or (
    .clk, .rst_n, .start, .corner_angle(angle), .load_kg(load),
    .speed_kmh(speed), .busy(busy_o), .done(done_o), .front_rate(fr_o),
    .rear_rate(rr_o), .no_rule(nr_o), .active_rules(act_o));

  traction_controller #(.CONNECTIVE(CONN_AND)) dut_and (
    .clk, .rst_n, .start, .corner_angle(angle), .load_kg(load),
    .speed_kmh(speed), .busy(busy_a), .done(done_a), .front_rate(fr_a),
    .rear_rate(rr_a), .no_rule(nr_a), .active_rules(act_a));

  // Mechanism counters
  int n_requests = 0, n_saturate = 0, n_shoulder = 0, n_norule = 0;
  int n_busy_start = 0;
  int rule_hits [20];

  // Expected outputs of one controller for the current inputs
  task automatic expect_for(bit use_and, output int front, output int rear,
                            output bit none, output logic [19:0] act);
    int c, l, s, dc[5], dl[2], ds[5], fc[5], rc[5], yf, yr;
    c = scale_in(int'(angle), 360);
    l = scale_in(int'(load), 350);
    s = scale_in(int'(speed), 180);
    for (int k = 0; k < 5; k++) begin
      dc[k] = degree(five_mf(k), c);
      ds[k] = degree(five_mf(k), s);
    end
    for (int k = 0; k < 2; k++) dl[k] = degree(load_mf(k), l);
    for (int r = 0; r < 20; r++) act[r] = rule_strength(r, use_and, dc, dl, ds) != 0;
    clips(use_and, dc, dl, ds, 0, fc);
    clips(use_and, dc, dl, ds, 1, rc);
    yf = centroid(fc, 1);
    yr = centroid(rc, 1);
    none  = (yf < 0) && (yr < 0);
    front = scale_out(yf < 0 ? 120 : yf);
    rear  = scale_out(yr < 0 ? 120 : yr);
  endtask

  task automatic request(int a, int l, int s, bit extra_start);
    int ef_o, er_o, ef_a, er_a, lat_o = -1, lat_a = -1, cyc = 0;
    bit en_o, en_a;
    logic [19:0] ea_o, ea_a;
    angle = 10'(a); load = 10'(l); speed = 10'(s);
    expect_for(0, ef_o, er_o, en_o, ea_o);
    expect_for(1, ef_a, er_a, en_a, ea_a);
    if (a >= 360 || l >= 350 || s >= 180) n_saturate++;
    if (a <= 60 || a >= 300 || l <= 58 || s <= 30 || s >= 150) n_shoulder++;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    n_requests++;
    while ((lat_o < 0 || lat_a < 0) && cyc < 2000) begin
      cyc++;
      if (cyc == 5 && extra_start) begin
        // a second request while busy; it must change nothing
        angle = 10'(359 - a); load = 10'(349 - l % 350); speed = 10'(179 - s % 180);
        start = 1;
        @(posedge clk); #1;
        start = 0;
        cyc++;
        n_busy_start++;
        checks++;
        if (!busy_o || !busy_a) begin failures++; $display("FAIL not busy"); end
      end
      if (done_o && lat_o < 0) lat_o = cyc;
      if (done_a && lat_a < 0) lat_a = cyc;
      if (lat_o < 0 || lat_a < 0) begin @(posedge clk); #1; end
    end
    checks += 8;
    if (int'(fr_o) != ef_o || int'(rr_o) != er_o || nr_o != en_o) begin
      failures++;
      $display("FAIL OR a=%0d l=%0d s=%0d got %0d/%0d/%0d exp %0d/%0d/%0d",
               a, l, s, fr_o, rr_o, nr_o, ef_o, er_o, en_o);
    end
    if (int'(fr_a) != ef_a || int'(rr_a) != er_a || nr_a != en_a) begin
      failures++;
      $display("FAIL AND a=%0d l=%0d s=%0d got %0d/%0d/%0d exp %0d/%0d/%0d",
               a, l, s, fr_a, rr_a, nr_a, ef_a, er_a, en_a);
    end
    if (act_o != ea_o) begin failures++; $display("FAIL OR rules %b exp %b", act_o, ea_o); end
    if (act_a != ea_a) begin failures++; $display("FAIL AND rules %b exp %b", act_a, ea_a); end
    if (lat_o != (en_o ? 248 : 273)) begin failures++; $display("FAIL OR latency %0d", lat_o); end
    if (lat_a != (en_a ? 248 : 273)) begin failures++; $display("FAIL AND latency %0d", lat_a); end
    if (busy_o || busy_a) begin failures++; $display("FAIL busy after done"); end
    if (en_a) n_norule++;
    for (int r = 0; r < 20; r++) if (ea_a[r]) rule_hits[r]++;
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (rule_hits[r]) rule_hits[r] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    checks++;
    if (busy_o || done_o || fr_o != 10'd500) begin failures++; $display("FAIL reset state"); end
    // corners of the operating range
    request(0, 0, 0, 0);
    request(360, 350, 180, 0);
    request(1023, 1023, 1023, 1);
    // the three rule-viewer input sets, mapped from -10..10 onto the ranges
    request(108, 201, 90, 0);
    request(243, 201, 90, 0);
    request(180, 201, 90, 0);
    // each rule's antecedents at their peaks
    for (int r = 0; r < 20; r++)
      request(60 * RULE_TAB[r][0] + 60, (RULE_TAB[r][1] ? 117 : 30),
              30 * RULE_TAB[r][2] + 30, 0);
    for (int i = 0; i < 400; i++) begin
      automatic int a = ($urandom_range(9) == 0) ? $urandom_range(1023) : $urandom_range(360);
      automatic int l = ($urandom_range(9) == 0) ? $urandom_range(1023) : $urandom_range(200);
      automatic int s = ($urandom_range(9) == 0) ? $urandom_range(1023) : $urandom_range(180);
      request(a, l, s, (i % 10) == 3);
    end
    $display("requests=%0d saturate=%0d shoulder=%0d no_rule=%0d busy_start=%0d",
             n_requests, n_saturate, n_shoulder, n_norule, n_busy_start);
    checks += 4;
    if (n_saturate == 0) begin failures++; $display("FAIL no saturation seen"); end
    if (n_shoulder == 0) begin failures++; $display("FAIL no shoulder seen"); end
    if (n_norule == 0)   begin failures++; $display("FAIL no no-rule case seen"); end
    if (n_busy_start == 0) begin failures++; $display("FAIL no start while busy"); end
    for (int r = 0; r < 20; r++) begin
      checks++;
      if (rule_hits[r] == 0) begin failures++; $display("FAIL rule %0d never fired", r + 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
