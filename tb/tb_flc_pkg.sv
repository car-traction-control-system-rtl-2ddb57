// tb_flc_pkg: checks the knowledge base against the design's tables.
// The twenty rules are restated here as text, exactly as the rule table
// lists them, and compared with the names of the enumerated fields in the
// package. The MF tables are checked point by point: each set's degree at
// every universe point, computed from its centre, slope and shape, must
// match the reference trapezoids built from the table corner points.
module tb_flc_pkg;
  import flc_pkg::*;
  import tb_flc_ref_pkg::*;
  int checks = 0, failures = 0;

  string RULE_TEXT [20] = '{
    "VERY_SMOOTH NOT_HEAVY VERY_FAST VERY_STIFF VERY_SOFT",
    "VERY_SMOOTH HEAVY RATHER_FAST VERY_STIFF VERY_SOFT",
    "VERY_SMOOTH HEAVY FAST VERY_STIFF VERY_SOFT",
    "VERY_SMOOTH HEAVY VERY_FAST VERY_STIFF VERY_SOFT",
    "SMOOTH NOT_HEAVY VERY_FAST STIFF SOFT",
    "SMOOTH HEAVY RATHER_FAST STIFF SOFT",
    "SMOOTH HEAVY FAST STIFF SOFT",
    "SMOOTH HEAVY VERY_FAST STIFF SOFT",
    "RATHER_SHARP NOT_HEAVY VERY_FAST ORDINARY ORDINARY",
    "RATHER_SHARP HEAVY RATHER_FAST ORDINARY ORDINARY",
    "RATHER_SHARP HEAVY FAST ORDINARY ORDINARY",
    "RATHER_SHARP HEAVY VERY_FAST ORDINARY ORDINARY",
    "SHARP NOT_HEAVY VERY_FAST SOFT STIFF",
    "SHARP HEAVY RATHER_FAST SOFT STIFF",
    "SHARP HEAVY FAST SOFT STIFF",
    "SHARP HEAVY VERY_FAST SOFT STIFF",
    "VERY_SHARP NOT_HEAVY VERY_FAST VERY_SOFT VERY_STIFF",
    "VERY_SHARP HEAVY RATHER_FAST VERY_SOFT VERY_STIFF",
    "VERY_SHARP HEAVY FAST VERY_SOFT VERY_STIFF",
    "VERY_SHARP HEAVY VERY_FAST VERY_SOFT VERY_STIFF"
  };

  // Degree of a package MF at x, from its centre, slope and shape
  function automatic int pkg_degree(mf_param_t p, int x);
    int d = x - int'(p.centre);
    if (d > 0 && p.shape == MF_RIGHT_SHOULDER) return GRADE_MAX;
    if (d < 0 && p.shape == MF_LEFT_SHOULDER)  return GRADE_MAX;
    if (d < 0) d = -d;
    return (GRADE_MAX - int'(p.slope) * d > 0) ? GRADE_MAX - int'(p.slope) * d : 0;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (N_RULES != 20) begin failures++; $display("FAIL rule count"); end
    for (int r = 0; r < N_RULES; r++) begin
      rule_t      ru;
      corner_mf_e c;
      load_mf_e   l;
      speed_mf_e  s;
      rate_mf_e   f, b;
      string      got;
      ru = RULES[r];
      c = ru.corner; l = ru.load; s = ru.speed; f = ru.front; b = ru.rear;
      got = $sformatf("%s %s %s %s %s", c.name(), l.name(), s.name(),
                      f.name(), b.name());
      checks++;
      if (got != RULE_TEXT[r]) begin
        failures++; $display("FAIL rule %0d: %s", r + 1, got);
      end
    end
    for (int x = 0; x <= 240; x++) begin
      for (int k = 0; k < 5; k++) begin
        checks += 3;
        if (pkg_degree(CORNER_MF[k], x) != degree(five_mf(k), x)) begin failures++; $display("FAIL corner mf %0d at %0d", k, x); end
        if (pkg_degree(SPEED_MF[k], x)  != degree(five_mf(k), x)) begin failures++; $display("FAIL speed mf %0d at %0d", k, x); end
        if (pkg_degree(RATE_MF[k], x)   != degree(rate_mf(k), x)) begin failures++; $display("FAIL rate mf %0d at %0d", k, x); end
      end
      for (int k = 0; k < 2; k++) begin
        checks++;
        if (pkg_degree(LOAD_MF[k], x) != degree(load_mf(k), x)) begin failures++; $display("FAIL load mf %0d at %0d", k, x); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
