// tb_inference: self-checking test of rule evaluation.
// Two units run side by side, one with the OR (max) connective and one
// with AND (min). Random degree vectors, plus vectors with a single set
// active, are applied; firing strengths and the front and rear clip levels
// are checked one clock later against the reference rule table.
module tb_inference;
  import flc_pkg::*;
  import tb_flc_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   in_valid = 0, v_or, v_and;
  grade_t cd [N_CORNER];
  grade_t ld [N_LOAD];
  grade_t sd [N_SPEED];
  grade_t w_or [N_RULES], w_and [N_RULES];
  grade_t f_or [N_RATE], r_or [N_RATE], f_and [N_RATE], r_and [N_RATE];

  inference #(.CONNECTIVE(CONN_OR)) dut_or (
    .clk, .rst_n, .in_valid, .corner_deg(cd), .load_deg(ld), .speed_deg(sd),
    .out_valid(v_or), .strength(w_or), .front_clip(f_or), .rear_clip(r_or));
  inference #(.CONNECTIVE(CONN_AND)) dut_and (
    .clk, .rst_n, .in_valid, .corner_deg(cd), .load_deg(ld), .speed_deg(sd),
    .out_valid(v_and), .strength(w_and), .front_clip(f_and), .rear_clip(r_and));

  int dc[5], dl[2], ds[5];

  task automatic apply_and_check();
    int fc[5], rc[5];
    for (int k = 0; k < 5; k++) begin cd[k] = grade_t'(dc[k]); sd[k] = grade_t'(ds[k]); end
    for (int k = 0; k < 2; k++) ld[k] = grade_t'(dl[k]);
    in_valid = 1;
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (!v_or || !v_and) begin failures++; $display("FAIL valid"); end
    for (int r = 0; r < 20; r++) begin
      checks += 2;
      if (int'(w_or[r])  != rule_strength(r, 0, dc, dl, ds)) begin failures++; $display("FAIL or rule %0d", r+1); end
      if (int'(w_and[r]) != rule_strength(r, 1, dc, dl, ds)) begin failures++; $display("FAIL and rule %0d", r+1); end
    end
    for (int m = 0; m < 2; m++) begin
      clips(m[0], dc, dl, ds, 0, fc);
      clips(m[0], dc, dl, ds, 1, rc);
      for (int k = 0; k < 5; k++) begin
        checks += 2;
        if (int'(m ? f_and[k] : f_or[k]) != fc[k]) begin failures++; $display("FAIL front clip %0d conn %0d", k, m); end
        if (int'(m ? r_and[k] : r_or[k]) != rc[k]) begin failures++; $display("FAIL rear clip %0d conn %0d", k, m); end
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 5; k++) begin cd[k] = '0; sd[k] = '0; end
    for (int k = 0; k < 2; k++) ld[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // one set of one variable at a time
    for (int v = 0; v < 12; v++) begin
      for (int k = 0; k < 5; k++) begin dc[k] = 0; ds[k] = 0; end
      dl[0] = 0; dl[1] = 0;
      if (v < 5) dc[v] = 200; else if (v < 7) dl[v-5] = 200; else ds[v-7] = 200;
      apply_and_check();
    end
    for (int i = 0; i < 2000; i++) begin
      for (int k = 0; k < 5; k++) begin dc[k] = $urandom_range(200); ds[k] = $urandom_range(200); end
      for (int k = 0; k < 2; k++) dl[k] = $urandom_range(200);
      apply_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
