// tb_fuzzifier: self-checking test of the fuzzification stage.
// Drives every normalised value of corner, load and speed (0..240, with
// the three inputs out of step) and checks all twelve membership degrees,
// one clock later, against the reference MFs built from the table corner
// points. Also checks that out_valid follows in_valid by one clock.
module tb_fuzzifier;
  import flc_pkg::*;
  import tb_flc_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   in_valid = 0, out_valid;
  norm_t  corner = '0, load = '0, speed = '0;
  grade_t cd [N_CORNER];
  grade_t ld [N_LOAD];
  grade_t sd [N_SPEED];

  fuzzifier dut (.clk, .rst_n, .in_valid, .corner, .load, .speed, .out_valid,
                 .corner_deg(cd), .load_deg(ld), .speed_deg(sd));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i <= 240 + 10; i++) begin
      automatic int c = i % 241, l = (i * 7) % 241, s = (240 - i + 241) % 241;
      corner = norm_t'(c); load = norm_t'(l); speed = norm_t'(s);
      in_valid = i[0];
      @(posedge clk); #1;
      checks++;
      if (out_valid != i[0]) begin failures++; $display("FAIL valid"); end
      for (int k = 0; k < 5; k++) begin
        checks += 2;
        if (int'(cd[k]) != degree(five_mf(k), c)) begin
          failures++; $display("FAIL corner=%0d mf%0d got %0d exp %0d", c, k, cd[k], degree(five_mf(k), c));
        end
        if (int'(sd[k]) != degree(five_mf(k), s)) begin
          failures++; $display("FAIL speed=%0d mf%0d got %0d", s, k, sd[k]);
        end
      end
      for (int k = 0; k < 2; k++) begin
        checks++;
        if (int'(ld[k]) != degree(load_mf(k), l)) begin
          failures++; $display("FAIL load=%0d mf%0d got %0d exp %0d", l, k, ld[k], degree(load_mf(k), l));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
