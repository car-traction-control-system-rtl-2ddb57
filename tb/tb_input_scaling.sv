// tb_input_scaling: self-checking test of the three input scalers.
// Sweeps every 10-bit reading through the corner (360 deg), load (350 kg)
// and speed (180 km/h) scalers and compares with the rounded, saturated
// real-valued mapping onto 0..240. Spot checks the MF breakpoints of the
// tables (e.g. 60 deg -> 1/6, 175 kg -> 1/2, 90 km/h -> 1/2).
module tb_input_scaling;
  import flc_pkg::*;
  import tb_flc_ref_pkg::*;
  logic [9:0] phys;
  norm_t nc, nl, ns;
  int checks = 0, failures = 0;

  input_scaling #(.IN_W(10), .RANGE(360)) u_c (.phys, .norm(nc));
  input_scaling #(.IN_W(10), .RANGE(350)) u_l (.phys, .norm(nl));
  input_scaling #(.IN_W(10), .RANGE(180)) u_s (.phys, .norm(ns));

  task automatic spot(int p, norm_t got, int exp);
    checks++;
    if (int'(got) != exp) begin failures++; $display("FAIL spot %0d -> %0d exp %0d", p, got, exp); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 1024; p++) begin
      phys = 10'(p); #1;
      checks += 3;
      if (int'(nc) != scale_in(p, 360)) begin failures++; $display("FAIL corner %0d -> %0d", p, nc); end
      if (int'(nl) != scale_in(p, 350)) begin failures++; $display("FAIL load %0d -> %0d", p, nl); end
      if (int'(ns) != scale_in(p, 180)) begin failures++; $display("FAIL speed %0d -> %0d", p, ns); end
    end
    phys = 10'd60;  #1; spot(60, nc, 40);
    phys = 10'd180; #1; spot(180, nc, 120); spot(180, ns, 240);
    phys = 10'd175; #1; spot(175, nl, 120);
    phys = 10'd90;  #1; spot(90, ns, 120);
    phys = 10'd360; #1; spot(360, nc, 240);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
