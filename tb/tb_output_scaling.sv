// tb_output_scaling: self-checking test of the output scaler.
// Every normalised rate 0..240 is mapped to tenths of a percent and
// compared with the rounded real-valued result; the MF centres of the
// output tables (1/6 -> 16.7 %, 1/2 -> 50.0 %, 5/6 -> 83.3 %) are spot
// checked.
module tb_output_scaling;
  import flc_pkg::*;
  import tb_flc_ref_pkg::*;
  norm_t y;
  rate_t rate;
  int checks = 0, failures = 0;

  output_scaling dut (.y, .rate);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v <= 240; v++) begin
      y = norm_t'(v); #1;
      checks++;
      if (int'(rate) != scale_out(v)) begin failures++; $display("FAIL %0d -> %0d", v, rate); end
    end
    y = 8'd40;  #1; checks++; if (rate != 10'd167)  begin failures++; $display("FAIL 1/6"); end
    y = 8'd120; #1; checks++; if (rate != 10'd500)  begin failures++; $display("FAIL 1/2"); end
    y = 8'd200; #1; checks++; if (rate != 10'd833)  begin failures++; $display("FAIL 5/6"); end
    y = 8'd240; #1; checks++; if (rate != 10'd1000) begin failures++; $display("FAIL 1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
