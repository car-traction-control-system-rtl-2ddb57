// tb_traction_full: the controller at its default parameters, end to end.
//
// Runs complete control operations on a controller built with no parameter
// overrides (OR connective, 241-point centroid). The requests are the three
// input sets of the design's rule-viewer study, mapped from the viewer's
// -10..10 span onto the physical ranges (corner 108, 243 and 180 degrees,
// load 201 kg, speed 90 km/h), then a steering sweep from 0 to 360 degrees
// at 100 kg and 120 km/h. Each result is compared with the reference model
// and the latency is checked. For the three rule-viewer sets the design
// reports both spring rates at the middle of the range (0.00142 on the
// -10..10 span, i.e. 50.0 %); this is checked too.
module tb_traction_full;
  import flc_pkg::*;
  import tb_flc_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start = 0;
  logic [9:0]  angle = '0, load = '0, speed = '0;
  logic        busy, done, no_rule;
  rate_t       front_rate, rear_rate;
  logic [19:0] active_rules;

  traction_controller dut (
    .clk, .rst_n, .start, .corner_angle(angle), .load_kg(load),
    .speed_kmh(speed), .busy, .done, .front_rate, .rear_rate, .no_rule,
    .active_rules);

  task automatic request(int a, int l, int s);
    int c, ln, sn, dc[5], dl[2], ds[5], fc[5], rc[5], yf, yr, lat = 0;
    angle = 10'(a); load = 10'(l); speed = 10'(s);
    c  = scale_in(a, 360);
    ln = scale_in(l, 350);
    sn = scale_in(s, 180);
    for (int k = 0; k < 5; k++) begin
      dc[k] = degree(five_mf(k), c);
      ds[k] = degree(five_mf(k), sn);
    end
    for (int k = 0; k < 2; k++) dl[k] = degree(load_mf(k), ln);
    clips(0, dc, dl, ds, 0, fc);
    clips(0, dc, dl, ds, 1, rc);
    yf = centroid(fc, 1);
    yr = centroid(rc, 1);
    start = 1;
    @(posedge clk); #1;
    start = 0;
    while (!done && lat < 2000) begin lat++; @(posedge clk); #1; end
    lat++;
    checks += 3;
    if (int'(front_rate) != scale_out(yf < 0 ? 120 : yf) ||
        int'(rear_rate)  != scale_out(yr < 0 ? 120 : yr)) begin
      failures++;
      $display("FAIL a=%0d l=%0d s=%0d got %0d/%0d", a, l, s, front_rate, rear_rate);
    end
    if (no_rule != (yf < 0)) begin failures++; $display("FAIL no_rule"); end
    if (lat != ((yf < 0) ? 248 : 273)) begin failures++; $display("FAIL latency %0d", lat); end
    $display("corner=%0d deg load=%0d kg speed=%0d km/h -> front %0d.%0d %% rear %0d.%0d %% rules %b",
             a, l, s, front_rate / 10, front_rate % 10, rear_rate / 10, rear_rate % 10,
             active_rules);
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // The rule viewer printed 0.00142 on a -10..10 span for both outputs in
    // all three cases: 50.007 %, i.e. 500 in 0.1 % units
    for (int i = 0; i < 3; i++) begin
      request(i == 0 ? 108 : (i == 1 ? 243 : 180), 201, 90);
      checks++;
      if (front_rate < 10'd499 || front_rate > 10'd501 ||
          rear_rate < 10'd499 || rear_rate > 10'd501) begin
        failures++;
        $display("FAIL rule-viewer case %0d: %0d/%0d", i + 1, front_rate, rear_rate);
      end
    end
    for (int a = 0; a <= 360; a += 30) request(a, 100, 120);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
