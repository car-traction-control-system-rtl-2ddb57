// tb_fuzzification: self-checking test of the membership-degree unit.
//
// Part 1 replays the integrated fuzzification run of the design: centre 10,
// slope 5, the same sequence of inputs from -45 to 550, checking the
// difference and the product against the printed waveform values. That
// run goes beyond the 9-bit range, so this instance is built 11 bits wide.
// Part 2 uses a default-width unit and random inputs, centres and shapes,
// and checks the degree against a reference triangle/shoulder evaluated by
// interpolation. All outputs are checked one clock after the inputs.
module tb_fuzzification;
  import flc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // Part 1: 11-bit instance
  logic signed [10:0] a1 = '0;
  logic signed [11:0] res1;
  logic signed [20:0] prod1;
  logic x1a, x2a, x3a;
  logic [7:0] deg1;
  fuzzification #(.W(11)) dut_wide (
    .clk, .rst_n, .a(a1), .centre(11'sd10), .slope(8'd5), .shape(MF_TRIANGLE),
    .result(res1), .prod(prod1), .x1(x1a), .x2(x2a), .x3(x3a), .degree(deg1)
  );

  // Part 2: default instance
  logic signed [8:0] a2 = '0, c2 = '0;
  logic [7:0] s2 = 8'd5;
  mf_shape_e  sh2 = MF_TRIANGLE;
  logic signed [9:0]  res2;
  logic signed [18:0] prod2;
  logic x1b, x2b, x3b;
  logic [7:0] deg2;
  fuzzification dut (
    .clk, .rst_n, .a(a2), .centre(c2), .slope(s2), .shape(sh2),
    .result(res2), .prod(prod2), .x1(x1b), .x2(x2b), .x3(x3b), .degree(deg2)
  );

  // Printed (a, result, prod) of the integrated run
  int wave [18][3] = '{
    '{-5,-15,-75}, '{0,-10,-50}, '{5,-5,-25}, '{10,0,0}, '{60,50,250},
    '{150,140,700}, '{-20,-30,-150}, '{210,200,1000}, '{100,90,450},
    '{-45,-55,-275}, '{30,20,100}, '{250,240,1200}, '{550,540,2700},
    '{450,440,2200}, '{130,120,600}, '{270,260,1300}, '{99,89,445},
    '{-16,-26,-130}};

  // Reference degree: straight line from 1.0 at the peak to 0 at the
  // foot, which lies 200/s away; flat on the shoulder side
  function automatic int ref_degree(int x, int c, int s, mf_shape_e sh);
    real foot = 200.0 / s;
    real d    = (x > c) ? real'(x - c) : real'(c - x);
    if (x > c && sh == MF_RIGHT_SHOULDER) return 200;
    if (x < c && sh == MF_LEFT_SHOULDER)  return 200;
    if (d >= foot) return 0;
    return int'(200.0 * (1.0 - d / foot) + 0.25);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 18; i++) begin
      a1 = 11'(wave[i][0]);
      @(posedge clk); #1;
      checks++;
      if (int'(res1) != wave[i][1] || int'(prod1) != wave[i][2] ||
          {x1a, x2a, x3a} != {wave[i][0] > 10, wave[i][0] == 10, wave[i][0] < 10} ||
          int'(deg1) != ref_degree(wave[i][0], 10, 5, MF_TRIANGLE)) begin
        failures++;
        $display("FAIL waveform step %0d: a=%0d result=%0d prod=%0d deg=%0d", i,
                 wave[i][0], res1, prod1, deg1);
      end
    end
    for (int i = 0; i < 3000; i++) begin
      automatic int x = $urandom_range(240);
      automatic int c = 40 * $urandom_range(1, 5);
      automatic int s = (i < 2000) ? 5 : 1 << $urandom_range(0, 3);
      automatic mf_shape_e sh = mf_shape_e'($urandom_range(2));
      a2 = 9'(x); c2 = 9'(c); s2 = 8'(s); sh2 = sh;
      @(posedge clk); #1;
      checks++;
      if (int'(deg2) != ref_degree(x, c, s, sh) || int'(res2) != x - c ||
          int'(prod2) != s * (x - c)) begin
        failures++;
        $display("FAIL x=%0d c=%0d s=%0d shape=%0d deg=%0d exp=%0d", x, c, s,
                 sh, deg2, ref_degree(x, c, s, sh));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
