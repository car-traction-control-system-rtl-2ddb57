// tb_fuzzy_mult: self-checking test of the multiplier.
// Replays the multiplier waveform of the design (a stepping by 2 every
// step, b by 6 every second step) against its printed products, then
// random signed operands including the extremes.
module tb_fuzzy_mult;
  logic signed [9:0]  a;
  logic signed [8:0]  b;
  logic signed [18:0] prod;
  int checks = 0, failures = 0;

  fuzzy_mult #(.AW(10), .BW(9)) dut (.a(a), .b(b), .prod(prod));

  // Printed products; step 1 (a=2, b=0) is 0
  int wave_prod [20] = '{0,0,24,36,96,120,216,252,384,432,600,660,864,936,
                        1176,1260,1536,1632,1944,2052};

  task automatic check(int av, int bv);
    a = 10'(av); b = 9'(bv);
    #1;
    checks++;
    if (int'(prod) != av * bv) begin
      failures++;
      $display("FAIL a=%0d b=%0d prod=%0d expected=%0d", av, bv, prod, av * bv);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20; i++) begin
      a = 10'(2 * i); b = 9'(6 * (i / 2)); #1;
      checks++;
      if (int'(prod) != wave_prod[i]) begin
        failures++;
        $display("FAIL waveform step %0d: %0d expected %0d", i, prod, wave_prod[i]);
      end
    end
    check(-512, -256); check(511, 255); check(-512, 255); check(-5, -10);
    check(10, -100);
    for (int i = 0; i < 500; i++)
      check(int'($urandom_range(1023)) - 512, int'($urandom_range(511)) - 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
