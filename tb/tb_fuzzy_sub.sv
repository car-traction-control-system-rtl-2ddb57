// tb_fuzzy_sub: self-checking test of the subtractor.
// Replays the subtractor waveform of the design (a stepping by 2 from 0 to
// 40 against a constant 10), the constant inputs of its original test
// bench, and then random operands over the full 9-bit range.
module tb_fuzzy_sub;
  logic signed [8:0] a, b;
  logic signed [9:0] result;
  int checks = 0, failures = 0;

  fuzzy_sub #(.W(9)) dut (.a(a), .b(b), .result(result));

  task automatic check(int av, int bv);
    a = 9'(av); b = 9'(bv);
    #1;
    checks++;
    if (int'(result) != av - bv) begin
      failures++;
      $display("FAIL a=%0d b=%0d result=%0d expected=%0d", av, bv, result, av - bv);
    end
  endtask

  // Printed waveform: result for a = 0, 2, ..., 38 minus 10
  int wave_result [20] = '{-10,-8,-6,-4,-2,0,2,4,6,8,10,12,14,16,18,20,22,24,26,28};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20; i++) begin
      a = 9'(2 * i); b = 9'(10); #1;
      checks++;
      if (int'(result) != wave_result[i]) begin
        failures++;
        $display("FAIL waveform step %0d: %0d", i, result);
      end
    end
    check(40, 10);
    check(5, 10); check(0, 10); check(10, 10); check(50, 10); check(100, 10);
    check(-256, 255); check(255, -256); check(-256, -256);
    for (int i = 0; i < 500; i++)
      check(int'($urandom_range(511)) - 256, int'($urandom_range(511)) - 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
