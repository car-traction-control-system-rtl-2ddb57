// tb_fuzzy_cmp: self-checking test of the clocked comparator.
// Replays the comparator waveform of the design (a rising by 1, b falling
// by 1 per step, ending at a = 22, b = -10), then random operands. Each
// flag set is checked one clock after the operands are applied, and the
// flags must be one-hot.
module tb_fuzzy_cmp;
  logic clk = 0, rst_n = 0;
  logic signed [8:0] a = '0, b = '0;
  logic x1, x2, x3;
  int checks = 0, failures = 0;

  fuzzy_cmp #(.W(9)) dut (.clk, .rst_n, .a, .b, .x1, .x2, .x3);

  always #5 clk = ~clk;

  task automatic check(int av, int bv);
    a = 9'(av); b = 9'(bv);
    @(posedge clk); #1;
    checks++;
    if ({x1, x2, x3} != {av > bv, av == bv, av < bv}) begin
      failures++;
      $display("FAIL a=%0d b=%0d flags=%b%b%b", av, bv, x1, x2, x3);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    checks++;
    if ({x1, x2, x3} != 3'b010) begin failures++; $display("FAIL reset flags"); end
    rst_n = 1;
    for (int i = 0; i < 20; i++) check(2 + i, 10 - i);
    check(22, -10);
    check(-256, 255); check(255, -256); check(-1, -1); check(0, 0);
    for (int i = 0; i < 500; i++) begin
      automatic int av = int'($urandom_range(511)) - 256;
      automatic int bv = ($urandom_range(3) == 0) ? av : int'($urandom_range(511)) - 256;
      check(av, bv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
