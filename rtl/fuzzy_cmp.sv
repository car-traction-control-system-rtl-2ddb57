// fuzzy_cmp: comparator sub-block of the fuzzification unit.
//
// Compares two signed integers and raises one of three flags: x1 when
// a > b, x2 when a = b, x3 when a < b. Exactly one flag is high at a time.
// The comparator is clocked, as in the fuzzification block diagram: the
// flags are registered on the rising edge of clk and appear one cycle
// after a and b. The asynchronous active-low reset (this design's choice)
// clears the flags to "equal" (x2 = 1).
module fuzzy_cmp #(
  parameter int W = 9
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic                x1,   // a > b
  output logic                x2,   // a = b
  output logic                x3    // a < b
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= 1'b0;
      x2 <= 1'b1;
      x3 <= 1'b0;
    end else begin
      x1 <= (a > b);
      x2 <= (a == b);
      x3 <= (a < b);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot({x1, x2, x3}))
    else $error("fuzzy_cmp: flags not one-hot");

endmodule
