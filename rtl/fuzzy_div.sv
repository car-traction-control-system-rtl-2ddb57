// fuzzy_div: sequential unsigned restoring divider.
//
// Computes quot = num / den and rem = num % den, one quotient bit per
// clock, most significant bit first. A start pulse loads the operands;
// done pulses for one clock NW clocks later, when quot and rem are valid
// (they hold until the next start). busy is high in between. A start while
// busy is ignored. The divisor must not be zero; the caller handles that
// case itself.
module fuzzy_div #(
  parameter int NW = 24,  // dividend and quotient width
  parameter int DW = 16   // divisor width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quot,
  output logic [DW-1:0] rem
);

  localparam int CW = $clog2(NW + 1);

  logic [DW-1:0] den_q;
  logic [DW-1:0] part;      // partial remainder
  logic [NW-1:0] q;         // dividend bits shifting out, quotient in
  logic [CW-1:0] cnt;
  logic [DW:0]   trial;
  logic [DW:0]   diff;

  always_comb begin
    trial = {part, q[NW-1]};
    diff  = trial - {1'b0, den_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      den_q <= '0;
      part  <= '0;
      q     <= '0;
      cnt   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          den_q <= den;
          part  <= '0;
          q     <= num;
          cnt   <= CW'(NW);
        end
      end else begin
        if (!diff[DW]) begin
          part <= diff[DW-1:0];
          q    <= {q[NW-2:0], 1'b1};
        end else begin
          part <= trial[DW-1:0];
          q    <= {q[NW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quot = q;
  assign rem  = part;

endmodule
