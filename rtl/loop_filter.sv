// First-order loop filter of the DPLL, H(z) = 1 / (z - alpha), alpha = 15/16.
//
//   y[n+1] = x[n] + y[n] - (y[n] >>> ALPHA_SHIFT)
//
// The multiplication by alpha = 1 - 1/16 is a 4-bit arithmetic right shift
// and a subtraction, no multiplier, as in the original design. x is the
// IN_W-bit phase-detector output, y the OUT_W-bit register (loop_out). DC gain
// is 16, so the 8-bit input fills about 12 output bits; the sum is saturated
// at the OUT_W-bit limits (this design's choice, the original gives none).
// loop_out is the register itself: one cycle from pd_in to loop_out.
module loop_filter #(
  parameter int unsigned IN_W        = 8,
  parameter int unsigned OUT_W       = 12,
  parameter int unsigned ALPHA_SHIFT = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  pd_in,
  output logic signed [OUT_W-1:0] loop_out
);
  localparam logic signed [OUT_W+1:0] MAXV = (OUT_W+2)'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [OUT_W+1:0] MINV = -(OUT_W+2)'(1 << (OUT_W - 1));

  logic signed [OUT_W+1:0] next;

  assign next = (OUT_W+2)'(pd_in) + (OUT_W+2)'(loop_out)
              - (OUT_W+2)'(loop_out >>> ALPHA_SHIFT);

  always_ff @(posedge clk) begin
    if (!rst_n)          loop_out <= '0;
    else if (next > MAXV) loop_out <= MAXV[OUT_W-1:0];
    else if (next < MINV) loop_out <= MINV[OUT_W-1:0];
    else                  loop_out <= next[OUT_W-1:0];
  end
endmodule
