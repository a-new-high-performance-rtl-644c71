// 16-tap transposed-form FIR filter with all coefficients 1/16 (moving
// average), the output filter of the FM demodulator.
//
// Transposed form: the input is broadcast to every adder and the partial
// sums move through a chain of TAPS-1 registers; stage k holds the sum of the
// last k inputs, so the adder at the end of the chain sees the sum of the last
// TAPS inputs with one adder delay on the critical path. Because every
// coefficient is 1/16, the multiplication is a single 4-bit arithmetic shift;
// here it is applied once, to the final sum, so no truncation error builds up
// along the chain (this design's choice). The 12-bit average is saturated to
// OUT_W bits. Output registered: fir_out is the average of the TAPS most
// recent inputs, the newest taken one cycle earlier.
module fir_filter #(
  parameter int unsigned TAPS  = 16,
  parameter int unsigned IN_W  = 12,
  parameter int unsigned OUT_W = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  x_in,
  output logic signed [OUT_W-1:0] fir_out
);
  localparam int unsigned SHIFT = $clog2(TAPS);
  localparam int unsigned SW    = IN_W + SHIFT;

  localparam logic signed [SW-1:0] MAXV = SW'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [SW-1:0] MINV = -SW'(1 << (OUT_W - 1));

  logic signed [SW-1:0] chain [TAPS-1];   // chain[k]: sum of the last k+1 inputs
  logic signed [SW-1:0] total;
  logic signed [SW-1:0] avg;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(TAPS) - 1; k++) chain[k] <= '0;
    end else begin
      chain[0] <= SW'(x_in);
      for (int k = 1; k < int'(TAPS) - 1; k++) chain[k] <= chain[k-1] + SW'(x_in);
    end
  end

  assign total = chain[TAPS-2] + SW'(x_in);
  assign avg   = total >>> SHIFT;

  always_ff @(posedge clk) begin
    if (!rst_n)          fir_out <= '0;
    else if (avg > MAXV) fir_out <= MAXV[OUT_W-1:0];
    else if (avg < MINV) fir_out <= MINV[OUT_W-1:0];
    else                 fir_out <= avg[OUT_W-1:0];
  end
endmodule
