// Phase detector of the DPLL: multiplier plus one register.
//
// The 8-bit ADC sample of the FM signal is multiplied by the 8-bit cosine of
// the local DDFS in the Booth/Wallace multiplier; the product contains the
// phase-error term sin(theta_i - theta_o) plus a component at twice the
// carrier, which the loop filter and FIR filter remove.
// The 16-bit product is scaled to the 8-bit phase-detector output by taking
// bits [14:7] (divide by 128); the only product that does not fit,
// -128 * -128, is saturated to +127. The bit selection is this design's
// choice. Output registered: pd_out follows the inputs by one cycle.
module phase_detector #(
  parameter int unsigned W = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] fm_in,
  input  logic signed [W-1:0] dds_in,
  output logic signed [W-1:0] pd_out
);
  logic signed [2*W-1:0] prod;
  logic signed [W-1:0]   scaled;

  booth_wallace_mult #(.N(W)) u_mult (
    .x (dds_in),
    .y (fm_in),
    .p (prod)
  );

  // prod[2W-1] differs from prod[2W-2] only for (-2^(W-1))^2.
  assign scaled = (prod[2*W-1] != prod[2*W-2]) ? {1'b0, {(W-1){1'b1}}}
                                               : prod[2*W-2 -: W];

  always_ff @(posedge clk) begin
    if (!rst_n) pd_out <= '0;
    else        pd_out <= scaled;
  end

  // Discarded low product bits.
  logic unused_low;
  assign unused_low = ^prod[W-2:0];
endmodule
