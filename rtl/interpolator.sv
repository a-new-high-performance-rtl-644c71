// Interpolator: linear interpolation by 2**FACTOR_LOG2 (32) between
// consecutive signed W-bit message samples, with one subtractor and one adder.
//
// When load is high a new sample din is taken: the step
//   d = (din >>> 1) - (prev >>> 1)
// is computed by the subtractor (halving both operands first keeps the
// difference inside W bits), the previous sample is stored and the running
// output register is reloaded with the previous sample. The running output
// keeps FACTOR_LOG2-1 (4) fraction bits, so adding d on each step_en cycle
// adds d/16 = (din - prev)/32 to the output: after 32 steps it has moved from
// the previous sample to the new one (within 1 LSB from the halving). This is
// the "shift by one before and by four after the subtraction" of the original
// design; keeping the 4 bits as fraction rather than dropping them is this
// design's choice, so the ramp does not drift.
//
// Timing: dout follows the previous sample in the cycle after load and then
// changes one cycle after each step_en. load has priority over step_en.
// The user supplies 32 step_en pulses per sample period.
module interpolator #(
  parameter int unsigned W           = 8,
  parameter int unsigned FACTOR_LOG2 = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic signed [W-1:0] din,
  input  logic                step_en,
  output logic signed [W-1:0] dout
);
  localparam int unsigned FB = FACTOR_LOG2 - 1;   // fraction bits after the post-shift

  logic signed [W-1:0]    prev;
  logic signed [W-1:0]    step;                   // (din - prev)/2, weight 2^-FB in acc
  logic signed [W+FB:0]   acc;                    // running output, FB fraction bits, 1 guard bit
  logic signed [W-1:0]    diff;

  assign diff = (din >>> 1) - (prev >>> 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev <= '0;
      step <= '0;
      acc  <= '0;
    end else if (load) begin
      prev <= din;
      step <= diff;
      acc  <= {prev[W-1], prev, {FB{1'b0}}};
    end else if (step_en) begin
      acc  <= acc + (W+FB+1)'(step);
    end
  end

  // Integer part; the guard bit can only be set by rounding of the last step.
  always_comb begin
    if (acc[W+FB] != acc[W+FB-1])
      dout = acc[W+FB] ? {1'b1, {(W-1){1'b0}}} : {1'b0, {(W-1){1'b1}}};
    else
      dout = acc[W+FB-1:FB];
  end
endmodule
