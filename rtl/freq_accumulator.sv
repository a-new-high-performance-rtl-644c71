// Frequency accumulator of the FM modulator ("ACCUM"): adds the instantaneous
// frequency of the message to the carrier frequency control word.
//
//   freq_word <= fcw + (msg <<< KF_SHIFT)      (modulo 2**FCW_W)
//
// msg is a signed W-bit message sample (the interpolator output), fcw the
// unsigned carrier control word. KF_SHIFT sets the frequency deviation
// constant; the original design gives no value, 1 is this design's choice
// (full scale 127 -> 254 LSB of 381.47 Hz = 97 kHz at a 100 MHz clock).
// One register stage: freq_word follows the inputs one cycle later.
module freq_accumulator #(
  parameter int unsigned FCW_W    = 18,
  parameter int unsigned W        = 8,
  parameter int unsigned KF_SHIFT = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [FCW_W-1:0]     fcw,
  input  logic signed [W-1:0]  msg,
  output logic [FCW_W-1:0]     freq_word
);
  logic signed [FCW_W-1:0] dev;

  assign dev = FCW_W'(msg) <<< KF_SHIFT;

  always_ff @(posedge clk) begin
    if (!rst_n) freq_word <= '0;
    else        freq_word <= fcw + dev;
  end
endmodule
