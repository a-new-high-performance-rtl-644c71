// Loop gain of the DPLL: turns the loop-filter output into the frequency
// control word of the local DDFS.
//
//   fcw = center_fcw + (loop_in <<< GAIN_SHIFT)     (modulo 2**FCW_W)
//
// center_fcw sets the free-running frequency of the loop. The original design
// uses 1 MHz, i.e. 2621 = round(1 MHz * 2^18 / 100 MHz) at a 100 MHz clock;
// here it is an input so the receiver can be tuned like the modulator.
// GAIN_SHIFT is this design's choice (the original only names a gain block
// between the 12-bit filter and the 18-bit DDFS input): with 1, a frequency
// offset of 2*v LSB is tracked with loop_in = v. Combinational.
module loop_gain #(
  parameter int unsigned       LF_W       = 12,
  parameter int unsigned       FCW_W      = 18,
  parameter int unsigned       GAIN_SHIFT = 1
) (
  input  logic [FCW_W-1:0]       center_fcw,
  input  logic signed [LF_W-1:0] loop_in,
  output logic [FCW_W-1:0]       fcw
);
  logic signed [FCW_W-1:0] offset;
  assign offset = FCW_W'(loop_in) <<< GAIN_SHIFT;
  assign fcw    = center_fcw + offset;
endmodule
