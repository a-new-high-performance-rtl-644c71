// Widths shared by the FM modulator, the DPLL demodulator and the top level.
//   SAMPLE_W : message samples, ADC/DAC samples and DDFS outputs (8 bits)
//   FCW_W    : frequency control words and phase accumulators (18 bits;
//              one step is fclk / 2^18 = 381.47 Hz at 100 MHz)
//   PHASE_W  : truncated phase used by the cosine lookup (10 bits)
//   LOOP_W   : loop-filter output (12 bits)
//   INTERP_LOG2 : log2 of the interpolation factor (32)
//   FIR_TAPS : taps of the output moving-average filter
package fm_pkg;
  localparam int unsigned SAMPLE_W     = 8;
  localparam int unsigned FCW_W        = 18;
  localparam int unsigned PHASE_W      = 10;
  localparam int unsigned LOOP_W       = 12;
  localparam int unsigned INTERP_LOG2  = 5;
  localparam int unsigned FIR_TAPS     = 16;

  typedef logic        [FCW_W-1:0]    fcw_t;
  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [LOOP_W-1:0]   loop_t;
endpackage
