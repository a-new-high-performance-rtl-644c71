// DPLL-based FM demodulator.
//
// A second-order digital phase-locked loop: the phase detector multiplies
// the ADC sample by the cosine of a local DDFS, the first-order loop filter
// (pole at 15/16) smooths the product, and the gain block turns the filter
// output into the DDFS control word around the free-running frequency
// center_fcw (1 MHz, FCW 2621 at 100 MHz, in the original design). The DDFS
// integrates frequency into phase, which gives the loop its second
// integrator. When locked, the DDFS frequency follows the input, so the
// loop-filter output is proportional to the instantaneous frequency
// deviation, i.e. to the message. A 16-tap moving
// average FIR filter removes the twice-carrier ripple and gives the 8-bit
// message demod_out.
//
// Scaling: an input deviation of d FCW LSB (381.47 Hz each) gives
// loop_out = d / 2^GAIN_SHIFT = d/2 in steady state, which equals the
// modulator's input sample when the modulator uses KF_SHIFT = 1.
// Loop delay: PD register, LF register, DDFS phase register = 3 cycles
// (the demodulator's DDFS has no pipeline registers). The FIR adds 1 cycle
// plus its 7.5-cycle group delay.
//
// Choice of carrier: the product in the phase detector also holds a term at
// twice the carrier. The loop filter passes it with a gain of 1/|e^jw - 15/16|
// (7.3 at 2 MHz) and the 16-tap average only nulls it when twice the carrier
// is a multiple of fclk/16. At the original 1 MHz the ripple on loop_out is
// about +-460 LSB and saturates the 8-bit demod_out; at 3.125 MHz
// (center_fcw = 8192, 2*fc = fclk/16) the output is clean. loop_out carries
// the message at any carrier in the lock range.
module fm_demodulator
  import fm_pkg::*;
#(
  parameter int unsigned GAIN_SHIFT = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  fcw_t              center_fcw,  // free-running DDFS frequency
  input  sample_t           adc_in,
  output sample_t           demod_out,
  output sample_t           pd_out,      // phase detector output
  output loop_t             loop_out,    // loop filter output
  output sample_t           dds_out      // local DDFS cosine
);
  fcw_t nco_fcw;
  fcw_t phase_unused;

  phase_detector #(.W(SAMPLE_W)) u_pd (
    .clk    (clk),
    .rst_n  (rst_n),
    .fm_in  (adc_in),
    .dds_in (dds_out),
    .pd_out (pd_out)
  );

  loop_filter #(.IN_W(SAMPLE_W), .OUT_W(LOOP_W), .ALPHA_SHIFT(4)) u_lf (
    .clk      (clk),
    .rst_n    (rst_n),
    .pd_in    (pd_out),
    .loop_out (loop_out)
  );

  loop_gain #(.LF_W(LOOP_W), .FCW_W(FCW_W), .GAIN_SHIFT(GAIN_SHIFT)) u_gain (
    .center_fcw (center_fcw),
    .loop_in    (loop_out),
    .fcw        (nco_fcw)
  );

  ddfs #(.L(FCW_W), .W(PHASE_W), .K(SAMPLE_W), .PIPELINED(1'b0)) u_dds (
    .clk     (clk),
    .rst_n   (rst_n),
    .add_in  (nco_fcw),
    .dds_out (dds_out),
    .phase   (phase_unused)
  );

  fir_filter #(.TAPS(FIR_TAPS), .IN_W(LOOP_W), .OUT_W(SAMPLE_W)) u_fir (
    .clk     (clk),
    .rst_n   (rst_n),
    .x_in    (loop_out),
    .fir_out (demod_out)
  );

  logic unused_ok;
  assign unused_ok = ^phase_unused;
endmodule
