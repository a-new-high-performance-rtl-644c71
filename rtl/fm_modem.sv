// FM modulator and DPLL FM demodulator for a software-defined radio, side by
// side in one top level.
//
// The two halves share only the clock and reset. The modulator turns a serial
// 8-bit audio stream into an 8-bit FM carrier for a DAC; the demodulator takes
// 8-bit FM samples from an ADC and returns the 8-bit message for a DAC. The
// converters are outside this design, so their digital sides are the ports.
// Connecting mod_out to demod_adc_in gives a complete digital link. See
// fm_modulator and fm_demodulator for the timing of each half.
module fm_modem
  import fm_pkg::*;
#(
  parameter int unsigned KF_SHIFT         = 1,
  parameter int unsigned DEMOD_GAIN_SHIFT = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  // modulator
  input  logic        mod_bit_en,
  input  logic        mod_fm_in,
  input  logic        mod_step_en,
  input  fcw_t        mod_fcw,
  output sample_t     mod_out,
  output sample_t     mod_sample,
  output logic        mod_sample_valid,
  output sample_t     mod_interp,
  // demodulator
  input  fcw_t        demod_fcw,     // free-running frequency of the DPLL
  input  sample_t     demod_adc_in,
  output sample_t     demod_out,
  output sample_t     demod_pd,
  output loop_t       demod_loop,
  output sample_t     demod_dds
);
  fm_modulator #(.KF_SHIFT(KF_SHIFT)) u_mod (
    .clk          (clk),
    .rst_n        (rst_n),
    .bit_en       (mod_bit_en),
    .fm_in        (mod_fm_in),
    .step_en      (mod_step_en),
    .fcw          (mod_fcw),
    .mod_out      (mod_out),
    .sample       (mod_sample),
    .sample_valid (mod_sample_valid),
    .interp_out   (mod_interp)
  );

  fm_demodulator #(.GAIN_SHIFT(DEMOD_GAIN_SHIFT)) u_demod (
    .clk        (clk),
    .rst_n      (rst_n),
    .center_fcw (demod_fcw),
    .adc_in    (demod_adc_in),
    .demod_out (demod_out),
    .pd_out    (demod_pd),
    .loop_out  (demod_loop),
    .dds_out   (demod_dds)
  );
endmodule
