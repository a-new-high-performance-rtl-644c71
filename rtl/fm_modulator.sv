// Digital FM modulator: FM data generator -> x32 interpolator -> frequency
// accumulator -> pipelined DDFS.
//
// Serial message bits arrive on fm_in, one per bit_en (FM symbol clock). Every
// 8 bits the data generator delivers a signed 8-bit message sample, which
// loads the interpolator; the interpolator then ramps to it in 32 steps, one
// per step_en. The frequency accumulator adds the ramped sample, shifted left
// by KF_SHIFT, to the carrier control word fcw, and the DDFS turns that
// instantaneous frequency into the 8-bit cosine mod_out:
//   mod_out = cos(2*pi * sum(fcw + msg*2^KF_SHIFT) / 2^18).
// With a 100 MHz clock one FCW LSB is 381.47 Hz.
//
// Latency: a change of the interpolator output reaches the DDFS phase 2 cycles
// later (accumulator register, phase register) and mod_out 2 cycles after
// that (DDFS pipeline). Block structure follows the original design; the
// rates of bit_en and step_en are set by the user (32 step_en per 8 bit_en).
module fm_modulator
  import fm_pkg::*;
#(
  parameter int unsigned KF_SHIFT = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bit_en,
  input  logic        fm_in,
  input  logic        step_en,
  input  fcw_t        fcw,
  output sample_t     mod_out,
  output sample_t     sample,       // current framed 8-bit message sample
  output logic        sample_valid,
  output sample_t     interp_out    // interpolated message
);
  logic [SAMPLE_W-1:0] fm_par;
  fcw_t                freq_word;
  fcw_t                phase_unused;

  fm_data_generator #(.W(SAMPLE_W)) u_fmdg (
    .clk        (clk),
    .rst_n      (rst_n),
    .bit_en     (bit_en),
    .fm_in      (fm_in),
    .fm_out     (fm_par),
    .word_out   (sample),
    .word_valid (sample_valid)
  );

  interpolator #(.W(SAMPLE_W), .FACTOR_LOG2(INTERP_LOG2)) u_interp (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (sample_valid),
    .din     (sample),
    .step_en (step_en),
    .dout    (interp_out)
  );

  freq_accumulator #(.FCW_W(FCW_W), .W(SAMPLE_W), .KF_SHIFT(KF_SHIFT)) u_accum (
    .clk       (clk),
    .rst_n     (rst_n),
    .fcw       (fcw),
    .msg       (interp_out),
    .freq_word (freq_word)
  );

  ddfs #(.L(FCW_W), .W(PHASE_W), .K(SAMPLE_W), .PIPELINED(1'b1)) u_ddfs (
    .clk     (clk),
    .rst_n   (rst_n),
    .add_in  (freq_word),
    .dds_out (mod_out),
    .phase   (phase_unused)
  );

  logic unused_ok;
  assign unused_ok = ^{fm_par, phase_unused};
endmodule
