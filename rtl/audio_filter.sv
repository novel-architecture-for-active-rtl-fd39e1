// audio_filter - top level of the FPGA active noise cancellation system.
//
// Audio from the codec's ADC is made noisy inside the chip and then cleaned
// again by an adaptive line enhancer (ALE) running the LMS algorithm in Q18
// fixed point. Per 48 kHz frame, in the system clock domain:
//   1. audio_driver delivers the left ADC sample S(k) with sample_strobe;
//   2. serial_adder adds the noise word N(k) from noise_gen, bit-serially,
//      giving the primary signal d(k) = S(k) + N(k) (clamped);
//   3. sample_delay keeps d(k-1) as the filter reference x(k);
//   4. ale predicts d(k) from x(k)..x(k-28); its output y(k) is the audio
//      with the unpredictable white noise removed, and it adapts its 29
//      weights with a power-normalised power-of-two step size;
//   5. selector sends y(k) (sel = 0) or the noisy d(k) (sel = 1) to both
//      DAC channels through audio_driver.
// filter_done follows sample_strobe by DATA_W + 4 system cycles (23 at the
// defaults: 20 for the serial addition, 3 in the filter), far inside the
// 20.8 us frame. The codec (ADC, DAC, its bit clock) is an external chip on
// the ac97_* pins. Three status outputs (codec ready, filter warmed up, a
// clamp acted) are meant for LEDs. The chain of blocks follows the design; processing only
// the left input channel and sending the result to both outputs is this
// design's choice.
module audio_filter #(
  parameter int unsigned N_TAPS          = anc_pkg::LMS_TAPS,
  parameter int unsigned NOISE_AMP_SHIFT = 3,
  parameter int          MU_SHIFT_MIN    = -8,
  parameter int          MU_SHIFT_MAX    = 15
) (
  input  logic       clk,
  input  logic       n_reset,
  input  logic       sel,
  input  logic [2:0] source,
  input  logic [4:0] volume,
  input  logic       ac97_bit_clk,
  input  logic       ac97_sdata_in,
  output logic       ac97_sdata_out,
  output logic       ac97_sync,
  output logic       ac97_reset_n,
  // status
  output logic       codec_ready,
  output logic       filter_warm,
  output logic       clip
);

  import anc_pkg::*;

  // right_in, e, the busy flags and mu_shift are left unread here: only the
  // left channel is filtered, and the others are status a sub-block offers.
  sample_t left_in, right_in, out_word, noise, noisy, x_ref, y, e;
  logic    strobe, add_done, add_busy, add_ovf;
  logic    filter_done, ale_busy, ale_warm, ale_sat;
  logic signed [anc_pkg::shift_w(MU_SHIFT_MIN, MU_SHIFT_MAX)-1:0] mu_shift;

  audio_driver u_driver (
    .clk, .n_reset, .volume, .source,
    .left_in, .right_in, .sample_strobe(strobe), .codec_ready,
    .left_out(out_word), .right_out(out_word),
    .ac97_bit_clk, .ac97_sdata_in, .ac97_sdata_out, .ac97_sync, .ac97_reset_n
  );

  noise_gen #(.AMP_SHIFT(NOISE_AMP_SHIFT)) u_noise (
    .clk, .rst_n(n_reset), .en(strobe), .noise
  );

  serial_adder u_add (
    .clk, .rst_n(n_reset), .start(strobe), .a(left_in), .b(noise),
    .sum(noisy), .ovf(add_ovf), .done(add_done), .busy(add_busy)
  );

  sample_delay u_delay (
    .clk, .rst_n(n_reset), .en(add_done), .d(noisy), .q(x_ref)
  );

  ale #(
    .N_TAPS(N_TAPS), .MU_SHIFT_MIN(MU_SHIFT_MIN), .MU_SHIFT_MAX(MU_SHIFT_MAX)
  ) u_ale (
    .clk, .n_reset, .enable(add_done), .dk(noisy), .x_in(x_ref),
    .y_out(y), .e_out(e), .filter_done, .busy(ale_busy), .warm(ale_warm),
    .mu_shift, .sat(ale_sat)
  );

  // Status: the filter has seen a full delay line; a clamp acted in the
  // noise addition or in the filter (held until the next sample).
  assign filter_warm = ale_warm;
  assign clip        = add_ovf || ale_sat;

  selector u_sel (
    .clk, .rst_n(n_reset), .load(filter_done), .sel, .filtered(y),
    .noisy, .out(out_word)
  );

endmodule
