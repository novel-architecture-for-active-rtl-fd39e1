// ale - adaptive line enhancer: the modified LMS filter of the noise canceller.
//
// For every audio sample it receives the primary (desired) signal d(k) =
// S(k) + N(k) on 'dk' and the reference x(k), the same noisy signal delayed
// by one sample, on 'x_in'. The one-sample delay decorrelates the white noise
// in x(k) from the noise in d(k) while the audio, which is correlated from
// sample to sample, stays predictable. The filter therefore learns to
// predict the audio part of d(k); its output y(k) is the de-noised signal:
//
//   y(k)     = sum_{i=0}^{N_TAPS-1} w_k(i) x(k-i)      (fir_mac)
//   e(k)     = d(k) - y(k)                              (subtractor, here)
//   w_{k+1}  = w_k + mu * x(k) * e(k)                   (weight_update)
//
// with mu a power of two derived from the delay-line power (step_size).
// All words are Q18 (anc_pkg). The block structure - delay-line FIFO,
// multiplier and adder arrays, subtractor, mu multiplier done by a shifter,
// update multiplier array and weight register - follows the design; the
// three-cycle sequence below is this design's choice.
//
// Interface and timing: 'enable' is a one-cycle sample strobe, accepted only
// while the filter is idle ('busy' low).
//   cycle 0  enable high: x_in enters the delay line, d(k) is latched and
//            the power sum is updated.
//   cycle 1  y(k) and e(k) are computed and registered; y_out changes at
//            the end of this cycle.
//   cycle 2  filter_done is high for this cycle; y_out and e_out hold the
//            new results; the weights are updated at its end.
// A new sample may therefore be accepted every third cycle.
module ale #(
  parameter int unsigned N_TAPS       = anc_pkg::LMS_TAPS,
  parameter int unsigned DATA_W       = anc_pkg::SAMPLE_W,
  parameter int unsigned FRAC         = anc_pkg::Q_FRAC,
  parameter int          MU_SHIFT_MIN = -8,
  parameter int          MU_SHIFT_MAX = 15,
  parameter int unsigned MU_MARGIN    = 2,
  localparam int unsigned SH_W        = anc_pkg::shift_w(MU_SHIFT_MIN, MU_SHIFT_MAX)
) (
  input  logic                     clk,
  input  logic                     n_reset,
  input  logic                     enable,
  input  logic signed [DATA_W-1:0] dk,
  input  logic signed [DATA_W-1:0] x_in,
  output logic signed [DATA_W-1:0] y_out,
  output logic signed [DATA_W-1:0] e_out,
  output logic                     filter_done,
  output logic                     busy,
  output logic                     warm,
  output logic signed [SH_W-1:0]   mu_shift,
  output logic                     sat
);

  localparam int unsigned MUE_W = DATA_W + MU_SHIFT_MAX - MU_SHIFT_MIN;

  typedef enum logic [1:0] {S_IDLE, S_FILT, S_UPD} state_t;
  state_t state;

  logic signed [DATA_W-1:0] taps [N_TAPS];
  logic signed [DATA_W-1:0] w    [N_TAPS];
  logic signed [DATA_W-1:0] x_old, y_comb, d_r;
  logic signed [MUE_W-1:0]  mu_err;
  logic                     accept, fir_sat, upd_sat, err_sat;
  logic signed [63:0]       e_wide;

  assign accept = enable && (state == S_IDLE);

  always_ff @(posedge clk or negedge n_reset) begin
    if (!n_reset) state <= S_IDLE;
    else unique case (state)
      S_IDLE: if (enable) state <= S_FILT;
      S_FILT: state <= S_UPD;
      S_UPD:  state <= S_IDLE;
      default: state <= S_IDLE;
    endcase
  end

  tap_fifo #(.N_TAPS(N_TAPS), .DATA_W(DATA_W)) u_fifo (
    .clk, .rst_n(n_reset), .shift_en(accept), .din(x_in),
    .taps, .dout_oldest(x_old), .full(warm)
  );

  fir_mac #(.N_TAPS(N_TAPS), .DATA_W(DATA_W), .FRAC(FRAC)) u_fir (
    .w, .taps, .y(y_comb), .sat(fir_sat)
  );

  step_size #(
    .N_TAPS(N_TAPS), .DATA_W(DATA_W), .FRAC(FRAC),
    .MU_SHIFT_MIN(MU_SHIFT_MIN), .MU_SHIFT_MAX(MU_SHIFT_MAX), .MU_MARGIN(MU_MARGIN)
  ) u_mu (
    .clk, .rst_n(n_reset), .upd(accept), .x_new(x_in), .x_old,
    .warm, .err(e_out), .mu_shift, .mu_err
  );

  weight_update #(
    .N_TAPS(N_TAPS), .DATA_W(DATA_W), .FRAC(FRAC), .MUE_FRAC(MU_SHIFT_MAX), .MUE_W(MUE_W)
  ) u_upd (
    .clk, .rst_n(n_reset), .upd(state == S_UPD), .mu_err, .taps, .w,
    .sat(upd_sat)
  );

  // Subtractor: e(k) = d(k) - y(k).
  assign e_wide  = 64'(d_r) - 64'(y_comb);
  assign err_sat = anc_pkg::clips(e_wide, DATA_W);

  always_ff @(posedge clk or negedge n_reset) begin
    if (!n_reset) begin
      d_r   <= '0;
      y_out <= '0;
      e_out <= '0;
      sat   <= 1'b0;
    end else begin
      if (accept) d_r <= dk;
      if (state == S_FILT) begin
        y_out <= y_comb;
        e_out <= DATA_W'(anc_pkg::sat_to(e_wide, DATA_W));
        sat   <= fir_sat || err_sat;
      end else if (state == S_UPD && upd_sat) begin
        sat   <= 1'b1;
      end
    end
  end

  assign filter_done = (state == S_UPD);
  assign busy        = (state != S_IDLE);

  // A sample strobe must not arrive while a sample is still being processed.
  a_no_overrun: assert property (@(posedge clk) disable iff (!n_reset)
                                 enable |-> state == S_IDLE);

endmodule
