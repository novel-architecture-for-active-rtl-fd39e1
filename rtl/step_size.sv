// step_size - power-normalised LMS step size built from a barrel shifter.
//
// The step size mu must satisfy 0 < mu < 2 / ||x(k)||^2 for the LMS update to
// converge. This unit keeps ||x(k)||^2 as a running sum over the delay line:
// on every 'upd' it adds x_new^2 and subtracts x_old^2 (the sample leaving
// the delay line), so the sum always equals the energy of the current tap
// vector. mu is restricted to powers of two, mu = 2^-mu_shift, so that the
// multiplication mu*e(k) is a barrel shift instead of a multiplier. mu_shift
// is signed: for quiet inputs the rule asks for steps above 1, and the
// default range MU_SHIFT_MIN = -8 allows up to 2^8:
//
//   mu_shift = clamp(msb(P) - 2*FRAC + 1 + MU_MARGIN, MU_SHIFT_MIN, MU_SHIFT_MAX)
//
// where msb(P) is the index of the leading one of the Q36 power P. This gives
// mu * ||x||^2 < 2^-MU_MARGIN. Until the delay line is full ('warm' low), or
// while P is zero, mu_shift is held at MU_SHIFT_MAX so that mu starts close
// to zero. mu_err = e * 2^(MU_SHIFT_MAX - mu_shift) is mu*e in Q(FRAC +
// MU_SHIFT_MAX), which keeps every bit of e however small mu is.
// Deriving mu from the input power with a shifter follows the design; the
// power-of-two rounding, the margin and the clamp limits are this design's
// choices.
//
// Timing: P updates on the rising edge with 'upd' high; mu_shift and mu_err
// are combinational from P, warm and err.
module step_size #(
  parameter int unsigned N_TAPS       = anc_pkg::LMS_TAPS,
  parameter int unsigned DATA_W       = anc_pkg::SAMPLE_W,
  parameter int unsigned FRAC         = anc_pkg::Q_FRAC,
  parameter int          MU_SHIFT_MIN = -8,
  parameter int          MU_SHIFT_MAX = 15,
  parameter int unsigned MU_MARGIN    = 2,
  localparam int unsigned SH_W        = anc_pkg::shift_w(MU_SHIFT_MIN, MU_SHIFT_MAX),
  localparam int unsigned MUE_W       = DATA_W + MU_SHIFT_MAX - MU_SHIFT_MIN
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     upd,
  input  logic signed [DATA_W-1:0] x_new,
  input  logic signed [DATA_W-1:0] x_old,
  input  logic                     warm,
  input  logic signed [DATA_W-1:0] err,
  output logic signed [SH_W-1:0]   mu_shift,
  output logic signed [MUE_W-1:0]  mu_err
);

  localparam int unsigned SQ_W  = 2 * DATA_W;
  localparam int unsigned PWR_W = SQ_W + $clog2(N_TAPS + 1);

  logic [PWR_W-1:0] power;
  logic [SQ_W-1:0]  sq_new, sq_old;

  always_comb begin
    sq_new = SQ_W'(x_new * x_new);
    sq_old = SQ_W'(x_old * x_old);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   power <= '0;
    else if (upd) power <= power + PWR_W'(sq_new) - PWR_W'(sq_old);
  end

  // Leading-one detector and shift-amount clamp.
  logic [SH_W-1:0] lsh;
  int msb;
  int sh;
  always_comb begin
    msb = -1;
    for (int i = 0; i < PWR_W; i++) if (power[i]) msb = i;
    sh = msb - 2 * int'(FRAC) + 1 + int'(MU_MARGIN);
    if (!warm || msb < 0)        sh = MU_SHIFT_MAX;
    else if (sh < MU_SHIFT_MIN) sh = MU_SHIFT_MIN;
    else if (sh > MU_SHIFT_MAX) sh = MU_SHIFT_MAX;
    mu_shift = SH_W'(sh);
    lsh      = SH_W'(MU_SHIFT_MAX - sh);
  end

  // Barrel shifter: mu*e = e * 2^-mu_shift, kept in Q(FRAC + MU_SHIFT_MAX),
  // i.e. e shifted left by MU_SHIFT_MAX - mu_shift (0 .. MAX - MIN places).
  assign mu_err = MUE_W'(err) <<< lsh;

endmodule
