// fir_mac - multiplier array and adder array of the adaptive FIR filter.
//
// Computes the filter output y = sum_{i=0}^{N_TAPS-1} w(i) * x(k-i) of one
// sample in a single combinational pass: N_TAPS parallel signed multipliers
// (Q18 x Q18 -> Q36 products) feed an adder array of full-precision sums;
// the Q36 total is brought back to Q18 by an arithmetic right shift (rounding
// towards minus infinity) and clamped to the DATA_W-bit range. 'sat' reports
// that the clamp acted.
// The parallel multiplier and adder arrays follow the design; the full
// precision accumulation, truncation and clamping are this design's choices.
//
// Timing: purely combinational; the caller registers y.
module fir_mac #(
  parameter int unsigned N_TAPS = anc_pkg::LMS_TAPS,
  parameter int unsigned DATA_W = anc_pkg::SAMPLE_W,
  parameter int unsigned FRAC   = anc_pkg::Q_FRAC
) (
  input  logic signed [DATA_W-1:0] w    [N_TAPS],
  input  logic signed [DATA_W-1:0] taps [N_TAPS],
  output logic signed [DATA_W-1:0] y,
  output logic                     sat
);

  localparam int unsigned PROD_W = 2 * DATA_W;
  localparam int unsigned ACC_W  = PROD_W + $clog2(N_TAPS + 1);

  logic signed [PROD_W-1:0] prod [N_TAPS];
  logic signed [ACC_W-1:0]  acc;
  logic signed [63:0]       scaled;

  // Multiplier array.
  always_comb begin
    for (int i = 0; i < N_TAPS; i++) prod[i] = w[i] * taps[i];
  end

  // Adder array.
  always_comb begin
    acc = '0;
    for (int i = 0; i < N_TAPS; i++) acc = acc + ACC_W'(prod[i]);
  end

  always_comb begin
    scaled = 64'(acc >>> FRAC);
    y      = DATA_W'(anc_pkg::sat_to(scaled, DATA_W));
    sat    = anc_pkg::clips(scaled, DATA_W);
  end

endmodule
