// weight_update - LMS coefficient update: multiplier array plus the weight
// register file.
//
// Holds the N_TAPS filter weights w(i) (Q18, cleared to zero at reset as the
// LMS algorithm starts from w(0) = 0). On every cycle with 'upd' high it
// applies w(i) <= w(i) + mu*e(k)*x(k-i) to all taps at once: one multiplier
// per tap forms mu_err * taps[i], the product is shifted back to Q18 and
// added to the stored weight, and the sum is clamped to the Q18 range.
// mu_err arrives from step_size already scaled by mu, in Q(FRAC + MUE_FRAC).
// 'sat' reports that a clamp acted during an update.
// The parallel update and the weight register follow the design; the clamp
// and truncating rescale are this design's choices.
//
// Timing: weights change on the rising edge with 'upd' high.
module weight_update #(
  parameter int unsigned N_TAPS   = anc_pkg::LMS_TAPS,
  parameter int unsigned DATA_W   = anc_pkg::SAMPLE_W,
  parameter int unsigned FRAC     = anc_pkg::Q_FRAC,
  parameter int unsigned MUE_FRAC = 15,
  parameter int unsigned MUE_W    = DATA_W + MUE_FRAC
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     upd,
  input  logic signed [MUE_W-1:0]  mu_err,
  input  logic signed [DATA_W-1:0] taps [N_TAPS],
  output logic signed [DATA_W-1:0] w    [N_TAPS],
  output logic                     sat
);

  localparam int unsigned PROD_W = MUE_W + DATA_W;

  logic signed [PROD_W-1:0] prod  [N_TAPS];
  logic signed [63:0]       w_nxt [N_TAPS];

  always_comb begin
    sat = 1'b0;
    for (int i = 0; i < N_TAPS; i++) begin
      prod[i]  = mu_err * taps[i];
      w_nxt[i] = 64'(w[i]) + 64'(prod[i] >>> (FRAC + MUE_FRAC));
      if (anc_pkg::clips(w_nxt[i], DATA_W)) sat = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_TAPS; i++) w[i] <= '0;
    end else if (upd) begin
      for (int i = 0; i < N_TAPS; i++)
        w[i] <= DATA_W'(anc_pkg::sat_to(w_nxt[i], DATA_W));
    end
  end

endmodule
