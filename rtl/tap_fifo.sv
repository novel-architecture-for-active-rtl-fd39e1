// tap_fifo - delay line (FIFO register) that feeds the adaptive FIR filter.
//
// Holds the last N_TAPS reference samples x(k), x(k-1), ... x(k-N_TAPS+1) as
// in a transversal FIR filter. On every cycle with shift_en high the new
// sample enters at taps[0], every older sample moves one place along and the
// sample in taps[N_TAPS-1] leaves; that leaving sample is shown on
// dout_oldest during the shift cycle so that a running power sum can remove
// it. 'full' rises once N_TAPS samples have entered since reset.
// The delay line itself follows the transversal structure of the design;
// clearing it to zero at reset and the 'full' flag are this design's choices.
//
// Timing: taps and full change on the rising clock edge where shift_en is
// high; dout_oldest is combinational.
module tap_fifo #(
  parameter int unsigned N_TAPS = anc_pkg::LMS_TAPS,
  parameter int unsigned DATA_W = anc_pkg::SAMPLE_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     shift_en,
  input  logic signed [DATA_W-1:0] din,
  output logic signed [DATA_W-1:0] taps [N_TAPS],
  output logic signed [DATA_W-1:0] dout_oldest,
  output logic                     full
);

  localparam int unsigned CNT_W = $clog2(N_TAPS + 1);

  logic [CNT_W-1:0] fill_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_TAPS; i++) taps[i] <= '0;
      fill_cnt <= '0;
    end else if (shift_en) begin
      taps[0] <= din;
      for (int i = 1; i < N_TAPS; i++) taps[i] <= taps[i-1];
      if (fill_cnt != CNT_W'(N_TAPS)) fill_cnt <= fill_cnt + 1'b1;
    end
  end

  assign dout_oldest = taps[N_TAPS-1];
  assign full        = (fill_cnt == CNT_W'(N_TAPS));

endmodule
