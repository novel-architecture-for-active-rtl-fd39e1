// selector - output multiplexer in front of the DAC.
//
// Chooses which signal is sent to the codec for playback: the de-noised
// filter output y(k) when 'sel' is 0, or the noisy signal d(k) when 'sel' is
// 1, so the effect of the canceller can be heard by flipping one switch.
// The chosen word is registered on the 'load' strobe, which the top drives
// with the filter's completion pulse.
// An output selector follows the design; what its two inputs are and the
// registered output are this design's choices.
//
// Timing: 'out' changes on the rising edge where 'load' is high.
module selector #(
  parameter int unsigned DATA_W = anc_pkg::SAMPLE_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic                     sel,
  input  logic signed [DATA_W-1:0] filtered,
  input  logic signed [DATA_W-1:0] noisy,
  output logic signed [DATA_W-1:0] out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    out <= '0;
    else if (load) out <= sel ? noisy : filtered;
  end

endmodule
