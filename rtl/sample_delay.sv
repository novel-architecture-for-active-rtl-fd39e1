// sample_delay - one-sample delay (z^-1) that forms the filter's reference.
//
// The reference input of the adaptive filter is the noisy signal delayed by
// one sample, x(k) = d(k-1). This register captures 'd' on every sample
// strobe 'en' and shows the previous sample on 'q' until the next strobe, so
// a consumer that latches q in the same cycle as the strobe gets d(k-1).
// The one-sample delay follows the design; clearing to zero at reset is this
// design's choice.
//
// Timing: q changes on the rising clock edge where en is high.
module sample_delay #(
  parameter int unsigned DATA_W = anc_pkg::SAMPLE_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [DATA_W-1:0] d,
  output logic signed [DATA_W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end

endmodule
