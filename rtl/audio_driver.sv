// audio_driver - input and output audio driver around the AC'97 codec.
//
// Joins the system clock domain of the filter to the codec. Inside:
//   - ac97_link and ac97_cmd, clocked by the codec's bit clock;
//   - the codec reset: ac97_reset_n is the registered system reset, so the
//     codec is held in reset (and its bit clock stopped) while n_reset is low;
//   - a reset synchroniser for the bit-clock domain (asserted at once,
//     released two bit-clock edges after n_reset rises). The link and the
//     command machine use it as a synchronous reset, because the codec
//     stops the bit clock while it is in reset;
//   - a two-flop synchroniser plus edge detector on the link's in_toggle,
//     and one on its codec_ready flag, in the system domain.
// When the synchronised toggle changes, the driver copies the ADC samples
// (stable for a whole frame on the link side) into system-domain registers
// and pulses 'sample_strobe' with them, once per 48 kHz frame. Samples are
// converted between the codec's 20-bit words and the 19-bit Q18 words of the
// filter by dropping / appending the least significant bit.
// Playback words left_out/right_out are read by the link at the start of
// the next frame (about 13 us after the strobe); the consumer must update
// them within that window and hold them otherwise, which makes that crossing
// safe without a handshake.
// Driving the codec through an input and output driver with a command state
// machine follows the design; the clock-domain crossing is this design's.
module audio_driver (
  input  logic                  clk,
  input  logic                  n_reset,
  input  logic [4:0]            volume,
  input  logic [2:0]            source,
  // system-domain samples
  output anc_pkg::sample_t      left_in,
  output anc_pkg::sample_t      right_in,
  output logic                  sample_strobe,
  output logic                  codec_ready,
  input  anc_pkg::sample_t      left_out,
  input  anc_pkg::sample_t      right_out,
  // codec pins
  input  logic                  ac97_bit_clk,
  input  logic                  ac97_sdata_in,
  output logic                  ac97_sdata_out,
  output logic                  ac97_sync,
  output logic                  ac97_reset_n
);

  // Codec reset, from the system domain.
  always_ff @(posedge clk or negedge n_reset) begin
    if (!n_reset) ac97_reset_n <= 1'b0;
    else          ac97_reset_n <= 1'b1;
  end

  // Reset for the bit-clock domain.
  logic [1:0] brst_sync;
  logic       brst_n;
  always_ff @(posedge ac97_bit_clk or negedge n_reset) begin
    if (!n_reset) brst_sync <= 2'b00;
    else          brst_sync <= {brst_sync[0], 1'b1};
  end
  assign brst_n = brst_sync[1];

  logic [7:0]  cmd_addr;
  logic [15:0] cmd_data;
  logic        cmd_valid, frame_start, in_toggle, ready_b;
  logic [19:0] l_in20, r_in20;

  ac97_link u_link (
    .bit_clk(ac97_bit_clk), .rst_n(brst_n),
    .sdata_in(ac97_sdata_in), .sdata_out(ac97_sdata_out), .sync(ac97_sync),
    .cmd_addr, .cmd_data, .cmd_valid,
    .left_out({left_out, 1'b0}), .right_out({right_out, 1'b0}),
    .left_in(l_in20), .right_in(r_in20), .codec_ready(ready_b),
    .in_toggle, .frame_start
  );

  ac97_cmd u_cmd (
    .clk(ac97_bit_clk), .rst_n(brst_n), .frame_start, .codec_ready(ready_b),
    .volume, .source, .cmd_addr, .cmd_data, .cmd_valid
  );

  // Synchronisers into the system domain. Until the bit-clock domain has
  // left reset (alive_sync), the toggle is only followed, never reported,
  // so whatever the link held before its reset cannot make a strobe.
  logic [2:0] tog_sync;
  logic [1:0] rdy_sync, alive_sync;
  logic       tog_edge;
  assign tog_edge = alive_sync[1] && (tog_sync[2] ^ tog_sync[1]);

  always_ff @(posedge clk or negedge n_reset) begin
    if (!n_reset) begin
      tog_sync      <= '0;
      rdy_sync      <= '0;
      alive_sync    <= '0;
      sample_strobe <= 1'b0;
      left_in       <= '0;
      right_in      <= '0;
    end else begin
      alive_sync    <= {alive_sync[0], brst_n};
      tog_sync      <= {tog_sync[1:0], in_toggle};
      rdy_sync      <= {rdy_sync[0], ready_b && brst_n};
      sample_strobe <= tog_edge;
      if (tog_edge) begin
        left_in  <= anc_pkg::sample_t'(l_in20[19:1]);
        right_in <= anc_pkg::sample_t'(r_in20[19:1]);
      end
    end
  end

  assign codec_ready = rdy_sync[1];

endmodule
