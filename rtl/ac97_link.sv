// ac97_link - AC'97 serial link (AC-link) controller side.
//
// Runs entirely on the codec's 12.288 MHz bit clock. A frame is 256 bit
// periods long (48 kHz frame rate, about 20.8 us): a 16-bit tag slot followed
// by twelve 20-bit slots, most significant bit first. This block
//   - counts bit periods and drives SYNC high for 16 periods, starting one
//     period before the tag slot (periods 255 and 0..14);
//   - builds each outgoing frame: tag (frame valid, slot 1/2 valid when a
//     codec register command is pending, slot 3/4 valid), slot 1 command
//     address (bit 19 = read, bits 18:12 = register index), slot 2 command
//     data (bits 19:4), slot 3/4 left/right DAC sample;
//   - shifts the frame out on SDATA_OUT, changing on the rising edge, and
//     samples SDATA_IN on the falling edge;
//   - after slot 4 of the incoming frame has arrived, latches the left/right
//     ADC samples and the codec-ready tag bit and toggles 'in_toggle', which
//     another clock domain can synchronise to learn that new samples exist.
// The frame layout is the AC'97 standard's; the audio codec link as such is
// the design's, its insides here are this design's choices.
//
// Reset is synchronous: the codec stops the bit clock while it is held in
// reset, so rst_n must stay low for at least one bit-clock edge after the
// clock starts (audio_driver guarantees two). Reset leaves the counter at
// period 254, so the first frame after reset begins cleanly with SYNC in
// period 255.
//
// Timing: 'frame_start' is high during period 254, the last cycle in which
// command and DAC inputs may change before they are loaded for the next
// frame; they are captured at the edge that starts period 255. ADC outputs
// and in_toggle change at the edge that starts period 96 and are then stable
// for a whole frame.
module ac97_link (
  input  logic        bit_clk,
  input  logic        rst_n,
  // codec pins
  input  logic        sdata_in,
  output logic        sdata_out,
  output logic        sync,
  // codec register command
  input  logic [7:0]  cmd_addr,
  input  logic [15:0] cmd_data,
  input  logic        cmd_valid,
  // DAC samples (20-bit, two's complement)
  input  logic [19:0] left_out,
  input  logic [19:0] right_out,
  // ADC samples and status
  output logic [19:0] left_in,
  output logic [19:0] right_in,
  output logic        codec_ready,
  output logic        in_toggle,
  output logic        frame_start
);

  import anc_pkg::*;

  localparam int unsigned IN_BITS = AC97_TAG_BITS + 4 * AC97_SLOT_W;  // slots 0..4

  logic [7:0]               cnt;
  logic [AC97_FRAME_BITS-1:0] out_sr;
  logic [IN_BITS-1:0]       in_sr;
  logic [7:0]               cnt_nxt;
  logic [15:0]              tag;
  logic [AC97_FRAME_BITS-1:0] frame;

  assign cnt_nxt     = cnt + 8'd1;
  assign frame_start = (cnt == 8'd254);

  always_comb begin
    tag = '0;
    tag[15] = 1'b1;          // valid frame
    tag[14] = cmd_valid;     // slot 1 valid
    tag[13] = cmd_valid;     // slot 2 valid
    tag[12] = 1'b1;          // slot 3 valid
    tag[11] = 1'b1;          // slot 4 valid
    frame = {tag, cmd_addr, 12'h000, cmd_data, 4'h0, left_out, right_out,
             {(AC97_FRAME_BITS - IN_BITS){1'b0}}};
  end

  always_ff @(posedge bit_clk) begin
    if (!rst_n) begin
      cnt       <= 8'd254;
      out_sr    <= '0;
      sdata_out <= 1'b0;
      sync      <= 1'b0;
    end else begin
      cnt  <= cnt_nxt;
      sync <= (cnt_nxt == 8'd255) || (cnt_nxt < 8'd15);
      if (frame_start) begin
        out_sr    <= frame;
        sdata_out <= 1'b0;
      end else begin
        sdata_out <= out_sr[AC97_FRAME_BITS-1];
        out_sr    <= out_sr << 1;
      end
    end
  end

  always_ff @(negedge bit_clk) begin
    if (!rst_n) in_sr <= '0;
    else        in_sr <= {in_sr[IN_BITS-2:0], sdata_in};
  end

  always_ff @(posedge bit_clk) begin
    if (!rst_n) begin
      left_in     <= '0;
      right_in    <= '0;
      codec_ready <= 1'b0;
      in_toggle   <= 1'b0;
    end else if (cnt == 8'(IN_BITS - 1)) begin
      codec_ready <= in_sr[IN_BITS-1];
      left_in     <= in_sr[2*AC97_SLOT_W-1:AC97_SLOT_W];
      right_in    <= in_sr[AC97_SLOT_W-1:0];
      in_toggle   <= ~in_toggle;
    end
  end

endmodule
