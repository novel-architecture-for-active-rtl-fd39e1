// ac97_cmd - command state machine that configures the AC'97 codec.
//
// Once the codec reports ready, it sends one register write per AC-link
// frame and cycles through the list below forever, so that moving the
// volume or source switches takes effect within a few frames:
//   CMD_MASTER  reg 0x02 master volume     attenuation 31 - volume, both sides
//   CMD_HPHONE  reg 0x04 headphone volume  same value
//   CMD_PCM     reg 0x18 PCM-out volume    0x0808 (0 dB, unmuted)
//   CMD_RECSEL  reg 0x1A record select     'source' for left and right
//   CMD_RECGAIN reg 0x1C record gain       0x0000 (0 dB, unmuted)
// 'volume' is 0 (quietest) to 31 (loudest). 'source' uses the AC'97 record
// select code (0 mic, 1 CD, 2 video, 3 aux, 4 line in, ...).
// Configuring the codec from a state machine with a 3-bit source select and
// a 5-bit volume control follows the design; the register list and order
// are this design's choices, taken from the AC'97 register map.
//
// Timing: runs on the bit clock, with a synchronous reset (the bit clock
// only runs once the codec is out of reset); moves to the next command at each
// 'frame_start' pulse from ac97_link, which loads the current command into
// the frame being built at that same edge.
module ac97_cmd (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_start,
  input  logic        codec_ready,
  input  logic [4:0]  volume,
  input  logic [2:0]  source,
  output logic [7:0]  cmd_addr,
  output logic [15:0] cmd_data,
  output logic        cmd_valid
);

  typedef enum logic [2:0] {
    CMD_MASTER, CMD_HPHONE, CMD_PCM, CMD_RECSEL, CMD_RECGAIN
  } cmd_t;

  cmd_t       cmd;
  logic [4:0] att;

  assign att = 5'd31 - volume;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cmd       <= CMD_MASTER;
      cmd_valid <= 1'b0;
    end else if (frame_start) begin
      cmd_valid <= codec_ready;
      if (cmd_valid) cmd <= (cmd == CMD_RECGAIN) ? CMD_MASTER : cmd_t'(cmd + 3'd1);
    end
  end

  always_comb begin
    unique case (cmd)
      CMD_MASTER:  begin cmd_addr = 8'h02; cmd_data = {3'b000, att, 3'b000, att};        end
      CMD_HPHONE:  begin cmd_addr = 8'h04; cmd_data = {3'b000, att, 3'b000, att};        end
      CMD_PCM:     begin cmd_addr = 8'h18; cmd_data = 16'h0808;                          end
      CMD_RECSEL:  begin cmd_addr = 8'h1A; cmd_data = {5'b00000, source, 5'b00000, source}; end
      CMD_RECGAIN: begin cmd_addr = 8'h1C; cmd_data = 16'h0000;                          end
      default:     begin cmd_addr = 8'h02; cmd_data = {3'b000, att, 3'b000, att};        end
    endcase
  end

endmodule
