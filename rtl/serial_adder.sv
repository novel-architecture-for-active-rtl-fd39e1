// serial_adder - bit-serial saturating adder used for noise addition.
//
// Adds the noise word to the audio sample, d = S + N, one bit per clock:
// a single full adder and a carry flip-flop walk the two DATA_W-bit operands
// from the least significant bit upwards while the sum bits are shifted into
// a result register. After the last (sign) bit the signed overflow condition
// (operands of equal sign, sum of the other sign) replaces the sum by the
// largest or smallest DATA_W-bit value, and 'done' pulses. 'ovf' stays high
// with the result when the clamp acted.
// The serial adder for noise addition follows the design; the bit order,
// handshake and saturation are this design's choices.
//
// Interface and timing: 'start' (one cycle, while idle) loads a and b; the
// sum is valid with 'done' high DATA_W + 1 cycles after the start edge, and
// stays on 'sum' until the next start.
module serial_adder #(
  parameter int unsigned DATA_W = anc_pkg::SAMPLE_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic signed [DATA_W-1:0] a,
  input  logic signed [DATA_W-1:0] b,
  output logic signed [DATA_W-1:0] sum,
  output logic                     ovf,
  output logic                     done,
  output logic                     busy
);

  localparam int unsigned CNT_W = $clog2(DATA_W + 1);

  logic [DATA_W-1:0] sa, sb, acc;
  logic              carry, sign_a, sign_b;
  logic [CNT_W-1:0]  cnt;
  logic              fa_s, fa_c;

  // The single full adder.
  assign fa_s = sa[0] ^ sb[0] ^ carry;
  assign fa_c = (sa[0] & sb[0]) | (sa[0] & carry) | (sb[0] & carry);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sa <= '0; sb <= '0; acc <= '0; carry <= 1'b0; cnt <= '0;
      sign_a <= 1'b0; sign_b <= 1'b0;
      busy <= 1'b0; done <= 1'b0; sum <= '0; ovf <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          sa <= a; sb <= b; carry <= 1'b0; cnt <= '0;
          sign_a <= a[DATA_W-1]; sign_b <= b[DATA_W-1];
          busy <= 1'b1;
        end
      end else if (cnt != CNT_W'(DATA_W)) begin
        acc   <= {fa_s, acc[DATA_W-1:1]};
        sa    <= sa >> 1;
        sb    <= sb >> 1;
        carry <= fa_c;
        cnt   <= cnt + 1'b1;
      end else begin
        busy <= 1'b0;
        done <= 1'b1;
        if (sign_a == sign_b && acc[DATA_W-1] != sign_a) begin
          ovf <= 1'b1;
          sum <= sign_a ? {1'b1, {(DATA_W-1){1'b0}}} : {1'b0, {(DATA_W-1){1'b1}}};
        end else begin
          ovf <= 1'b0;
          sum <= acc;
        end
      end
    end
  end

endmodule
