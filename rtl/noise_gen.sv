// noise_gen - pseudo-random noise generator (random sequence generator).
//
// Produces one white pseudo-random noise sample per strobe for the noise
// addition stage. The state is a maximal-length Fibonacci LFSR with
// polynomial x^32 + x^22 + x^2 + x + 1 (period 2^32 - 1). A plain LFSR that
// moves one step per sample would give strongly correlated successive words,
// which a predictor could learn; so on every strobe the register is advanced
// LFSR_W steps at once (a leap-forward network unrolled in combinational
// logic), and successive noise words share no state bits. The noise word is
// the low DATA_W bits of the register read as a signed number and scaled by
// 2^-AMP_SHIFT, i.e. uniform in [-2^-AMP_SHIFT, 2^-AMP_SHIFT) in Q18.
// A PRNG noise source follows the design; the polynomial, seed, leap-forward
// and amplitude are this design's choices.
//
// Timing: 'noise' changes on the rising edge where 'en' is high.
module noise_gen #(
  parameter int unsigned DATA_W    = anc_pkg::SAMPLE_W,
  parameter int unsigned AMP_SHIFT = 3,
  parameter logic [31:0] SEED      = 32'hACE1_2468
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  output logic signed [DATA_W-1:0] noise
);

  localparam int unsigned LFSR_W = 32;

  logic [LFSR_W-1:0] lfsr, lfsr_nxt;

  // LFSR_W single steps: shift left, feedback from taps 32, 22, 2, 1.
  always_comb begin
    lfsr_nxt = lfsr;
    for (int s = 0; s < LFSR_W; s++)
      lfsr_nxt = {lfsr_nxt[LFSR_W-2:0],
                  lfsr_nxt[31] ^ lfsr_nxt[21] ^ lfsr_nxt[1] ^ lfsr_nxt[0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  lfsr <= SEED;
    else if (en) lfsr <= lfsr_nxt;
  end

  assign noise = $signed(lfsr[DATA_W-1:0]) >>> AMP_SHIFT;

  a_lfsr_alive: assert property (@(posedge clk) disable iff (!rst_n) lfsr != '0);

endmodule
