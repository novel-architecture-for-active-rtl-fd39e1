// tb_noise_gen - self-checking testbench of the pseudo-random noise source.
// Compares every noise word with a software LFSR (x^32+x^22+x^2+x+1, 32
// steps per strobe, low 19 bits >> 3), checks that the word only changes on
// a strobe, and checks the statistics that make the noise usable: mean near
// zero, words within +-2^15, and near-zero correlation of successive words.
module tb_noise_gen;
  localparam int W = 19;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [W-1:0] noise;
  logic [31:0] lfsr = 32'hACE1_2468;
  int checks = 0, failures = 0;
  real sum = 0, sum2 = 0, sumxy = 0;
  longint prev = 0, cur;
  int n = 0;

  noise_gen #(.DATA_W(W), .AMP_SHIFT(3)) dut (.*);
  always #5 clk = ~clk;

  initial begin #1_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      cur = longint'($signed(lfsr[18:0])) >>> 3;
      check(noise == W'(cur), $sformatf("word %0d: %0d vs %0d", k, noise, cur));
      check(cur >= -32768 && cur < 32768, "amplitude");
      if (k == 0 || en) begin
        sum += real'(cur); sum2 += real'(cur * cur); sumxy += real'(cur * prev);
        n++;
      end
      prev = cur;
      en = (k % 3 != 2);
      @(posedge clk); #1;
      if (en) for (int s = 0; s < 32; s++) lfsr = {lfsr[30:0], lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0]};
    end
    $display("mean %g, lag-1 correlation %g", sum / n, sumxy / sum2);
    check(sum / n < 1000 && sum / n > -1000, "mean not near zero");
    check(sumxy / sum2 < 0.1 && sumxy / sum2 > -0.1, "successive words correlated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
