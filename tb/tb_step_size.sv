// tb_step_size - self-checking testbench of the power-normalised step size.
// Streams random samples of changing amplitude through a software delay line,
// keeps the exact power sum, and checks mu_shift (leading-one rule with
// clamps, held at the maximum while 'warm' is low) and mu_err =
// e * 2^(15 - mu_shift) for random errors, over the whole shift range -8..15
// (mu from 2^8 down to 2^-15). Also checks that mu * power stays below 1/4
// whenever the shift is not clamped at its minimum (MU_MARGIN = 2).
module tb_step_size;
  localparam int N = 29, W = 19;
  logic clk = 0, rst_n = 0, upd = 0, warm = 0;
  logic signed [W-1:0] x_new = '0, x_old = '0, err = '0;
  logic signed [4:0] mu_shift;
  logic signed [W+15+8-1:0] mu_err;
  int checks = 0, failures = 0, n_min = 0, n_max = 0, n_mid = 0;
  longint line [N];
  longint pwr = 0;

  step_size #(.N_TAPS(N), .DATA_W(W), .FRAC(18)) dut (.*);
  always #5 clk = ~clk;

  initial begin #1_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    foreach (line[i]) line[i] = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int k = 0; k < 1500; k++) begin
      int amp_bits;
      longint xv;
      int exp_sh, msb;
      amp_bits = 4 + (k / 100) % 15;       // amplitude sweeps 2^5 .. 2^19 LSB
      xv = longint'($signed(32'($urandom))) >>> (31 - amp_bits);
      x_new = W'(xv);
      x_old = W'(line[N-1]);
      upd = 1;
      @(posedge clk); #1;
      upd = 0;
      pwr += xv * xv - line[N-1] * line[N-1];
      for (int i = N - 1; i > 0; i--) line[i] = line[i-1];
      line[0] = xv;
      warm = (k >= N - 1);
      err  = W'($urandom);
      #1;
      msb = -1;
      for (int b = 0; b < 62; b++) if (pwr[b]) msb = b;
      exp_sh = msb - 36 + 1 + 2;
      if (!warm || msb < 0) exp_sh = 15;
      else if (exp_sh < -8) exp_sh = -8;
      else if (exp_sh > 15) exp_sh = 15;
      check(int'(mu_shift) == exp_sh, $sformatf("shift %0d expected %0d (k %0d)", mu_shift, exp_sh, k));
      check(longint'(mu_err) == (longint'(err) <<< (15 - exp_sh)), "mu_err");
      if (warm && exp_sh > -8 && exp_sh < 15)
        check(real'(pwr) / (2.0 ** 36) * (2.0 ** -exp_sh) < 0.25, "mu * ||x||^2 not below 1/4");
      if (exp_sh == -8) n_min++; else if (exp_sh == 15) n_max++; else n_mid++;
    end
    check(n_min > 0 && n_max > 0 && n_mid > 0, "shift range not covered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
