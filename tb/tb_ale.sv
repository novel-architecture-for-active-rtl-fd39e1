// tb_ale - self-checking testbench of the adaptive line enhancer.
//
// Feeds a noisy sine (sine plus uniform pseudo-random noise) as d(k) and the
// same signal delayed by one sample as x(k), compares y(k), e(k) and the
// step-size shift of every sample with lms_ref_pkg, checks the documented
// latency (filter_done two cycles after the enable strobe), that mu stays at
// its smallest value until the delay line is full, and that the filter
// converges: the mean-square error between y and the clean sine over the
// last quarter is well below the noise power and below that of the first
// quarter.
module tb_ale;
  import lms_ref_pkg::*;

  localparam int N = 29;
  localparam int W = 19;
  localparam int NSAMP = 3000;

  logic clk = 0, n_reset = 0, enable = 0;
  logic signed [W-1:0] dk = '0, x_in = '0, y_out, e_out;
  logic filter_done, busy, warm, sat;
  logic signed [4:0] mu_shift;

  int checks = 0, failures = 0;

  ale #(.N_TAPS(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    static lms_ref ref_m = new(N);
    static longint clean, noisy, prev = 0;
    static real err_first = 0, err_last = 0, noise_pow = 0;
    int lat;
    repeat (3) @(posedge clk);
    n_reset = 1;
    @(posedge clk);
    #1;
    for (int k = 0; k < NSAMP; k++) begin
      clean = longint'($rtoi(0.5 * (1 << 18) * $sin(2.0 * 3.14159265 * k / 24.0)));
      noisy = clean + longint'($signed(32'($urandom_range(0, 65535)))) - 32768;
      noise_pow += real'((noisy - clean) * (noisy - clean));
      dk     <= W'(noisy);
      x_in   <= W'(prev);
      enable <= 1;
      @(posedge clk);
      enable <= 0;
      ref_m.step(noisy, prev);
      prev = noisy;
      lat = 0;
      @(negedge clk);
      while (!filter_done) begin @(negedge clk); lat++; end
      check(lat == 1, $sformatf("latency %0d at sample %0d", lat, k));
      check(y_out == W'(ref_m.y), $sformatf("y %0d vs ref %0d at %0d", y_out, ref_m.y, k));
      check(e_out == W'(ref_m.e), $sformatf("e %0d vs ref %0d at %0d", e_out, ref_m.e, k));
      check(int'(mu_shift) == ref_m.shift, $sformatf("shift %0d vs %0d at %0d", mu_shift, ref_m.shift, k));
      if (k < N - 1) check(mu_shift == 15 && !warm, "mu not held small during warm-up");
      if (k < NSAMP / 4) err_first += real'((ref_m.y - clean) ** 2);
      if (k >= 3 * NSAMP / 4) err_last += real'((longint'(y_out) - clean) ** 2);
      @(posedge clk);
      #1;
    end
    $display("mse first %g last %g noise %g", err_first / (NSAMP / 4),
             err_last / (NSAMP / 4), noise_pow / NSAMP);
    check(err_last < 0.5 * err_first, "no convergence");
    check(err_last / (NSAMP / 4) < 0.5 * noise_pow / NSAMP, "output not cleaner than input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
