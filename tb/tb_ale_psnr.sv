// tb_ale_psnr - PSNR measurement of the line enhancer over 65536-sample blocks.
//
// Runs the adaptive line enhancer at its default size (29 taps, Q18) on a
// generated audio-like signal: two sines of incommensurate period (13.1 and
// 31.7 samples, about 3.7 kHz and 1.5 kHz at 48 kHz) plus
// uniform white noise in [-1/8, 1/8), the same noise level the top level
// adds. PSNR is measured per block of 65536 samples against the clean signal,
// with full scale (1.0) as the peak:
//     PSNR = 10 * log10(1 / mean((s(k) - v(k))^2))
// for v = d (the noisy input) and v = y (the filter output).
// Every sample's y, e and step-size shift is also compared bit for bit with
// the reference model in lms_ref_pkg, and the enable-to-filter_done latency
// is checked. At the end it requires that the filter raises the PSNR of the
// second block by at least 3 dB, and that the second block, after the filter
// has settled, is at least as good as the first.
module tb_ale_psnr;
  import lms_ref_pkg::*;

  localparam int W      = 19;
  localparam int BLOCK  = 65536;
  localparam int BLOCKS = 2;

  logic clk = 0, n_reset = 1, enable = 0;
  logic signed [W-1:0] dk = '0, x_in = '0, y_out, e_out;
  logic filter_done, busy, warm, sat;
  logic signed [4:0] mu_shift;

  int checks = 0, failures = 0;

  ale dut (.*);

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

  // Noise source of the testbench: 32-bit xorshift, independent of the RTL's LFSR.
  logic [31:0] rng = 32'h1234_5678;
  function automatic longint next_noise();
    rng = rng ^ (rng << 13);
    rng = rng ^ (rng >> 17);
    rng = rng ^ (rng << 5);
    return longint'($signed(rng[18:0])) >>> 3;
  endfunction

  function automatic real psnr(input real sq_err_sum);
    real mse;
    mse = sq_err_sum / BLOCK / real'(64'd1 << 36);
    return 10.0 * $log10(1.0 / mse);
  endfunction

  initial begin
    static lms_ref ref_m = new(29);
    static longint clean, noisy, prev = 0;
    static int bad_lat = 0;
    real err_in [BLOCKS], err_out [BLOCKS], p_in [BLOCKS], p_out [BLOCKS];
    int lat;
    #1 n_reset = 0;
    repeat (3) @(posedge clk);
    n_reset = 1;
    @(posedge clk);
    #1;
    for (int b = 0; b < BLOCKS; b++) begin
      err_in[b]  = 0.0;
      err_out[b] = 0.0;
      for (int i = 0; i < BLOCK; i++) begin
        int k;
        k = b * BLOCK + i;
        clean = longint'($rtoi((1 << 18) * (0.35 * $sin(2.0 * 3.14159265 * k / 13.1)
                                          + 0.25 * $sin(2.0 * 3.14159265 * k / 31.7))));
        noisy = clean + next_noise();
        dk     <= W'(noisy);
        x_in   <= W'(prev);
        enable <= 1;
        @(posedge clk);
        enable <= 0;
        ref_m.step(noisy, prev);
        prev = noisy;
        lat = 0;
        @(negedge clk);
        while (!filter_done && lat < 8) begin @(negedge clk); lat++; end
        if (lat != 1) bad_lat++;
        check(y_out == W'(ref_m.y), $sformatf("y %0d vs ref %0d at %0d", y_out, ref_m.y, k));
        check(e_out == W'(ref_m.e), $sformatf("e %0d vs ref %0d at %0d", e_out, ref_m.e, k));
        check(int'(mu_shift) == ref_m.shift,
              $sformatf("shift %0d vs %0d at %0d", mu_shift, ref_m.shift, k));
        err_in[b]  += real'((noisy - clean) ** 2);
        err_out[b] += real'((longint'(y_out) - clean) ** 2);
        @(posedge clk);
        #1;
      end
      p_in[b]  = psnr(err_in[b]);
      p_out[b] = psnr(err_out[b]);
      $display("block %0d: PSNR noisy %.2f dB, filtered %.2f dB, gain %.2f dB",
               b, p_in[b], p_out[b], p_out[b] - p_in[b]);
    end
    check(bad_lat == 0, $sformatf("%0d samples with filter_done not one cycle after accept", bad_lat));
    check(p_out[BLOCKS-1] > p_in[BLOCKS-1] + 3.0, "filter gains less than 3 dB PSNR");
    check(p_out[BLOCKS-1] >= p_out[0] - 0.1, "PSNR falls after the first block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
