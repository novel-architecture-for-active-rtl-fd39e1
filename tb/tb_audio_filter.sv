// tb_audio_filter - end-to-end testbench of the noise cancellation system at
// its default parameters.
//
// An AC'97 codec model supplies a 0.9 full-scale sine (period 24 frames) on
// the left ADC channel. The testbench keeps its own model of everything
// after the ADC - the leap-forward LFSR noise, the clamped noise addition,
// the one-sample delay, the LMS filter (lms_ref_pkg) and the output
// selector - and checks per sample: the noise word, the noisy sample d(k),
// the filter output y(k) and the word sent to the DAC. It also checks that
// the ADC samples the system receives are the ones the codec sent, that the
// DAC words the codec receives are the system's outputs in order, that the
// codec registers end with the values set by the switches (after a volume
// change during the run), that no command went out before the codec was
// ready, that SYNC is well formed, that the per-sample processing latency
// is 23 cycles from strobe to filter_done (serial addition 20, filter 3), and that the filter
// converges (output error to the clean sine well below the added noise).
// Mechanisms that must occur at least once: step size held during warm-up,
// clamp in the noise addition, both selector positions, the volume change
// reaching the codec, commands waiting for codec ready, command list
// wrapping around.
module tb_audio_filter;
  import lms_ref_pkg::*;

  localparam int NSAMP    = 1500;
  localparam int SEL_FROM = 800;
  localparam int SEL_TO   = 900;
  localparam int VOL_AT   = 600;

  logic       clk = 0, n_reset = 1, sel = 0;
  logic [2:0] source = 3'd4;
  logic [4:0] volume = 5'd20;
  logic       ac97_bit_clk, ac97_sdata_in, ac97_sdata_out, ac97_sync, ac97_reset_n;
  logic       codec_ready, filter_warm, clip;

  bit run = 0;   // monitors start once reset has been released
  int checks = 0, failures = 0;

  audio_filter dut (.*);

  ac97_codec_model codec (
    .reset_n(ac97_reset_n), .sync(ac97_sync), .sdata_out(ac97_sdata_out),
    .bit_clk(ac97_bit_clk), .sdata_in(ac97_sdata_in)
  );

  always #5 clk = ~clk;   // 100 MHz system clock

  initial begin
    #((NSAMP + 20) * 21_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---- reference of the datapath after the ADC ----
  lms_ref         ref_m = new(29);
  logic [31:0]    lfsr  = 32'hACE1_2468;
  longint         d_prev = 0, d_ref = 0, noise_ref = 0, s_cur = 0;
  logic [18:0]    exp_out;
  logic [18:0]    out_seq [$];
  logic [18:0]    in_seq  [$];
  int             nsamp = 0, since_strobe = -1, pending_out = 0;
  int             cnt_warm = 0, cnt_ovf = 0, cnt_sel [2] = '{0, 0};
  real            err_first = 0, err_last = 0, noise_last = 0;

  function automatic logic [31:0] lfsr_leap(logic [31:0] v);
    for (int i = 0; i < 32; i++) v = {v[30:0], v[31] ^ v[21] ^ v[1] ^ v[0]};
    return v;
  endfunction

  always @(negedge clk) if (run) begin
    if (since_strobe >= 0) since_strobe++;
    if (dut.strobe) begin
      s_cur     = longint'(dut.left_in);
      noise_ref = longint'($signed(lfsr[18:0])) >>> 3;
      check(dut.noise == 19'(noise_ref), $sformatf("noise %0d vs %0d", dut.noise, noise_ref));
      lfsr      = lfsr_leap(lfsr);
      d_ref     = clamp_w(s_cur + noise_ref, 19);
      if (d_ref != s_cur + noise_ref) cnt_ovf++;
      ref_m.step(d_ref, d_prev);
      d_prev    = d_ref;
      in_seq.push_back(dut.left_in);
      since_strobe = 0;
      nsamp++;
    end
    if (dut.filter_done) begin
      check(since_strobe == 23, $sformatf("latency %0d", since_strobe));
      check(dut.noisy == 19'(d_ref), $sformatf("d %0d vs %0d", dut.noisy, d_ref));
      check(dut.y == 19'(ref_m.y), $sformatf("y %0d vs %0d at %0d", dut.y, ref_m.y, nsamp));
      if (!dut.filter_warm) begin
        cnt_warm++;
        check(dut.mu_shift == 5'sd15, "mu not held at its smallest value during warm-up");
      end
      exp_out     = sel ? 19'(d_ref) : 19'(ref_m.y);
      cnt_sel[sel]++;
      pending_out = 1;
      if (nsamp <= 300) err_first += real'((ref_m.y - s_cur) ** 2);
      if (nsamp > NSAMP - 300) begin
        err_last   += real'((ref_m.y - s_cur) ** 2);
        noise_last += real'((d_ref - s_cur) ** 2);
      end
    end else if (pending_out) begin
      check(dut.out_word == exp_out, $sformatf("out %0d vs %0d", dut.out_word, exp_out));
      out_seq.push_back(exp_out);
      pending_out = 0;
    end
  end

  // Find the lag of b against a (b[i + lag] == a[i]) and check every pair.
  task automatic check_stream(input logic [19:0] a [$], input logic [19:0] b [$],
                              input string what);
    int lag = -1;
    for (int l = 0; l < 8 && lag < 0; l++) begin
      bit ok = 1;
      for (int i = 0; i < 20; i++) if (b[i + l] != a[i]) ok = 0;
      if (ok) lag = l;
    end
    check(lag >= 0, {what, ": no alignment found"});
    if (lag >= 0) begin
      for (int i = 0; i + lag < b.size() && i < a.size(); i++)
        check(b[i + lag] == a[i], $sformatf("%s word %0d", what, i));
      $display("%s: lag %0d frames, %0d words compared", what, lag,
               (a.size() < b.size() - lag) ? a.size() : b.size() - lag);
    end
  endtask

  initial begin
    logic [19:0] want_in [$], got_in [$], want_dac [$];
    logic [4:0]  att;
    #1 n_reset = 0;   // a falling edge, so asynchronous resets act at once
    repeat (20) @(posedge clk);
    n_reset = 1;
    run = 1;
    // Switch actions at sample boundaries.
    wait (nsamp == VOL_AT);
    volume = 5'd27;
    wait (nsamp == SEL_FROM);
    sel = 1;
    wait (nsamp == SEL_TO);
    sel = 0;
    wait (nsamp == NSAMP);
    repeat (3000) @(posedge clk);

    // ADC path: what the system received equals what the codec sent (>> 1).
    foreach (codec.adc_q[i]) want_in.push_back({1'b0, codec.adc_q[i][19:1]});
    foreach (in_seq[i])      got_in.push_back({1'b0, in_seq[i]});
    check_stream(got_in, want_in, "ADC path");
    // DAC path: the codec received the system's output words in order.
    foreach (out_seq[i]) want_dac.push_back({out_seq[i], 1'b0});
    check_stream(want_dac, codec.dac_q, "DAC path");

    // Codec configuration.
    att = 5'd31 - volume;
    check(codec.regs[7'h02] == {3'b0, att, 3'b0, att}, "master volume register");
    check(codec.regs[7'h04] == {3'b0, att, 3'b0, att}, "headphone volume register");
    check(codec.regs[7'h18] == 16'h0808, "PCM out volume register");
    check(codec.regs[7'h1A] == {5'b0, source, 5'b0, source}, "record select register");
    check(codec.regs[7'h1C] == 16'h0000, "record gain register");
    check(codec.early_writes == 0, "command sent before codec ready");
    check(codec.sync_errors == 0, "SYNC malformed");
    check(codec_ready, "codec_ready status not set");

    $display("samples %0d, mse of y vs clean: first %g last %g, noise %g",
             nsamp, err_first / 300, err_last / 300, noise_last / 300);
    check(err_last < 0.5 * noise_last, "filtered output not much cleaner than the noisy input");
    check(err_last < err_first, "no convergence");

    // Mechanisms.
    $display("warm-up samples %0d, clamps %0d, sel0 %0d, sel1 %0d, writes %0d, first write in frame %0d",
             cnt_warm, cnt_ovf, cnt_sel[0], cnt_sel[1], codec.writes, codec.first_write_frame);
    check(cnt_warm > 0, "warm-up never seen");
    check(cnt_ovf > 0, "noise-addition clamp never seen");
    check(cnt_sel[0] > 0 && cnt_sel[1] > 0, "selector not exercised both ways");
    check(codec.first_write_frame > 4, "commands did not wait for codec ready");
    check(codec.writes > 5, "command list did not wrap");
    check(att == 5'd4, "volume change not exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
