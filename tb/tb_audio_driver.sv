// tb_audio_driver - self-checking testbench of the audio driver (AC-link,
// command machine and clock-domain crossing) with the codec model.
// Checks: the codec is held in reset while n_reset is low; one sample_strobe
// per frame (about 20.8 us apart); left_in/right_in equal the codec's ADC
// words without their LSB; a word written to left_out after each strobe
// reaches the codec's DAC slot in order; the codec registers end with the
// switch settings; codec_ready rises.
module tb_audio_driver;
  logic clk = 0, n_reset = 1;
  logic [4:0] volume = 5'd12;
  logic [2:0] source = 3'd1;
  anc_pkg::sample_t left_in, right_in, left_out = '0, right_out = '0;
  logic sample_strobe, codec_ready;
  logic ac97_bit_clk, ac97_sdata_in, ac97_sdata_out, ac97_sync, ac97_reset_n;
  bit run = 0;   // monitors start once reset has been released
  int checks = 0, failures = 0, nstrobe = 0;
  longint last_t = -1;
  logic [19:0] sent [$];

  audio_driver dut (.*);
  ac97_codec_model codec (.reset_n(ac97_reset_n), .sync(ac97_sync), .sdata_out(ac97_sdata_out),
                          .bit_clk(ac97_bit_clk), .sdata_in(ac97_sdata_in));
  always #5 clk = ~clk;

  initial begin #5_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (run && sample_strobe) begin
    logic [19:0] l, r, o;
    l = codec.adc_q[nstrobe];
    r = 20'(-$signed(l));
    check(left_in == l[19:1], $sformatf("left_in %0d: %h vs %h", nstrobe, left_in, l[19:1]));
    check(right_in == r[19:1], "right_in");
    if (last_t >= 0) check($time - last_t > 20_000 && $time - last_t < 21_600, "strobe spacing");
    last_t = $time;
    o = 20'($urandom) & 20'hFFFFE;
    left_out  <= o[19:1];
    right_out <= ~o[19:1];
    sent.push_back(o);
    nstrobe++;
  end

  initial begin
    #1 n_reset = 0;   // a falling edge, so asynchronous resets act at once
    repeat (50) @(posedge clk);
    check(ac97_reset_n == 0 && ac97_bit_clk == 0, "codec not held in reset");
    n_reset = 1;
    run = 1;
    wait (nstrobe == 40);
    repeat (3000) @(posedge clk);
    // DAC words: the codec gets them in order, one frame after the strobe.
    for (int i = 0; i + 1 < codec.dac_q.size() && i < sent.size(); i++)
      check(codec.dac_q[i + 1] == sent[i], $sformatf("dac %0d", i));
    check(codec.regs[7'h02] == {3'b0, 5'd19, 3'b0, 5'd19}, "master volume");
    check(codec.regs[7'h1A] == 16'h0101, "record select");
    check(codec.early_writes == 0 && codec.sync_errors == 0, "protocol");
    check(codec_ready, "codec_ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
