// tb_ac97_link - self-checking testbench of the AC-link controller against
// the behavioural codec model. Each frame the testbench offers a new random
// command and DAC pair (changed in the frame_start cycle); it checks that
// the codec decodes exactly those register writes and DAC words, that the
// link delivers the codec's ADC samples and ready bit, that in_toggle flips
// once per 256 bit clocks, and that SYNC is well formed.
module tb_ac97_link;
  logic bit_clk, rst_n = 1, reset_n = 0, sdata_in, sdata_out, sync;
  logic [7:0] cmd_addr = '0;
  logic [15:0] cmd_data = '0;
  logic cmd_valid = 0;
  logic [19:0] left_out = '0, right_out = '0, left_in, right_in;
  logic codec_ready, in_toggle, frame_start;
  int checks = 0, failures = 0;
  logic [19:0] dac_sent [$];
  logic [15:0] reg_sent [128];
  logic [19:0] adc_got [$];
  int nframes = 0, last_tog = -1, bclk = 0, n_ready = 0;
  logic tog_prev = 0;

  ac97_link dut (.*);
  ac97_codec_model #(.READY_FRAMES(3)) codec (.reset_n, .sync, .sdata_out, .bit_clk, .sdata_in);

  initial begin #2_000_000_0; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // Offer new data in the frame_start cycle; it is loaded at the next edge.
  always @(posedge bit_clk) begin
    bclk++;
    if (frame_start && rst_n) begin
      cmd_valid <= (codec.frames < 50);
      cmd_addr  <= {1'b0, 7'($urandom_range(1, 40)) << 1};
      cmd_data  <= 16'($urandom);
      left_out  <= 20'($urandom);
      right_out <= 20'($urandom);
    end
    if (rst_n && in_toggle != tog_prev) begin
      if (last_tog >= 0) check(bclk - last_tog == 256, "in_toggle period");
      last_tog = bclk;
      adc_got.push_back(left_in);
      if (codec_ready) n_ready++;
    end
    tog_prev = in_toggle;
  end

  // Record what was loaded into each frame (at the frame_start edge).
  always @(posedge bit_clk) if (frame_start && rst_n) begin
    if (cmd_valid) reg_sent[cmd_addr[6:0]] = cmd_data;
    dac_sent.push_back(left_out);
  end

  initial begin
    foreach (reg_sent[i]) reg_sent[i] = '0;
    #1 rst_n = 0;     // a falling edge, so asynchronous resets act at once
    #200 reset_n = 1;
    #300 rst_n = 1;
    wait (codec.frames == 60);
    #100;
    check(codec.sync_errors == 0, "SYNC malformed");
    check(codec.writes > 50, "writes not decoded");
    for (int i = 0; i < 128; i++) check(codec.regs[i] == reg_sent[i], $sformatf("register %h", i));
    for (int i = 0; i < codec.dac_q.size() && i < dac_sent.size(); i++)
      check(codec.dac_q[i] == dac_sent[i], $sformatf("dac %0d", i));
    for (int i = 0; i < adc_got.size(); i++) check(adc_got[i] == codec.adc_q[i], $sformatf("adc %0d", i));
    check(adc_got.size() >= 58, "too few ADC samples");
    check(n_ready > 0 && codec_ready, "codec ready not seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
