// ac97_codec_model - behavioural model of the AC-link side of an AC'97 audio
// codec, for simulation only (not synthesizable).
//
// Generates the bit clock (12.288 MHz by default) while reset_n is high,
// follows the controller's SYNC to find frame boundaries, sends one frame of
// 256 bits per SYNC: tag (bit 15 'codec ready' after READY_FRAMES frames,
// slot 3/4 valid) and left/right ADC samples of a sine wave of amplitude AMP
// (full scale = 1) and period SINE_PERIOD frames, the right channel in
// opposite phase. It drives SDATA_IN on the rising edge and samples
// SDATA_OUT on the falling edge, decodes register writes (slot 1/2) into
// 'regs' and collects DAC samples (slot 3) in 'dac_q'. ADC samples sent are
// kept in 'adc_q'. Protocol errors (SYNC not 16 periods long) are counted in
// 'sync_errors'; writes decoded before the model reported ready are counted
// in 'early_writes'.
module ac97_codec_model #(
  parameter int  BIT_HALF     = 41,   // ns, ~12.2 MHz
  parameter int  READY_FRAMES = 4,
  parameter real AMP          = 0.9,
  parameter int  SINE_PERIOD  = 24
) (
  input  logic reset_n,
  input  logic sync,
  input  logic sdata_out,
  output logic bit_clk,
  output logic sdata_in
);

  logic [15:0]  regs [128];
  int           frames = 0, writes = 0, early_writes = 0, sync_errors = 0;
  int           first_write_frame = -1;
  logic [19:0]  adc_q [$];
  logic [19:0]  dac_q [$];
  bit           ready_sent = 0;

  int           pos = -1;
  bit           start_next = 0;
  logic         sync_prev = 0;
  logic [255:0] in_frame, out_frame;
  int           adc_n = 0;

  initial begin
    for (int i = 0; i < 128; i++) regs[i] = '0;
    bit_clk  = 0;
    sdata_in = 0;
    forever begin
      #(BIT_HALF);
      bit_clk = reset_n ? ~bit_clk : 1'b0;
    end
  end

  function automatic logic [19:0] sine20(int n, real a);
    return 20'($rtoi(a * 524288.0 * $sin(2.0 * 3.14159265358979 * n / SINE_PERIOD)));
  endfunction

  always @(posedge bit_clk) if (reset_n && $time > 0) begin
    if (start_next) begin
      logic [15:0] tag;
      logic [19:0] l, r;
      start_next = 0;
      pos = 0;
      tag = 16'h1800;                 // slot 3 and 4 valid
      tag[15] = (frames >= READY_FRAMES);
      if (tag[15]) ready_sent = 1;
      l = sine20(adc_n, AMP);
      r = sine20(adc_n, -AMP);
      adc_n++;
      adc_q.push_back(l);
      in_frame = {tag, 20'h0, 20'h0, l, r, 160'h0};
    end else if (pos >= 0 && pos < 255) begin
      pos++;
    end else begin
      pos = -1;
    end
    sdata_in <= (pos >= 0) ? in_frame[255 - pos] : 1'b0;
  end

  // Edges while the codec is in reset, or the settling of the power-up state
  // at time 0, do not count as link activity.
  always @(negedge bit_clk) if (!reset_n || $time == 0) begin
    pos        = -1;
    start_next = 0;
    sync_prev  = 0;
  end else begin
    if (pos >= 0) begin
      out_frame[255 - pos] = sdata_out;
      if (pos <= 14 && !sync) sync_errors++;
      if (pos >= 15 && pos <= 254 && sync) sync_errors++;
      if (pos == 255) decode();
    end
    if (sync && !sync_prev) start_next = 1;
    sync_prev = sync;
  end

  task automatic decode();
    logic [15:0] tag;
    logic [19:0] s1, s2, s3;
    tag = out_frame[255:240];
    s1  = out_frame[239:220];
    s2  = out_frame[219:200];
    s3  = out_frame[199:180];
    frames++;
    if (tag[15]) begin
      if (tag[14] && tag[13] && !s1[19]) begin
        regs[s1[18:12]] = s2[19:4];
        writes++;
        if (!ready_sent) early_writes++;
        if (first_write_frame < 0) first_write_frame = frames;
      end
      if (tag[12]) dac_q.push_back(s3);
    end
  endtask

endmodule
