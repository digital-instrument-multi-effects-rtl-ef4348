// tb_i2s_avalon_st: the interface against a behavioural codec (wm8731_model,
// 64 bit clocks per frame, about 1024 system clocks per sample). The Avalon-ST
// source is looped back into the sink through a gate the testbench controls.
//   1. Every left ADC sample must come out of the source, in order, and come
//      back on both DAC channels, in order; the right ADC channel is discarded.
//   2. The gate is then closed for 150 frames: the input FIFOs fill at 128 and
//      later samples are dropped (overflow), while the empty output FIFOs send
//      silence (underflow). After reopening, the 128 stored samples must come
//      out first, then the stream resumes: one gap of 150 - 128 samples.
// ADC samples are never zero, so a zero DAC word is silence.
module tb_i2s_avalon_st;
  logic clk = 0, reset = 1;
  logic [15:0] avalon_sink_data, avalon_source_data;
  logic avalon_sink_valid, avalon_sink_ready, avalon_source_valid, avalon_source_ready;
  logic AUD_ADCDAT, AUD_ADCLRCK, AUD_BCLK, AUD_DACLRCK, AUD_DACDAT;
  logic signed [15:0] adc_left = 1, adc_right = -1, dac_left, dac_right;
  logic frame_start;
  int dac_frames;
  logic gate = 1;
  int checks = 0, failures = 0;
  logic [15:0] sent[$], outs[$], dacs[$];
  int n_silence = 0;

  i2s_avalon_st dut (.*);
  wm8731_model codec (
    .adc_left, .adc_right, .bclk(AUD_BCLK), .lrclk(AUD_ADCLRCK), .adcdat(AUD_ADCDAT),
    .dacdat(AUD_DACDAT), .frame_start, .dac_left, .dac_right, .dac_frames
  );
  assign AUD_DACLRCK = AUD_ADCLRCK;

  assign avalon_sink_data    = avalon_source_data;
  assign avalon_sink_valid   = avalon_source_valid && gate;
  assign avalon_source_ready = avalon_sink_ready && gate;

  always #10 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // new ADC words each frame (never zero)
  always @(posedge frame_start) begin
    sent.push_back(adc_left);
    #1000;
    adc_left  = 16'($urandom_range(1, 65535));
    adc_right = 16'($urandom_range(1, 65535));
  end

  always @(posedge clk) if (!reset && avalon_source_valid && avalon_source_ready) outs.push_back(avalon_source_data);

  int last_frames = 0;
  always @(dac_frames) begin
    checks++;
    if (dac_left !== dac_right) begin failures++; $display("FAIL DAC channels differ"); end
    if (dac_left == 0) n_silence++; else dacs.push_back(dac_left);
  end

  initial begin
    int j, gaps, gap_len;
    repeat (5) @(posedge clk);
    reset <= 0;
    repeat (40) @(posedge frame_start);
    gate = 0;
    repeat (150) @(posedge frame_start);
    gate = 1;
    repeat (200) @(posedge frame_start);
    repeat (3) @(posedge frame_start);
    // outputs: an in-order subsequence of what was sent, with one gap
    j = 0; gaps = 0; gap_len = 0;
    foreach (outs[i]) begin
      int k;
      k = j;
      while (k < sent.size() && sent[k] !== outs[i]) k++;
      checks++;
      if (k >= sent.size()) begin failures++; $display("FAIL output %0d not in sent order", i); break; end
      if (k != j) begin gaps++; gap_len = k - j; end
      j = k + 1;
    end
    checks += 3;
    if (outs.size() < 300) begin failures++; $display("FAIL only %0d outputs", outs.size()); end
    if (gaps != 1) begin failures++; $display("FAIL %0d gaps", gaps); end
    if (gap_len < 150 - 128 - 2 || gap_len > 150 - 128 + 2) begin failures++; $display("FAIL gap %0d", gap_len); end
    // DAC: the same stream, in order, minus what is still queued (after the
    // burst the output FIFO holds up to 128 words)
    checks++;
    if (dacs.size() + 132 < outs.size()) begin failures++; $display("FAIL DAC got %0d of %0d", dacs.size(), outs.size()); end
    foreach (dacs[i]) begin
      checks++;
      if (dacs[i] !== outs[i]) begin failures++; $display("FAIL DAC word %0d", i); break; end
    end
    checks++;
    if (n_silence < 100) begin failures++; $display("FAIL underflow silence only %0d frames", n_silence); end
    $display("outputs %0d, dac words %0d, silent frames %0d, gap %0d", outs.size(), dacs.size(), n_silence, gap_len);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
