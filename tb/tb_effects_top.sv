// tb_effects_top: the whole unit at its default sizes (500-tap FIR, 8192-word
// delay, 128-word FIFOs) with a behavioural codec and a processor bus driven by
// the testbench. Random guitar-level samples go in on the ADC pin; every
// sample leaving the delay block is compared with a bit-exact reference model
// of the chain (FIR -> 4 biquads -> clip + low-pass -> echo) fed with the same
// samples, and the DAC pin must then play exactly that stream, the same word
// on the left and right channel of every frame.
// The run goes through these settings, each for tens of frames:
//   FIR loaded with 500 random taps (written during reset, read back later)
//   delay length 40, mix 30000        biquads switched in with an EQ setting
//   limiter opened to +-8000 then soft clip on with a low-pass
//   delay bypassed, then on with negative mix      biquads bypassed again
// Settings change only between samples (right after a sample leaves), so the
// model knows which setting each sample saw. Counted mechanisms (each must
// happen): output FIFO empty (silence), clipping
// high and low, soft clip, biquad on and bypassed, echo, delay bypass,
// coefficient read-back, a VGA frame with a knob drawn where it was moved.
module tb_effects_top;
  localparam int TAPS = 500, DEPTH = 8192;
  logic clk = 0, reset = 1;
  logic [13:0] hps_address = 0;
  logic hps_write = 0, hps_read = 0;
  logic [15:0] hps_writedata = 0, hps_readdata;
  logic hps_readdatavalid;
  logic AUD_ADCDAT, AUD_ADCLRCK, AUD_BCLK, AUD_DACLRCK, AUD_DACDAT;
  logic [7:0] VGA_R, VGA_G, VGA_B;
  logic VGA_CLK, VGA_HS, VGA_VS, VGA_BLANK_n, VGA_SYNC_n;
  logic signed [15:0] adc_left = 1, adc_right = 0, dac_left, dac_right;
  logic frame_start;
  int dac_frames;
  int checks = 0, failures = 0;

  effects_top dut (.*);
  wm8731_model codec (
    .adc_left, .adc_right, .bclk(AUD_BCLK), .lrclk(AUD_ADCLRCK), .adcdat(AUD_ADCDAT),
    .dacdat(AUD_DACDAT), .frame_start, .dac_left, .dac_right, .dac_frames
  );
  assign AUD_DACLRCK = AUD_ADCLRCK;

  always #10 clk = ~clk;

  initial begin
    #40ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  longint h[TAPS];
  longint xh[$];
  longint bq[4][5], bqs[4][4];
  bit     bq_byp;
  longint tp, tn, lpf[5], ls[4];
  bit     soft_on;
  longint ring[DEPTH];
  int     L, wp;
  longint mix;
  bit     dbyp;
  int n_clip_hi, n_clip_lo, n_soft, n_bq_on, n_bq_byp, n_echo, n_dbyp, n_silence, n_readback;

  function automatic longint clip16(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic longint model(input longint x);
    longint acc, y, c, wet;
    int le;
    // FIR
    xh.push_front(x);
    if (xh.size() > TAPS) void'(xh.pop_back());
    acc = 0;
    foreach (xh[k]) acc += h[k] * xh[k];
    y = clip16(acc >>> 15);
    // biquads
    for (int s = 0; s < 4; s++) begin
      longint z;
      z = clip16((bq[s][0] * y + bq[s][1] * bqs[s][0] + bq[s][2] * bqs[s][1]
                 - bq[s][3] * bqs[s][2] - bq[s][4] * bqs[s][3]) >>> 12);
      bqs[s][1] = bqs[s][0]; bqs[s][0] = y; bqs[s][3] = bqs[s][2]; bqs[s][2] = z;
      if (!bq_byp) y = z;
    end
    if (bq_byp) n_bq_byp++; else n_bq_on++;
    // limiter
    c = y;
    if (c > tp) begin c = tp; n_clip_hi++; end
    else if (c < tn) begin c = tn; n_clip_lo++; end
    y = clip16((lpf[0] * c + lpf[1] * ls[0] + lpf[2] * ls[1] - lpf[3] * ls[2] - lpf[4] * ls[3]) >>> 12);
    ls[1] = ls[0]; ls[0] = c; ls[3] = ls[2]; ls[2] = y;
    if (soft_on) n_soft++; else y = c;
    // delay
    le = (L == 0) ? 1 : (L > DEPTH) ? DEPTH : L;
    wet = ring[wp];
    ring[wp] = y;
    wp = (wp + 1 >= le) ? 0 : wp + 1;
    if (dbyp) begin n_dbyp++; return y; end
    if (wet != 0 && mix != 0) n_echo++;
    return clip16(((y * 16384) >>> 15) + ((wet * mix) >>> 16));
  endfunction

  // ---------------- monitors ----------------
  longint in_q[$];
  logic signed [15:0] processed[$], dacs[$];

  always @(posedge clk) if (!reset) begin
    if (dut.in_v && dut.in_r) in_q.push_back(longint'(dut.in_d));
    if (dut.out_v && dut.out_r) begin
      longint e;
      checks++;
      if (in_q.size() == 0) begin failures++; $display("FAIL output without input"); end
      else begin
        e = model(in_q.pop_front());
        if (dut.out_d !== 16'(e)) begin
          failures++;
          if (failures < 10) $display("FAIL sample %0d: got %0d want %0d", processed.size(), dut.out_d, e);
        end
      end
      processed.push_back(dut.out_d);
    end
  end

  bit started = 0;
  always @(dac_frames) begin
    if (dac_left != 0) started = 1;
    if (started) dacs.push_back(dac_left);
    else n_silence++;
    checks++;
    if (dac_left !== dac_right) begin failures++; $display("FAIL DAC channels differ"); end
  end

  always @(posedge frame_start) begin
    #1000;
    adc_left  = 16'($signed(32'($urandom_range(0, 40000)) - 20000));
    adc_right = 16'($urandom);
  end

  // ---------------- processor bus ----------------
  task automatic bus_write(input int byte_addr, input int d);
    @(negedge clk);
    hps_address = 14'(byte_addr); hps_writedata = 16'(d); hps_write = 1;
    @(negedge clk);
    hps_write = 0;
  endtask

  task automatic bus_read_check(input int byte_addr, input logic [15:0] e);
    @(negedge clk);
    hps_address = 14'(byte_addr); hps_read = 1;
    @(negedge clk);
    hps_read = 0;
    checks++;
    if (!hps_readdatavalid || hps_readdata !== e) begin
      failures++; $display("FAIL read-back at %h: %h", byte_addr, hps_readdata);
    end else n_readback++;
  endtask

  // Returns just after a sample has left the chain, at a negedge so that model
  // updates made by the caller cannot race the output monitor.
  task automatic between_samples();
    @(posedge clk iff (dut.out_v && dut.out_r));
    @(negedge clk);
  endtask

  task automatic frames(input int n);
    repeat (n) @(posedge frame_start);
  endtask

  task automatic set_biquads(input bit byp);
    between_samples();
    for (int s = 0; s < 4; s++) begin
      // gentle shelving-like sections: b0 ~ 1, small b1/b2, stable poles
      bq[s][0] = 3500 + 300 * s; bq[s][1] = -1200 + 200 * s; bq[s][2] = 300;
      bq[s][3] = -1600 + 100 * s; bq[s][4] = 400;
      for (int c = 0; c < 5; c++) bus_write('h100 + 2 * (5 * s + c), int'(bq[s][c]));
    end
    bus_write('h100 + 2 * 20, byp);
    bq_byp = byp;
  endtask

  int knob_row;
  bit saw_knob = 0;
  int n_vframes = 0;
  always @(negedge VGA_VS) n_vframes++;
  always @(posedge clk) if (!reset && dut.u_vga.u_counters.hcount == 11'(2 * 300 + 1) &&
                            dut.u_vga.u_counters.vcount == 10'(knob_row + 5)) begin
    @(posedge clk);
    #1;
    if ({VGA_R, VGA_G, VGA_B} == 24'hffffff) saw_knob = 1;
  end

  initial begin
    for (int k = 0; k < TAPS; k++) h[k] = (k == 1) ? 32767 : 0;
    for (int s = 0; s < 4; s++) begin
      for (int c = 0; c < 5; c++) bq[s][c] = (c == 0) ? 4096 : 0;
      for (int c = 0; c < 4; c++) bqs[s][c] = 0;
    end
    bq_byp = 1;
    tp = 1000; tn = -1000; soft_on = 0;
    lpf[0] = 4096; lpf[1] = 0; lpf[2] = 0; lpf[3] = 0; lpf[4] = 0;
    for (int c = 0; c < 4; c++) ls[c] = 0;
    foreach (ring[i]) ring[i] = 0;
    L = 6000; wp = 0; mix = 30000; dbyp = 0;
    knob_row = 289;

    // FIR coefficients are loaded while the datapath is held in reset
    repeat (5) @(posedge clk);
    for (int k = 0; k < TAPS; k++) begin
      int v;
      v = (k < 48) ? int'($urandom_range(0, 12000)) - 6000 : int'($urandom_range(0, 400)) - 200;
      bus_write('h1000 + 2 * k, v);
      h[k] = longint'(v);
    end
    @(negedge clk);
    reset = 0;

    // delay length 40 so the echo is heard within the run
    between_samples();
    bus_write('h22, 40); L = 40;
    frames(60);
    bus_read_check('h1000 + 2 * 7, 16'(h[7]));
    bus_read_check('h1000 + 2 * 499, 16'(h[499]));

    set_biquads(0);                                   // EQ on
    frames(60);

    between_samples();
    bus_write('h10, 8000); tp = 8000;
    bus_write('h12, -8000); tn = -8000;
    frames(30);
    between_samples();
    bus_write('h16, 1024); lpf[0] = 1024;
    bus_write('h18, 2048); lpf[1] = 2048;
    bus_write('h1a, 1024); lpf[2] = 1024;
    bus_write('h1c, -2048); lpf[3] = -2048;
    bus_write('h1e, 512); lpf[4] = 512;
    bus_write('h14, 1); soft_on = 1;                     // soft clip on
    frames(60);

    between_samples();
    bus_write('h20, 1); dbyp = 1;                     // delay bypassed
    frames(30);
    between_samples();
    bus_write('h20, 0); dbyp = 0;
    bus_write('h24, -20000); mix = -20000;
    frames(40);

    between_samples();
    bus_write('h100 + 2 * 20, 1); bq_byp = 1;         // EQ bypassed
    frames(30);

    // user interface: move the delay knob and wait for it on screen
    bus_write('h2000 + 2 * 3, 200); knob_row = 200;
    wait (n_vframes >= 2);
    frames(4);

    // ---------------- results ----------------
    checks++;
    if (processed.size() < 250) begin failures++; $display("FAIL only %0d samples processed", processed.size()); end
    // the DAC must play the processed stream in order
    begin
      int p0;
      p0 = 0;
      while (p0 < processed.size() && processed[p0] == 0) p0++;
      checks++;
      if (dacs.size() + 3 < processed.size() - p0) begin failures++; $display("FAIL DAC played %0d of %0d", dacs.size(), processed.size() - p0); end
      foreach (dacs[i]) begin
        checks++;
        if (p0 + i >= processed.size() || dacs[i] !== processed[p0 + i]) begin
          failures++; $display("FAIL DAC word %0d", i); break;
        end
      end
    end
    $display("processed %0d, dac %0d, silent %0d, clip hi %0d lo %0d, soft %0d, eq on %0d byp %0d, echo %0d, delay byp %0d, readback %0d, video frames %0d",
             processed.size(), dacs.size(), n_silence, n_clip_hi, n_clip_lo, n_soft, n_bq_on, n_bq_byp, n_echo, n_dbyp, n_readback, n_vframes);
    checks += 10;
    if (n_silence == 0)  begin failures++; $display("FAIL output FIFO never empty"); end
    if (n_clip_hi == 0)  begin failures++; $display("FAIL no clipping high"); end
    if (n_clip_lo == 0)  begin failures++; $display("FAIL no clipping low"); end
    if (n_soft == 0)     begin failures++; $display("FAIL no soft clip"); end
    if (n_bq_on == 0)    begin failures++; $display("FAIL EQ never on"); end
    if (n_bq_byp == 0)   begin failures++; $display("FAIL EQ never bypassed"); end
    if (n_echo == 0)     begin failures++; $display("FAIL no echo"); end
    if (n_dbyp == 0)     begin failures++; $display("FAIL delay never bypassed"); end
    if (n_readback != 2) begin failures++; $display("FAIL coefficient read-back"); end
    if (!saw_knob)       begin failures++; $display("FAIL knob not drawn at new row"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
