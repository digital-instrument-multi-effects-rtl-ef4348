// i2s_avalon_st: the codec interface of the effects unit.
//
// Receive side: the codec (in master mode, so it generates BCLK and both LRCLKs)
// sends 16-bit left-justified samples on AUD_ADCDAT. The deserializer turns them
// into words which go into a left and a right input FIFO of FIFO_DEPTH words. The
// Avalon-ST source presents the left-channel sample whenever both FIFOs hold one
// and pops both together: the effects chain is mono and only the left channel is
// processed, the right input being discarded in step with it.
// Transmit side: each sample taken on the Avalon-ST sink is written into both a
// left and a right output FIFO (mono to both speakers). At the start of each DAC
// frame (LRCLK rising) both FIFOs are read together; the left word is sent at
// once and the right word is held for the second half of the frame. An empty
// output FIFO sends silence; a full input FIFO drops the incoming word.
// Timing: a sample appears on the source about 3 system clocks after its last
// bit; sink_ready is low only while an output FIFO is full.
// The port names, the mono routing and the FIFO sizes follow the design; the
// full/empty policies and reading both output FIFOs at the frame start are this
// design's own.
module i2s_avalon_st
  import fx_pkg::*;
#(
  parameter int DW         = 16,
  parameter int FIFO_DEPTH = 128
) (
  input  logic          clk,
  input  logic          reset,

  input  logic [DW-1:0] avalon_sink_data,
  input  logic          avalon_sink_valid,
  output logic          avalon_sink_ready,

  output logic [DW-1:0] avalon_source_data,
  output logic          avalon_source_valid,
  input  logic          avalon_source_ready,

  input  logic          AUD_ADCDAT,
  input  logic          AUD_ADCLRCK,
  input  logic          AUD_BCLK,
  input  logic          AUD_DACLRCK,
  output logic          AUD_DACDAT
);
  localparam int CW = $clog2(FIFO_DEPTH + 1);

  logic bclk_rise, bclk_fall, bclk_lvl;
  logic adc_lr_rise, adc_lr_fall, adc_lr_lvl;
  logic dac_lr_rise, dac_lr_fall, dac_lr_lvl;

  edge_detect u_bclk  (.clk, .reset, .in(AUD_BCLK),    .level(bclk_lvl),   .rise(bclk_rise),   .fall(bclk_fall));
  edge_detect u_adclr (.clk, .reset, .in(AUD_ADCLRCK), .level(adc_lr_lvl), .rise(adc_lr_rise), .fall(adc_lr_fall));
  edge_detect u_daclr (.clk, .reset, .in(AUD_DACLRCK), .level(dac_lr_lvl), .rise(dac_lr_rise), .fall(dac_lr_fall));

  // ---------------- receive ----------------
  logic [DW-1:0] rx_word;
  logic          rx_left, rx_valid;
  logic          inl_ready, inr_ready, inl_valid, inr_valid;
  logic [DW-1:0] inl_data, inr_data;
  logic [CW-1:0] inl_count, inr_count;

  audio_deserializer #(.DW(DW)) u_deser (
    .clk, .reset,
    .bclk_rise, .lrclk_rise(adc_lr_rise), .lrclk_fall(adc_lr_fall),
    .sdata(AUD_ADCDAT),
    .word(rx_word), .word_left(rx_left), .word_valid(rx_valid)
  );

  sample_fifo #(.DW(DW), .DEPTH(FIFO_DEPTH)) u_in_left (
    .clk, .reset,
    .in_data(rx_word), .in_valid(rx_valid && rx_left), .in_ready(inl_ready),
    .out_data(inl_data), .out_valid(inl_valid), .out_ready(avalon_source_valid && avalon_source_ready),
    .count(inl_count)
  );

  sample_fifo #(.DW(DW), .DEPTH(FIFO_DEPTH)) u_in_right (
    .clk, .reset,
    .in_data(rx_word), .in_valid(rx_valid && !rx_left), .in_ready(inr_ready),
    .out_data(inr_data), .out_valid(inr_valid), .out_ready(avalon_source_valid && avalon_source_ready),
    .count(inr_count)
  );

  assign avalon_source_valid = inl_valid && inr_valid;
  assign avalon_source_data  = inl_data;

  // ---------------- transmit ----------------
  logic          outl_ready, outr_ready, outl_valid, outr_valid;
  logic [DW-1:0] outl_data, outr_data;
  logic [CW-1:0] outl_count, outr_count;
  logic          load_left;

  assign avalon_sink_ready = outl_ready && outr_ready;

  sample_fifo #(.DW(DW), .DEPTH(FIFO_DEPTH)) u_out_left (
    .clk, .reset,
    .in_data(avalon_sink_data), .in_valid(avalon_sink_valid && avalon_sink_ready), .in_ready(outl_ready),
    .out_data(outl_data), .out_valid(outl_valid), .out_ready(load_left),
    .count(outl_count)
  );

  sample_fifo #(.DW(DW), .DEPTH(FIFO_DEPTH)) u_out_right (
    .clk, .reset,
    .in_data(avalon_sink_data), .in_valid(avalon_sink_valid && avalon_sink_ready), .in_ready(outr_ready),
    .out_data(outr_data), .out_valid(outr_valid), .out_ready(load_left),
    .count(outr_count)
  );

  // Both output FIFOs are read at the start of a frame so that the two words
  // of one frame always belong together; the right word waits in right_hold.
  logic [DW-1:0] right_hold;
  always_ff @(posedge clk) begin
    if (reset)          right_hold <= '0;
    else if (load_left) right_hold <= outr_valid ? outr_data : '0;
  end

  audio_serializer #(.DW(DW)) u_ser (
    .clk, .reset,
    .bclk_fall, .lrclk_rise(dac_lr_rise), .lrclk_fall(dac_lr_fall),
    .left_word(outl_valid ? outl_data : '0),
    .right_word(right_hold),
    .load_left, .load_right(),
    .sdata(AUD_DACDAT)
  );

  // Avalon-ST: a presented sample stays put until it is taken.
  a_src_stable: assert property (@(posedge clk) disable iff (reset)
    avalon_source_valid && !avalon_source_ready |=> avalon_source_valid && $stable(avalon_source_data));
endmodule
