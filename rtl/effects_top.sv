// effects_top: FPGA side of a digital multi-effects unit for electric guitar.
//
// A guitar, buffered by an analog pre-amplifier, feeds the line input of a
// WM8731 audio codec. The codec runs as clock master and streams 16-bit, 48 kHz
// left-justified samples. Inside the FPGA the left channel passes, one sample
// at a time over Avalon-ST valid/ready handshakes, through
//   deserializer + input FIFO -> cabinet IR (500-tap FIR) -> 4-section biquad EQ
//   -> limiter (hard / soft clip) -> delay (echo) -> output FIFO + serializer
// and goes back to both DAC channels. Each effect has a software bypass (the
// FIR by loading a unit impulse, the limiter by opening its thresholds).
// An ARM processor programs every block through 16-bit Avalon-MM registers
// (ports hps_*, byte addresses, see avalon_mm_decoder) and drives a VGA
// control panel (vga_ball) that shows presets, switches and sliders.
// Timing: one 50 MHz clock for everything; the codec's BCLK and LRCLKs are
// sampled as data. The FIR needs about 500 clocks per sample, far below the
// ~1040 clocks between samples, and all other stages take one sample per clock.
// The codec's I2C set-up, the processor and the pre-amplifier are outside this
// RTL. Block order and address map follow the design; the single clock domain
// and the hps_* bus ports are this design's own framing.
module effects_top
  import fx_pkg::*;
#(
  parameter int FIR_TAPS    = 500,
  parameter int DELAY_DEPTH = 8192,
  parameter int FIFO_DEPTH  = 128
) (
  input  logic        clk,
  input  logic        reset,

  input  logic [13:0] hps_address,
  input  logic        hps_write,
  input  logic [15:0] hps_writedata,
  input  logic        hps_read,
  output logic [15:0] hps_readdata,
  output logic        hps_readdatavalid,

  input  logic        AUD_ADCDAT,
  input  logic        AUD_ADCLRCK,
  input  logic        AUD_BCLK,
  input  logic        AUD_DACLRCK,
  output logic        AUD_DACDAT,

  output logic [7:0]  VGA_R,
  output logic [7:0]  VGA_G,
  output logic [7:0]  VGA_B,
  output logic        VGA_CLK,
  output logic        VGA_HS,
  output logic        VGA_VS,
  output logic        VGA_BLANK_n,
  output logic        VGA_SYNC_n
);
  // ---------------- register bus ----------------
  logic       cs_lim, cs_dly, cs_biq, cs_fir, cs_vga, wr, rd;

  assign wr = hps_write;
  assign rd = hps_read;
  logic [8:0] waddr;

  avalon_mm_decoder u_dec (
    .address(hps_address),
    .cs_lim, .cs_dly, .cs_biq, .cs_fir, .cs_vga,
    .word_addr(waddr)
  );

  // ---------------- audio datapath ----------------
  sample_t in_d,  fir_d, biq_d, lim_d, out_d;
  logic    in_v,  fir_v, biq_v, lim_v, out_v;
  logic    in_r,  fir_r, biq_r, lim_r, out_r;

  i2s_avalon_st #(.DW(16), .FIFO_DEPTH(FIFO_DEPTH)) u_i2s (
    .clk, .reset,
    .avalon_sink_data(out_d), .avalon_sink_valid(out_v), .avalon_sink_ready(out_r),
    .avalon_source_data(in_d), .avalon_source_valid(in_v), .avalon_source_ready(in_r),
    .AUD_ADCDAT, .AUD_ADCLRCK, .AUD_BCLK, .AUD_DACLRCK, .AUD_DACDAT
  );

  fir_cabinet #(.TAPS(FIR_TAPS)) u_fir (
    .clk, .reset,
    .ast_sink_data(in_d), .ast_sink_valid(in_v), .ast_sink_ready(in_r),
    .ast_source_data(fir_d), .ast_source_valid(fir_v), .ast_source_ready(fir_r),
    .coeff_address(($clog2(FIR_TAPS))'(waddr)),
    .coeff_write(cs_fir && wr), .coeff_writedata(hps_writedata),
    .coeff_read(cs_fir && rd), .coeff_readdata(hps_readdata),
    .coeff_readdatavalid(hps_readdatavalid)
  );

  biquad_chain u_biq (
    .clk, .reset,
    .avalon_sink_data(fir_d), .avalon_sink_valid(fir_v), .avalon_sink_ready(fir_r),
    .avalon_source_data(biq_d), .avalon_source_valid(biq_v), .avalon_source_ready(biq_r),
    .address(waddr[4:0]), .chipselect(cs_biq), .write(wr), .writedata(hps_writedata)
  );

  limiter u_lim (
    .clk, .reset,
    .ast_sink_data(biq_d), .ast_sink_valid(biq_v), .ast_sink_ready(biq_r),
    .ast_source_data(lim_d), .ast_source_valid(lim_v), .ast_source_ready(lim_r),
    .address(waddr[2:0]), .chipselect(cs_lim), .write(wr), .writedata(hps_writedata)
  );

  delay_effect #(.DEPTH(DELAY_DEPTH)) u_dly (
    .clk, .reset,
    .avalon_sink_data(lim_d), .avalon_sink_valid(lim_v), .avalon_sink_ready(lim_r),
    .avalon_source_data(out_d), .avalon_source_valid(out_v), .avalon_source_ready(out_r),
    .address(waddr[2:0]), .chipselect(cs_dly), .write(wr), .writedata(hps_writedata)
  );

  // ---------------- user interface display ----------------
  vga_ball u_vga (
    .clk, .reset,
    .writedata(hps_writedata), .write(wr), .chipselect(cs_vga), .address(waddr[2:0]),
    .VGA_R, .VGA_G, .VGA_B, .VGA_CLK, .VGA_HS, .VGA_VS, .VGA_BLANK_n, .VGA_SYNC_n
  );
endmodule
