// delay_effect: echo. Each output is the current sample at half level plus a
// sample from DELAY LENGTH samples ago scaled by the mix factor:
//
//   y[n] = x[n] * 16384 / 2^15  +  x[n - L] * MIX / 2^16        (clipped)
//
// The past samples live in a circular buffer of DEPTH words (one block RAM).
// For every accepted sample the word at the write pointer, written L samples
// earlier, is read out and replaced by the new sample in the same clock, and the
// pointer advances modulo L. Changing L restarts nothing: the pointer simply
// wraps at the new length (if it is already beyond, it wraps at once).
// Avalon-MM registers (16-bit, word address):
//   0 BYPASS (nonzero: output = input)   reset 0
//   1 DELAY LENGTH L in samples          reset 6000, used as 1..DEPTH
//   2 MIX, signed wet gain / 2^16        reset 30000
// Streaming is Avalon-ST with one output register: a result leaves one clock
// after its sample enters, one sample per clock. The buffer keeps filling
// while bypassed.
// The register map, reset values, the dry gain of one half and the wet scaling
// follow the design; the clamp of L to 1..DEPTH is this design's own.
module delay_effect
  import fx_pkg::*;
#(
  parameter int DEPTH = 8192,
  parameter int DW    = 16
) (
  input  logic        clk,
  input  logic        reset,
  input  sample_t     avalon_sink_data,
  input  logic        avalon_sink_valid,
  output logic        avalon_sink_ready,
  output sample_t     avalon_source_data,
  output logic        avalon_source_valid,
  input  logic        avalon_source_ready,
  input  logic [2:0]  address,
  input  logic        chipselect,
  input  logic        write,
  input  logic [15:0] writedata
);
  localparam int AW = $clog2(DEPTH);
  localparam logic signed [15:0] DRY_GAIN = 16'sd16384;   // 0.5 in Q1.15

  logic [15:0] bypass;
  logic [15:0] length;
  coef_t       mix;

  always_ff @(posedge clk) begin
    if (reset) begin
      bypass <= 16'd0;
      length <= 16'd6000;
      mix    <= 16'sd30000;
    end else if (chipselect && write) begin
      case (address)
        3'd0:    bypass <= writedata;
        3'd1:    length <= writedata;
        3'd2:    mix    <= writedata;
        default: ;
      endcase
    end
  end

  // Effective length, 1..DEPTH.
  logic [AW:0] len_eff;
  always_comb begin
    if (length == 16'd0)             len_eff = (AW+1)'(1);
    else if (32'(length) > DEPTH)    len_eff = (AW+1)'(DEPTH);
    else                             len_eff = length[AW:0];
  end

  sample_t       buffer [DEPTH];
  logic [AW-1:0] wp;
  logic          take;
  sample_t       wet, dry;
  logic [15:0]   bypass_q;

  assign avalon_sink_ready = !avalon_source_valid || avalon_source_ready;
  assign take              = avalon_sink_valid && avalon_sink_ready;

  // Read-before-write circular buffer (maps to a block RAM in read-first mode).
  always_ff @(posedge clk) begin
    if (take && !reset) begin
      wet        <= buffer[wp];
      buffer[wp] <= avalon_sink_data;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      wp                  <= '0;
      avalon_source_valid <= 1'b0;
      dry                 <= '0;
      bypass_q            <= '0;
    end else if (take) begin
      wp                  <= ((AW+1)'(wp) + 1'b1 >= len_eff) ? '0 : wp + 1'b1;
      avalon_source_valid <= 1'b1;
      dry                 <= avalon_sink_data;
      bypass_q            <= bypass;
    end else if (avalon_source_ready) begin
      avalon_source_valid <= 1'b0;
    end
  end

  logic signed [47:0] mixed, dry_w, wet_w, dgain_w, mix_w;
  always_comb begin
    dry_w   = dry;
    wet_w   = wet;
    dgain_w = DRY_GAIN;
    mix_w   = mix;
    mixed   = ((dry_w * dgain_w) >>> 15) + ((wet_w * mix_w) >>> 16);
    avalon_source_data = (|bypass_q) ? dry : sat16(mixed);
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) buffer[i] = '0;
  end

  a_src_stable: assert property (@(posedge clk) disable iff (reset)
    avalon_source_valid && !avalon_source_ready |=> avalon_source_valid && $stable(avalon_source_data));
endmodule
