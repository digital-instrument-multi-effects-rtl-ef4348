// limiter: the distortion effect, a hard clipper optionally followed by a
// low-pass biquad that rounds off the clipped edges (soft clip).
//
// Hard clip: a sample above the positive threshold is replaced by it, one below
// the negative threshold by that, anything between passes unchanged. Setting the
// thresholds to +32767 / -32768 turns the effect off. Soft clip: the clipped
// signal then goes through a biquad_section whose coefficients software loads
// with a low-pass response; with soft clip off that section is bypassed.
// Avalon-MM registers (16-bit, word address):
//   0 positive threshold (reset 1000)     1 negative threshold (reset -1000)
//   2 bit 0: soft clip on (reset 0)       3-7 low-pass b0, b1, b2, a1, a2 (Q4.12,
//                                              reset 4096, 0, 0, 0, 0)
// Thresholds are compared as signed numbers. Streaming is Avalon-ST; the clip
// stage and the filter stage each add one register, so a sample leaves two
// clocks after it enters, one sample per clock.
// Registers 0-1, their reset values and hard clipping follow the design; the
// soft-clip registers 2-7 are this design's own layout inside the limiter's
// address window.
module limiter
  import fx_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  sample_t     ast_sink_data,
  input  logic        ast_sink_valid,
  output logic        ast_sink_ready,
  output sample_t     ast_source_data,
  output logic        ast_source_valid,
  input  logic        ast_source_ready,
  input  logic [2:0]  address,
  input  logic        chipselect,
  input  logic        write,
  input  logic [15:0] writedata
);
  sample_t tp, tn;
  logic    soft_on;
  coef_t   lpf [5];

  always_ff @(posedge clk) begin
    if (reset) begin
      tp   <= 16'sd1000;
      tn   <= -16'sd1000;
      soft_on <= 1'b0;
      for (int c = 0; c < 5; c++) lpf[c] <= (c == 0) ? 16'sd4096 : 16'sd0;
    end else if (chipselect && write) begin
      case (address)
        3'd0:    tp   <= writedata;
        3'd1:    tn   <= writedata;
        3'd2:    soft_on <= writedata[0];
        default: lpf[int'(address) - 3] <= writedata;
      endcase
    end
  end

  // Hard-clip stage.
  sample_t clip_data;
  logic    clip_valid, clip_ready;

  assign ast_sink_ready = !clip_valid || clip_ready;

  always_ff @(posedge clk) begin
    if (reset) begin
      clip_valid <= 1'b0;
      clip_data  <= '0;
    end else if (ast_sink_valid && ast_sink_ready) begin
      clip_valid <= 1'b1;
      if (ast_sink_data > tp)      clip_data <= tp;
      else if (ast_sink_data < tn) clip_data <= tn;
      else                         clip_data <= ast_sink_data;
    end else if (clip_ready) begin
      clip_valid <= 1'b0;
    end
  end

  // Smoothing stage (soft clip).
  biquad_section u_lpf (
    .clk, .reset,
    .sink_data(clip_data), .sink_valid(clip_valid), .sink_ready(clip_ready),
    .source_data(ast_source_data), .source_valid(ast_source_valid), .source_ready(ast_source_ready),
    .b0(lpf[0]), .b1(lpf[1]), .b2(lpf[2]), .a1(lpf[3]), .a2(lpf[4]),
    .bypass(!soft_on)
  );
endmodule
