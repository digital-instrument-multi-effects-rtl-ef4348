// biquad_section: one second-order IIR filter section (direct form I).
//
//   y[n] = (b0 x[n] + b1 x[n-1] + b2 x[n-2] - a1 y[n-1] - a2 y[n-2]) / 2^12
//
// Coefficients are signed 16-bit numbers with 12 fractional bits (4096 = 1.0),
// already divided by a0 in software; they are inputs so that a register file
// outside can change them at any time. The five products are formed in parallel
// (five multipliers) and summed at full width; the sum is shifted right by 12
// and clipped to the 16-bit range, and that clipped value is also what is fed
// back as y[n-1].
// Handshake: Avalon-ST sink and source with one output register. A sample is
// taken when sink_valid && sink_ready; its result is on source_data one clock
// later and stays there until source_ready. sink_ready = !source_valid ||
// source_ready, so the section runs at one sample per clock when nothing stalls.
// With bypass high the input is passed through (still one clock late) while the
// filter state keeps running, so switching the filter in causes no jump in state.
// The equation, coefficient scaling and five-multiplier structure follow the
// design; clipping instead of wrap-around is this design's own choice.
module biquad_section
  import fx_pkg::*;
#(
  parameter int DW        = 16,
  parameter int COEF_FRAC = 12
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic signed [DW-1:0] sink_data,
  input  logic                 sink_valid,
  output logic                 sink_ready,
  output logic signed [DW-1:0] source_data,
  output logic                 source_valid,
  input  logic                 source_ready,
  input  coef_t                b0,
  input  coef_t                b1,
  input  coef_t                b2,
  input  coef_t                a1,
  input  coef_t                a2,
  input  logic                 bypass
);
  logic signed [DW-1:0] x1, x2, y1, y2;
  logic signed [47:0]   acc;
  logic signed [DW-1:0] y;
  logic                 take;

  assign sink_ready = !source_valid || source_ready;
  assign take       = sink_valid && sink_ready;

  // Operands are widened before multiplying so no product is truncated.
  function automatic logic signed [47:0] mul(input logic signed [15:0] c, input logic signed [15:0] s);
    logic signed [47:0] cw, sw;
    cw = c;
    sw = s;
    return cw * sw;
  endfunction

  always_comb begin
    acc = mul(b0, sink_data) + mul(b1, x1) + mul(b2, x2) - mul(a1, y1) - mul(a2, y2);
    y   = sat16(acc >>> COEF_FRAC);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      x1 <= '0; x2 <= '0; y1 <= '0; y2 <= '0;
      source_valid <= 1'b0;
      source_data  <= '0;
    end else begin
      if (take) begin
        x1 <= sink_data;
        x2 <= x1;
        y1 <= y;
        y2 <= y1;
        source_data  <= bypass ? sink_data : y;
        source_valid <= 1'b1;
      end else if (source_ready) begin
        source_valid <= 1'b0;
      end
    end
  end

  a_src_stable: assert property (@(posedge clk) disable iff (reset)
    source_valid && !source_ready |=> source_valid && $stable(source_data));
endmodule
