// audio_serializer: drives the codec's DAC data pin in left-justified format.
//
// At each DAC LRCLK edge the word for that half-frame is loaded (left_word on a
// rising edge, right_word on a falling edge, LRCLK high = left) and a one-cycle
// load_left / load_right strobe, in the same cycle, tells the source it was taken.
// The strobes are simply the qualified LRCLK edge strobes: load_left is the
// rising-edge strobe itself, brought out so the source reads its FIFO exactly when
// the word is loaded. Its MSB appears on sdata at once, and each later BCLK falling edge moves to the next bit, so
// the codec, which samples on BCLK rising edges, sees bit k at the (k+1)-th rising
// edge of the half-frame. After DW bits the pin carries zeros. Inputs are edge
// strobes in the system clock domain. The parallel-to-serial function follows the
// design; the shift-register details are this design's own.
module audio_serializer #(
  parameter int DW = 16
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          bclk_fall,
  input  logic          lrclk_rise,
  input  logic          lrclk_fall,
  input  logic [DW-1:0] left_word,
  input  logic [DW-1:0] right_word,
  output logic          load_left,
  output logic          load_right,
  output logic          sdata
);
  logic [DW-1:0] shreg;

  always_ff @(posedge clk) begin
    if (reset) begin
      shreg <= '0;
    end else begin
      if (lrclk_rise) begin
        shreg <= left_word;
      end else if (lrclk_fall) begin
        shreg <= right_word;
      end else if (bclk_fall) begin
        shreg <= {shreg[DW-2:0], 1'b0};
      end
    end
  end

  // The load strobes are combinational so that the word a FIFO shows is the
  // one removed from it in the same cycle.
  assign load_left  = lrclk_rise;
  assign load_right = lrclk_fall && !lrclk_rise;
  assign sdata      = shreg[DW-1];
endmodule
