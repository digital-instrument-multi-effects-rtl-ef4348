// audio_deserializer: turns the codec's serial ADC stream into 16-bit words.
//
// The codec sends each sample MSB first in left-justified format: the first bit
// is valid at the first BCLK rising edge after an LRCLK edge, and the LRCLK level
// names the channel (high = left, the codec's convention for this format). Every
// LRCLK edge restarts a DW-bit shift register; each BCLK rising edge shifts in one
// bit; after the DW-th bit the word is presented on `word` with a one-cycle
// `word_valid` strobe and `word_left` telling the channel. Extra bit clocks in a
// half-frame are ignored. Inputs are edge strobes already in the system clock
// domain (see edge_detect). Serial-to-parallel conversion is what the design
// calls for; the bit-counter construction is this design's own.
module audio_deserializer #(
  parameter int DW = 16
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          bclk_rise,
  input  logic          lrclk_rise,
  input  logic          lrclk_fall,
  input  logic          sdata,
  output logic [DW-1:0] word,
  output logic          word_left,
  output logic          word_valid
);
  logic [DW-1:0]          shreg;
  logic [$clog2(DW+1)-1:0] bits_left;
  logic                   chan_left;

  always_ff @(posedge clk) begin
    if (reset) begin
      shreg      <= '0;
      bits_left  <= '0;
      chan_left  <= 1'b0;
      word       <= '0;
      word_left  <= 1'b0;
      word_valid <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      if (lrclk_rise || lrclk_fall) begin
        bits_left <= DW[$clog2(DW+1)-1:0];
        chan_left <= lrclk_rise;
      end else if (bclk_rise && bits_left != '0) begin
        shreg     <= {shreg[DW-2:0], sdata};
        bits_left <= bits_left - 1'b1;
        if (bits_left == 1) begin
          word       <= {shreg[DW-2:0], sdata};
          word_left  <= chan_left;
          word_valid <= 1'b1;
        end
      end
    end
  end
endmodule
