// wm8731_model: behavioural model (not synthesizable) of the audio codec's
// digital audio interface in master mode, left-justified, 16-bit.
//
// The model generates BCLK (period 2*HALF_NS) and one LRCLK shared by ADC and
// DAC, BITS_PER_HALF bit clocks per channel. LRCLK high = left channel. LRCLK and
// ADC data change on BCLK falling edges; the MSB is valid at the first rising
// edge of each half-frame and the DAC pin is sampled on rising edges.
// At the start of every frame it latches adc_left / adc_right, pulses
// frame_start for one half bit period, and shifts them out; each received DAC
// half-frame is stored in dac_left / dac_right and counted in dac_frames once
// the right half is complete.
module wm8731_model #(
  parameter int HALF_NS       = 160,
  parameter int BITS_PER_HALF = 32
) (
  input  logic signed [15:0] adc_left,
  input  logic signed [15:0] adc_right,
  output logic               bclk,
  output logic               lrclk,
  output logic               adcdat,
  input  logic               dacdat,
  output logic               frame_start,
  output logic signed [15:0] dac_left,
  output logic signed [15:0] dac_right,
  output int                 dac_frames
);
  logic [15:0] w [2];
  logic [15:0] d;

  initial begin
    bclk = 0; lrclk = 0; adcdat = 0; frame_start = 0;
    dac_left = 0; dac_right = 0; dac_frames = 0;
    #(4 * HALF_NS);
    forever begin
      w[0] = adc_left;
      w[1] = adc_right;
      for (int h = 0; h < 2; h++) begin
        d = '0;
        for (int b = 0; b < BITS_PER_HALF; b++) begin
          if (b == 0) begin
            lrclk = (h == 0);
            frame_start = (h == 0);
          end
          adcdat = (b < 16) ? w[h][15 - b] : 1'b0;
          #(HALF_NS) bclk = 1;
          frame_start = 0;
          if (b < 16) d[15 - b] = dacdat;
          #(HALF_NS) bclk = 0;
        end
        if (h == 0) dac_left = d;
        else begin
          dac_right = d;
          dac_frames++;
        end
      end
    end
  end
endmodule
