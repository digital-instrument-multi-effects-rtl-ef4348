// edge_detect: brings an asynchronous codec clock (BCLK or LRCLK) into the
// system clock domain and reports its edges.
//
// The input passes through two flip-flops to settle metastability, and a third
// holds the previous value; rise and fall are one-cycle strobes, two to three
// system clocks after the pin changes. The codec's clocks are far slower than the
// 50 MHz system clock (BCLK is a few MHz), so sampling them as data is enough.
// Synchroniser depth is this design's own choice.
module edge_detect (
  input  logic clk,
  input  logic reset,
  input  logic in,
  output logic level,
  output logic rise,
  output logic fall
);
  logic [2:0] sh;

  always_ff @(posedge clk) begin
    if (reset) sh <= '0;
    else       sh <= {sh[1:0], in};
  end

  assign level = sh[1];
  assign rise  = sh[1] & ~sh[2];
  assign fall  = ~sh[1] & sh[2];
endmodule
