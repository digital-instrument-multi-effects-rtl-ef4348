// biquad_chain: the equaliser, four biquad sections in series with their
// coefficient registers.
//
// A three-band EQ (bass, mid, treble) is built by loading shelving and peaking
// filters into the sections; the fourth is spare. Software writes 16-bit
// registers over Avalon-MM (word address, one write per cycle):
//   0-4   section 1 b0, b1, b2, a1, a2      10-14 section 3
//   5-9   section 2                         15-19 section 4
//   20    BYPASS (bit 0 bypasses all four sections)
// Coefficients are Q4.12 (4096 = 1.0). After reset every section is a unit
// gain (b0 = 4096, rest 0) and BYPASS = 1. Samples flow through the four
// sections with the Avalon-ST handshake of biquad_section: four clocks of
// latency, one sample per clock throughput. The register map, reset values and
// the shared bypass follow the design.
module biquad_chain
  import fx_pkg::*;
#(
  parameter int N_SECTIONS = 4
) (
  input  logic           clk,
  input  logic           reset,
  input  sample_t        avalon_sink_data,
  input  logic           avalon_sink_valid,
  output logic           avalon_sink_ready,
  output sample_t        avalon_source_data,
  output logic           avalon_source_valid,
  input  logic           avalon_source_ready,
  input  logic [4:0]     address,
  input  logic           chipselect,
  input  logic           write,
  input  logic [15:0]    writedata
);
  coef_t   coef [N_SECTIONS][5];
  logic    bypass;

  always_ff @(posedge clk) begin
    if (reset) begin
      bypass <= 1'b1;
      for (int s = 0; s < N_SECTIONS; s++)
        for (int c = 0; c < 5; c++)
          coef[s][c] <= (c == 0) ? 16'sd4096 : 16'sd0;
    end else if (chipselect && write) begin
      if (int'(address) == 5 * N_SECTIONS)
        bypass <= writedata[0];
      else if (int'(address) < 5 * N_SECTIONS)
        coef[int'(address) / 5][int'(address) % 5] <= writedata;
    end
  end

  sample_t d     [N_SECTIONS+1];
  logic    v     [N_SECTIONS+1];
  logic    r     [N_SECTIONS+1];

  assign d[0]                = avalon_sink_data;
  assign v[0]                = avalon_sink_valid;
  assign avalon_sink_ready   = r[0];
  assign avalon_source_data  = d[N_SECTIONS];
  assign avalon_source_valid = v[N_SECTIONS];
  assign r[N_SECTIONS]       = avalon_source_ready;

  for (genvar s = 0; s < N_SECTIONS; s++) begin : g_sec
    biquad_section u_sec (
      .clk, .reset,
      .sink_data(d[s]), .sink_valid(v[s]), .sink_ready(r[s]),
      .source_data(d[s+1]), .source_valid(v[s+1]), .source_ready(r[s+1]),
      .b0(coef[s][0]), .b1(coef[s][1]), .b2(coef[s][2]), .a1(coef[s][3]), .a2(coef[s][4]),
      .bypass
    );
  end
endmodule
