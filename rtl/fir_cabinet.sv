// fir_cabinet: cabinet impulse response, a TAPS-tap discrete convolution
//
//   y[n] = ( sum_{k=0}^{TAPS-1} h[k] * x[n-k] ) / 2^15        (clipped)
//
// with coefficients h[k] loaded by software (signed Q1.15, 32767 ~ 1.0).
// Audio arrives at 48 kHz while the clock runs at 50 MHz, leaving about a
// thousand clocks per sample, so a single multiplier is shared by all taps:
// the sample history sits in a circular RAM of TAPS words and the coefficients
// in a second RAM, and one product is accumulated per clock.
// Sequence: a sample is accepted only when the filter is idle (sink_ready);
// it is written over the oldest history word. The next TAPS clocks read h[k]
// and x[n-k] for k = 0..TAPS-1, one clock later their product is added to the
// accumulator, and the rounded-down, clipped sum is presented on the source
// TAPS+3 clocks after the sample was accepted. It is held until source_ready,
// after which the next sample can be taken.
// Coefficient port (Avalon-MM slave, 16-bit words): coeff_write stores
// coeff_writedata at h[coeff_address]; coeff_read returns h[coeff_address] on
// coeff_readdata with coeff_readdatavalid one clock later. Addresses at or above
// TAPS are ignored. At power-up h = {0, 32767, 0, ...}, a one-sample delay.
// The tap count, the coefficient port and the 16-bit data follow the design;
// the Q1.15 scaling, the single shared multiplier and the power-up contents are
// this design's reading of it.
module fir_cabinet
  import fx_pkg::*;
#(
  parameter int TAPS      = 500,
  parameter int COEF_FRAC = 15
) (
  input  logic                      clk,
  input  logic                      reset,
  input  sample_t                   ast_sink_data,
  input  logic                      ast_sink_valid,
  output logic                      ast_sink_ready,
  output sample_t                   ast_source_data,
  output logic                      ast_source_valid,
  input  logic                      ast_source_ready,
  input  logic [$clog2(TAPS)-1:0]   coeff_address,
  input  logic                      coeff_write,
  input  logic [15:0]               coeff_writedata,
  input  logic                      coeff_read,
  output logic [15:0]               coeff_readdata,
  output logic                      coeff_readdatavalid
);
  localparam int AW = $clog2(TAPS);

  typedef enum logic [1:0] {IDLE, RUN, FLUSH, OUT} state_e;

  coef_t   coef [TAPS];
  sample_t hist [TAPS];

  state_e             state;
  logic [AW-1:0]      wp;       // where the newest sample is written
  logic [AW-1:0]      k;        // tap being read
  logic [AW-1:0]      hidx;     // history index of x[n-k]
  coef_t              c_q;
  sample_t            h_q;
  logic               mac_en;
  logic signed [47:0] acc;

  assign ast_sink_ready = (state == IDLE);

  // Coefficient RAM: software port (write, or read with one clock latency).
  always_ff @(posedge clk) begin
    if (coeff_write && 32'(coeff_address) < TAPS) coef[coeff_address] <= coeff_writedata;
    coeff_readdata <= coef[coeff_address];
  end

  always_ff @(posedge clk) begin
    if (reset) coeff_readdatavalid <= 1'b0;
    else       coeff_readdatavalid <= coeff_read;
  end

  // Coefficient RAM and history RAM: datapath read ports.
  always_ff @(posedge clk) begin
    c_q <= coef[k];
    h_q <= hist[hidx];
  end

  // History RAM write port.
  always_ff @(posedge clk) begin
    if (!reset && state == IDLE && ast_sink_valid) hist[wp] <= ast_sink_data;
  end

  logic signed [47:0] c_w, h_w;
  assign c_w = c_q;
  assign h_w = h_q;

  always_ff @(posedge clk) begin
    if (reset) begin
      state            <= IDLE;
      wp               <= '0;
      k                <= '0;
      hidx             <= '0;
      mac_en           <= 1'b0;
      acc              <= '0;
      ast_source_valid <= 1'b0;
      ast_source_data  <= '0;
    end else begin
      mac_en <= (state == RUN);
      if (mac_en) acc <= acc + c_w * h_w;
      case (state)
        IDLE: if (ast_sink_valid) begin
          state <= RUN;
          k     <= '0;
          hidx  <= wp;
          acc   <= '0;
          wp    <= (wp == AW'(TAPS - 1)) ? '0 : wp + 1'b1;
        end
        RUN: begin
          hidx <= (hidx == '0) ? AW'(TAPS - 1) : hidx - 1'b1;
          if (k == AW'(TAPS - 1)) state <= FLUSH;
          else                    k <= k + 1'b1;
        end
        FLUSH: if (!mac_en) begin
          ast_source_data  <= sat16(acc >>> COEF_FRAC);
          ast_source_valid <= 1'b1;
          state            <= OUT;
        end
        OUT: if (ast_source_ready) begin
          ast_source_valid <= 1'b0;
          state            <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  initial begin
    for (int i = 0; i < TAPS; i++) begin
      coef[i] = (i == 1) ? 16'sd32767 : 16'sd0;
      hist[i] = '0;
    end
  end

  a_src_stable: assert property (@(posedge clk) disable iff (reset)
    ast_source_valid && !ast_source_ready |=> ast_source_valid && $stable(ast_source_data));
endmodule
