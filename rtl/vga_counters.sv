// vga_counters: 640x480 VGA timing from a 50 MHz clock.
//
// The horizontal counter runs over 1600 clocks per line, two clocks per pixel,
// so hcount[10:1] is the pixel column (0-639 visible) and VGA_CLK = hcount[0]
// is the 25 MHz pixel clock. Line: 1280 active clocks, 32 front porch, 192 sync,
// 96 back porch. Frame: 480 active lines, 10 front porch, 2 sync, 33 back porch,
// 525 in all; vcount advances at the end of each line. Sync pulses are active
// low; VGA_BLANK_n is high in the visible area; VGA_SYNC_n is held low (no sync
// on green). Outputs are decoded combinationally from the counters. The timing
// numbers follow the design.
module vga_counters #(
  parameter logic [10:0] HACTIVE      = 11'd1280,
  parameter logic [10:0] HFRONT_PORCH = 11'd32,
  parameter logic [10:0] HSYNC        = 11'd192,
  parameter logic [10:0] HBACK_PORCH  = 11'd96,
  parameter logic [9:0]  VACTIVE      = 10'd480,
  parameter logic [9:0]  VFRONT_PORCH = 10'd10,
  parameter logic [9:0]  VSYNC        = 10'd2,
  parameter logic [9:0]  VBACK_PORCH  = 10'd33
) (
  input  logic        clk50,
  input  logic        reset,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        VGA_CLK,
  output logic        VGA_HS,
  output logic        VGA_VS,
  output logic        VGA_BLANK_n,
  output logic        VGA_SYNC_n
);
  localparam logic [10:0] HTOTAL = HACTIVE + HFRONT_PORCH + HSYNC + HBACK_PORCH;
  localparam logic [9:0]  VTOTAL = VACTIVE + VFRONT_PORCH + VSYNC + VBACK_PORCH;

  logic end_of_line, end_of_field;

  assign end_of_line  = (hcount == HTOTAL - 1'b1);
  assign end_of_field = (vcount == VTOTAL - 1'b1);

  always_ff @(posedge clk50) begin
    if (reset) begin
      hcount <= '0;
      vcount <= '0;
    end else begin
      hcount <= end_of_line ? '0 : hcount + 1'b1;
      if (end_of_line) vcount <= end_of_field ? '0 : vcount + 1'b1;
    end
  end

  assign VGA_HS      = !((hcount >= HACTIVE + HFRONT_PORCH) && (hcount < HACTIVE + HFRONT_PORCH + HSYNC));
  assign VGA_VS      = !((vcount >= VACTIVE + VFRONT_PORCH) && (vcount < VACTIVE + VFRONT_PORCH + VSYNC));
  assign VGA_BLANK_n = (hcount < HACTIVE) && (vcount < VACTIVE);
  assign VGA_SYNC_n  = 1'b0;
  assign VGA_CLK     = hcount[0];
endmodule
