// vga_ball: the on-screen control panel of the effects unit.
//
// A 640x480 background picture (one byte per pixel) fills the screen; on top of
// it the controller draws, at positions software sets through Avalon-MM:
//   - the IR-preset selector, a 13x13 sprite at x = 40, y = register 1
//   - the delay bypass switch, a 38x20 sprite at (373, 139), showing the "off"
//     picture while register 0 bit 0 is 1 and the "on" picture otherwise
//   - six white slider knobs of 36x17 pixels at x = 187, 278, 324, 464, 510, 556
//     (clip, delay, mix, bass, mid, treble), y = registers 2..7
// Registers are 10-bit pixel rows taken from writedata[9:0]. Reset positions:
// selector 132, sliders 232, 289, 255, 150, 255, 150, bypass 1.
// Pixel bytes hold red in bits 2:0, green in 5:3 and blue in 7:6; they go to
// VGA_R[7:5], VGA_G[7:5], VGA_B[7:6], lower
// bits zero. Priority, highest first: knobs 1-6, selector, switch, background.
// Timing: vga_counters gives one pixel per two 50 MHz clocks; the ROMs answer one
// clock after their address and the colour registers add one more clock, which
// is within the same pixel for all but its first half.
// Geometry, register map, reset values and colour packing follow the design.
// The 10-bit register width is this design's choice (rows above 255 need it);
// the pictures are computed stand-ins (see image_rom).
module vga_ball #(
  parameter int BG_W = 640,
  parameter int BG_H = 480
) (
  input  logic        clk,
  input  logic        reset,
  input  logic [15:0] writedata,
  input  logic        write,
  input  logic        chipselect,
  input  logic [2:0]  address,
  output logic [7:0]  VGA_R,
  output logic [7:0]  VGA_G,
  output logic [7:0]  VGA_B,
  output logic        VGA_CLK,
  output logic        VGA_HS,
  output logic        VGA_VS,
  output logic        VGA_BLANK_n,
  output logic        VGA_SYNC_n
);
  localparam int SEL_W = 13, SEL_H = 13;
  localparam int SW_W  = 38, SW_H  = 20;
  localparam int KN_W  = 36, KN_H  = 17;
  localparam logic [9:0] SEL_X = 10'd40;
  localparam logic [9:0] SW_X  = 10'd373, SW_Y = 10'd139;
  localparam logic [9:0] KNOB_X [6] = '{10'd187, 10'd278, 10'd324, 10'd464, 10'd510, 10'd556};
  localparam logic [9:0] KNOB_Y0 [6] = '{10'd232, 10'd289, 10'd255, 10'd150, 10'd255, 10'd150};

  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        bypass;
  logic [9:0]  sel_y;
  logic [9:0]  knob_y [6];

  vga_counters u_counters (
    .clk50(clk), .reset, .hcount, .vcount,
    .VGA_CLK, .VGA_HS, .VGA_VS, .VGA_BLANK_n, .VGA_SYNC_n
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      bypass <= 1'b1;
      sel_y  <= 10'd132;
      for (int i = 0; i < 6; i++) knob_y[i] <= KNOB_Y0[i];
    end else if (chipselect && write) begin
      case (address)
        3'd0:    bypass <= writedata[0];
        3'd1:    sel_y  <= writedata[9:0];
        default: knob_y[int'(address) - 2] <= writedata[9:0];
      endcase
    end
  end

  logic [9:0] col;
  assign col = hcount[10:1];

  function automatic logic inside_box(input logic [9:0] x, input logic [9:0] y,
                                      input logic [9:0] bx, input logic [9:0] by,
                                      input int w, input int h);
    return (x >= bx) && (32'(x) < 32'(bx) + w) && (y >= by) && (32'(y) < 32'(by) + h);
  endfunction

  logic [$clog2(BG_W*BG_H+1)-1:0]   bg_addr;
  logic [$clog2(SEL_W*SEL_H+1)-1:0] sel_addr;
  logic [$clog2(SW_W*SW_H+1)-1:0]   sw_addr;
  logic [7:0] bg_px, sel_px, swon_px, swoff_px;

  assign bg_addr  = ($bits(bg_addr))'(32'(vcount) * BG_W + 32'(col));
  assign sel_addr = ($bits(sel_addr))'((32'(col) - 32'(SEL_X)) + (32'(vcount) - 32'(sel_y)) * SEL_W);
  assign sw_addr  = ($bits(sw_addr))'((32'(col) - 32'(SW_X)) + (32'(vcount) - 32'(SW_Y)) * SW_W);

  image_rom #(.W(BG_W),  .H(BG_H),  .PATTERN(0)) u_bg    (.clock(clk), .address(bg_addr),  .q(bg_px));
  image_rom #(.W(SEL_W), .H(SEL_H), .PATTERN(1)) u_sel   (.clock(clk), .address(sel_addr), .q(sel_px));
  image_rom #(.W(SW_W),  .H(SW_H),  .PATTERN(2)) u_swon  (.clock(clk), .address(sw_addr),  .q(swon_px));
  image_rom #(.W(SW_W),  .H(SW_H),  .PATTERN(3)) u_swoff (.clock(clk), .address(sw_addr),  .q(swoff_px));

  logic on_knob, on_sel, on_sw;
  always_comb begin
    on_knob = 1'b0;
    for (int i = 0; i < 6; i++)
      if (inside_box(col, vcount, KNOB_X[i], knob_y[i], KN_W, KN_H)) on_knob = 1'b1;
    on_sel = inside_box(col, vcount, SEL_X, sel_y, SEL_W, SEL_H);
    on_sw  = inside_box(col, vcount, SW_X, SW_Y, SW_W, SW_H);
  end

  function automatic logic [23:0] unpack(input logic [7:0] p);
    return {p[2:0], 5'b0, p[5:3], 5'b0, p[7:6], 6'b0};
  endfunction

  always_ff @(posedge clk) begin
    if (reset) begin
      {VGA_R, VGA_G, VGA_B} <= '0;
    end else if (!VGA_BLANK_n) begin
      {VGA_R, VGA_G, VGA_B} <= '0;
    end else if (on_knob) begin
      {VGA_R, VGA_G, VGA_B} <= {24{1'b1}};
    end else if (on_sel) begin
      {VGA_R, VGA_G, VGA_B} <= unpack(sel_px);
    end else if (on_sw) begin
      {VGA_R, VGA_G, VGA_B} <= unpack(bypass ? swoff_px : swon_px);
    end else begin
      {VGA_R, VGA_G, VGA_B} <= unpack(bg_px);
    end
  end
endmodule
