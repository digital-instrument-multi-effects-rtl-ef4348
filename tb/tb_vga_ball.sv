// tb_vga_ball: draws two whole frames and checks every visible pixel against
// an independent model of the panel: six 36x17 white knobs at fixed columns and
// register-set rows, the 13x13 selector at column 40, the 38x20 switch at
// (373, 139) showing the "off" picture while bypass is 1, the background
// elsewhere, black while blanked. The stand-in pictures are recomputed here
// from their formulas. Frame 1 uses the reset positions; frame 2 uses new
// positions and bypass = 0 written over Avalon-MM. Each pixel is checked on the
// second of its two clocks, when the picture ROMs have answered for it.
module tb_vga_ball;
  logic clk = 0, reset = 1;
  logic [15:0] writedata = 0;
  logic write = 0, chipselect = 0;
  logic [2:0] address = 0;
  logic [7:0] VGA_R, VGA_G, VGA_B;
  logic VGA_CLK, VGA_HS, VGA_VS, VGA_BLANK_n, VGA_SYNC_n;
  int checks = 0, failures = 0, n_knob = 0, n_sel = 0, n_sw = 0, n_bg = 0;
  int knob_x[6] = '{187, 278, 324, 464, 510, 556};
  int knob_y[6];
  int sel_y;
  bit bypass;
  int ph, pv;
  bit pblank;

  vga_ball dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] bg(input int x, input int y);
    return 8'((y * 8 / 480) * 32 + (x * 8 / 640) * 4 + 2);
  endfunction
  function automatic logic [7:0] seldot(input int x, input int y);
    int dx = 2 * x - 12, dy = 2 * y - 12;
    return (dx * dx + dy * dy <= 169) ? 8'h00 : 8'hb6;
  endfunction
  function automatic logic [7:0] swpic(input int x, input bit on);
    return (on ? (x >= 19) : (x < 19)) ? 8'hff : 8'h13;
  endfunction
  function automatic logic [23:0] rgb(input logic [7:0] p);
    return {p[2:0], 5'b0, p[5:3], 5'b0, p[7:6], 6'b0};
  endfunction

  function automatic logic [23:0] expected(input int x, input int y);
    for (int i = 0; i < 6; i++)
      if (x >= knob_x[i] && x < knob_x[i] + 36 && y >= knob_y[i] && y < knob_y[i] + 17) begin
        n_knob++; return 24'hffffff;
      end
    if (x >= 40 && x < 53 && y >= sel_y && y < sel_y + 13) begin
      n_sel++; return rgb(seldot(x - 40, y - sel_y));
    end
    if (x >= 373 && x < 411 && y >= 139 && y < 159) begin
      n_sw++; return rgb(swpic(x - 373, !bypass));
    end
    n_bg++;
    return rgb(bg(x, y));
  endfunction

  bit checking = 0;
  always @(posedge clk) begin
    if (checking && ph[0] == 1'b1) begin
      logic [23:0] e;
      e = pblank ? expected(ph >> 1, pv) : 24'h0;
      checks++;
      if ({VGA_R, VGA_G, VGA_B} !== e) begin
        failures++;
        if (failures < 10) $display("FAIL pixel (%0d,%0d) got %h want %h", ph >> 1, pv, {VGA_R, VGA_G, VGA_B}, e);
      end
    end
    ph = int'(dut.hcount); pv = int'(dut.vcount); pblank = (ph < 1280) && (pv < 480);
  end

  task automatic mm_write(input int a, input int d);
    @(negedge clk);
    address = 3'(a); writedata = 16'(d); chipselect = 1; write = 1;
    @(negedge clk);
    chipselect = 0; write = 0;
  endtask

  initial begin
    knob_y = '{232, 289, 255, 150, 255, 150};
    sel_y = 132; bypass = 1;
    repeat (3) @(posedge clk);
    reset <= 0;
    wait (dut.hcount == 0 && dut.vcount == 0);
    @(negedge clk);
    checking = 1;
    wait (dut.hcount == 1599 && dut.vcount == 524);
    checking = 0;
    mm_write(0, 0); bypass = 0;
    mm_write(1, 245); sel_y = 245;
    for (int i = 0; i < 6; i++) begin
      knob_y[i] = 146 + 20 * i;
      mm_write(2 + i, knob_y[i]);
    end
    wait (dut.hcount == 0 && dut.vcount == 0);
    @(negedge clk);
    checking = 1;
    wait (dut.hcount == 1599 && dut.vcount == 524);
    @(posedge clk);
    checking = 0;
    checks += 4;
    if (n_knob == 0) failures++;
    if (n_sel == 0) failures++;
    if (n_sw == 0) failures++;
    if (n_bg == 0) failures++;
    $display("pixels: knob %0d selector %0d switch %0d background %0d", n_knob, n_sel, n_sw, n_bg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
