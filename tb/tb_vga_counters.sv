// tb_vga_counters: runs two whole frames and measures, independently of the
// counters, the line length (1600 clocks), frame length (525 lines), HSYNC low
// width (192 clocks) and its position after 1280 + 32 clocks of each line,
// VSYNC low for 2 lines, 1280 x 480 visible clocks per frame, VGA_CLK at half
// the clock rate and VGA_SYNC_n held low.
module tb_vga_counters;
  logic clk50 = 0, reset = 1;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic VGA_CLK, VGA_HS, VGA_VS, VGA_BLANK_n, VGA_SYNC_n;
  int checks = 0, failures = 0;

  vga_counters dut (.*);

  always #10 clk50 = ~clk50;

  initial begin
    repeat (3000000) @(posedge clk50);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int t, hs_fall, hs_low, vs_low_clocks, visible, lines, last_hs_fall, period, h0;
    logic prev_hs, prev_clk;
    repeat (3) @(posedge clk50);
    reset <= 0;
    @(posedge clk50);
    #1;
    check(hcount == 1 && vcount == 0, "counting starts from 0 at the first clock after reset");
    h0 = 1;
    for (int f = 0; f < 2; f++) begin
      hs_low = 0; vs_low_clocks = 0; visible = 0; lines = 0; last_hs_fall = -1;
      prev_hs = VGA_HS; prev_clk = VGA_CLK;
      for (t = 0; t < 1600 * 525; t++) begin
        if (!VGA_HS) hs_low++;
        if (!VGA_VS) vs_low_clocks++;
        if (VGA_BLANK_n) visible++;
        if (prev_hs && !VGA_HS) begin
          lines++;
          if (f == 0 && lines == 1) check(((t + h0) % 1600) == 1280 + 32, "HSYNC starts after active + front porch");
          if (last_hs_fall >= 0) begin
            period = t - last_hs_fall;
            if (period != 1600) check(0, "line length");
          end
          last_hs_fall = t;
        end
        if (t > 0 && VGA_CLK == prev_clk) check(0, "VGA_CLK toggles every clock");
        if (VGA_SYNC_n) check(0, "SYNC_n low");
        prev_hs = VGA_HS; prev_clk = VGA_CLK;
        @(posedge clk50);
        #1;
      end
      check(hcount == 11'(h0) && vcount == 0, "frame is 1600 x 525 clocks");
      check(lines == 525, "525 HSYNC pulses per frame");
      check(hs_low == 525 * 192, "HSYNC low 192 clocks per line");
      check(vs_low_clocks == 2 * 1600, "VSYNC low for 2 lines");
      check(visible == 1280 * 480, "visible area 1280 x 480 clocks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
