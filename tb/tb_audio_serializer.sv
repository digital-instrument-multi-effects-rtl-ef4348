// tb_audio_serializer: plays the codec's side. Each half-frame starts with an
// LRCLK edge strobe together with a BCLK falling strobe, then 31 more bit
// clocks; sdata is sampled where the codec would sample it (just before each
// BCLK falling strobe, i.e. at the rising edge) and the 16 bits must equal the
// word offered for that channel, followed by zeros. Also checks the load strobes.
module tb_audio_serializer;
  logic clk = 0, reset = 1;
  logic bclk_fall = 0, lrclk_rise = 0, lrclk_fall = 0;
  logic [15:0] left_word = 0, right_word = 0;
  logic load_left, load_right, sdata;
  int checks = 0, failures = 0;
  int loads_l = 0, loads_r = 0;

  audio_serializer #(.DW(16)) dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (load_left) loads_l++;
    if (load_right) loads_r++;
  end

  task automatic half_frame(input bit left, input logic [15:0] w);
    logic [31:0] got;
    if (left) left_word <= w; else right_word <= w;
    @(posedge clk);
    lrclk_rise <= left; lrclk_fall <= !left; bclk_fall <= 1;
    @(posedge clk);
    lrclk_rise <= 0; lrclk_fall <= 0; bclk_fall <= 0;
    left_word <= 16'($urandom); right_word <= 16'($urandom);  // must have been latched
    for (int b = 0; b < 32; b++) begin
      repeat (4) @(posedge clk);
      #1 got[31 - b] = sdata;               // codec samples here (BCLK rising)
      repeat (3) @(posedge clk);
      if (b != 31) begin
        bclk_fall <= 1;
        @(posedge clk);
        bclk_fall <= 0;
      end
    end
    checks += 2;
    if (got[31:16] !== w) begin failures++; $display("FAIL word %h got %h", w, got[31:16]); end
    if (got[15:0] !== 16'h0) begin failures++; $display("FAIL trailing bits %h", got[15:0]); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    for (int i = 0; i < 300; i++) half_frame(i % 2 == 0, (i < 2) ? 16'h8001 : 16'($urandom));
    checks += 2;
    if (loads_l != 150) begin failures++; $display("FAIL left loads %0d", loads_l); end
    if (loads_r != 150) begin failures++; $display("FAIL right loads %0d", loads_r); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
