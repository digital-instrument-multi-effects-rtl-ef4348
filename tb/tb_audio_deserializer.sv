// tb_audio_deserializer: sends left-justified half-frames of random 16-bit
// words (with 8 extra bit clocks each) as edge strobes and checks every word,
// its channel flag and that exactly one word comes out per half-frame.
module tb_audio_deserializer;
  logic clk = 0, reset = 1;
  logic bclk_rise = 0, lrclk_rise = 0, lrclk_fall = 0, sdata = 0;
  logic [15:0] word;
  logic word_left, word_valid;
  int checks = 0, failures = 0;
  logic [15:0] exp_w[$];
  bit          exp_l[$];

  audio_deserializer #(.DW(16)) dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (word_valid) begin
    checks += 2;
    if (exp_w.size() == 0) begin failures += 2; $display("FAIL unexpected word"); end
    else begin
      if (word !== exp_w.pop_front()) begin failures++; $display("FAIL word %h", word); end
      if (word_left !== exp_l.pop_front()) begin failures++; $display("FAIL channel"); end
    end
  end

  task automatic half_frame(input bit left, input logic [15:0] w);
    exp_w.push_back(w); exp_l.push_back(left);
    @(posedge clk);
    lrclk_rise <= left; lrclk_fall <= !left;
    @(posedge clk);
    lrclk_rise <= 0; lrclk_fall <= 0;
    for (int b = 0; b < 24; b++) begin
      sdata <= (b < 16) ? w[15 - b] : 1'($urandom);
      repeat (3) @(posedge clk);
      bclk_rise <= 1;
      @(posedge clk);
      bclk_rise <= 0;
      repeat (3) @(posedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    half_frame(1, 16'h8001);
    half_frame(0, 16'h7ffe);
    for (int i = 0; i < 200; i++) half_frame(i % 2 == 0, 16'($urandom));
    repeat (10) @(posedge clk);
    checks++;
    if (exp_w.size() != 0) begin failures++; $display("FAIL %0d words missing", exp_w.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
