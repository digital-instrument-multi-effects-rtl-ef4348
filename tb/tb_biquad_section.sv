// tb_biquad_section: random samples, random Q4.12 coefficients and random
// valid/ready stalls. Every accepted sample is run through a reference model
// of the difference equation (64-bit arithmetic, >>12, clip to 16 bits) and the
// outputs must match in order. Also checks bypass, the one-clock latency and
// one-sample-per-clock throughput when nothing stalls.
module tb_biquad_section;
  logic clk = 0, reset = 1;
  logic signed [15:0] sink_data = 0, source_data;
  logic sink_valid = 0, sink_ready, source_valid, source_ready = 0;
  logic signed [15:0] b0, b1, b2, a1, a2;
  logic bypass = 0;
  int checks = 0, failures = 0;
  longint x1, x2, y1, y2;
  logic signed [15:0] expq[$];

  biquad_section dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [15:0] clip(input longint v);
    if (v > 32767) return 16'sh7fff;
    if (v < -32768) return 16'sh8000;
    return 16'(v);
  endfunction

  // reference model, advanced on each accepted input
  always @(posedge clk) if (!reset && sink_valid && sink_ready) begin
    longint acc, y;
    acc = longint'(b0) * sink_data + longint'(b1) * x1 + longint'(b2) * x2
        - longint'(a1) * y1 - longint'(a2) * y2;
    y = clip(acc >>> 12);
    expq.push_back(bypass ? sink_data : 16'(y));
    x2 = x1; x1 = sink_data; y2 = y1; y1 = y;
  end

  always @(posedge clk) if (!reset && source_valid && source_ready) begin
    checks++;
    if (expq.size() == 0) begin failures++; $display("FAIL spurious output"); end
    else if (source_data !== expq.pop_front()) begin
      failures++; $display("FAIL output %0d at %0t", source_data, $time);
    end
  end

  task automatic run(input int n, input int pv, input int pr, input int amp);
    for (int i = 0; i < n; i++) begin
      sink_valid   <= ($urandom_range(0, 99) < pv);
      source_ready <= ($urandom_range(0, 99) < pr);
      sink_data    <= 16'($signed(32'($urandom_range(0, 2 * amp)) - amp));
      @(posedge clk);
    end
    sink_valid <= 0; source_ready <= 1;
    repeat (5) @(posedge clk);
  endtask

  initial begin
    x1 = 0; x2 = 0; y1 = 0; y2 = 0;
    b0 = 16'sd4096; b1 = 0; b2 = 0; a1 = 0; a2 = 0;
    repeat (3) @(posedge clk);
    reset <= 0;
    // low-pass-like fixed filter (b = 1/4, 1/2, 1/4; a1 = -1.0, a2 = 0.25)
    b0 = 1024; b1 = 2048; b2 = 1024; a1 = -4096; a2 = 1024;
    run(500, 70, 70, 20000);
    // random coefficients, including ones that overflow and clip
    for (int t = 0; t < 20; t++) begin
      b0 = 16'($urandom_range(0, 16383)) - 16'sd8192;
      b1 = 16'($urandom_range(0, 16383)) - 16'sd8192;
      b2 = 16'($urandom_range(0, 16383)) - 16'sd8192;
      a1 = 16'($urandom_range(0, 16383)) - 16'sd8192;
      a2 = 16'($urandom_range(0, 8191)) - 16'sd4096;
      run(100, 60, 60, 32767);
    end
    bypass = 1;
    run(200, 60, 60, 32767);
    bypass = 0;
    // latency and throughput with no stalls
    begin
      int t_in, n_out;
      source_ready <= 1;
      @(posedge clk);
      sink_valid <= 1;
      sink_data <= 100;
      @(posedge clk);
      t_in = 0;
      n_out = 0;
      for (int i = 0; i < 20; i++) begin
        #1;
        if (i == 0) begin checks++; if (!source_valid) begin failures++; $display("FAIL latency"); end end
        if (source_valid) n_out++;
        @(posedge clk);
      end
      sink_valid <= 0;
      checks++;
      if (n_out != 20) begin failures++; $display("FAIL throughput %0d", n_out); end
    end
    repeat (5) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d outputs missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
