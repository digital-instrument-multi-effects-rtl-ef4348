// tb_biquad_chain: checks the reset state (unit gain, bypassed), then programs
// all 20 coefficients and the bypass register over Avalon-MM with random
// values and streams random samples with random stalls through the four
// sections, comparing with a reference cascade of four direct-form-I sections.
// Also checks that the register map puts each coefficient in the right place
// (a write to one section changes only that section) and the 4-clock latency.
module tb_biquad_chain;
  logic clk = 0, reset = 1;
  logic signed [15:0] avalon_sink_data = 0, avalon_source_data;
  logic avalon_sink_valid = 0, avalon_sink_ready, avalon_source_valid, avalon_source_ready = 0;
  logic [4:0] address = 0;
  logic chipselect = 0, write = 0;
  logic [15:0] writedata = 0;
  int checks = 0, failures = 0;
  longint c [4][5];
  longint st [4][4];   // x1 x2 y1 y2 per section
  bit byp;
  logic signed [15:0] expq[$];

  biquad_chain dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint clip(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  always @(posedge clk) if (!reset && avalon_sink_valid && avalon_sink_ready) begin
    longint x, y;
    x = avalon_sink_data;
    for (int s = 0; s < 4; s++) begin
      y = clip((c[s][0] * x + c[s][1] * st[s][0] + c[s][2] * st[s][1]
               - c[s][3] * st[s][2] - c[s][4] * st[s][3]) >>> 12);
      st[s][1] = st[s][0]; st[s][0] = x; st[s][3] = st[s][2]; st[s][2] = y;
      x = byp ? x : y;
    end
    expq.push_back(16'(x));
  end

  always @(posedge clk) if (!reset && avalon_source_valid && avalon_source_ready) begin
    checks++;
    if (expq.size() == 0) begin failures++; $display("FAIL spurious output"); end
    else if (avalon_source_data !== expq.pop_front()) begin
      failures++; $display("FAIL output %0d at %0t", avalon_source_data, $time);
    end
  end

  task automatic mm_write(input int a, input logic [15:0] d);
    address <= 5'(a); writedata <= d; chipselect <= 1; write <= 1;
    @(posedge clk);
    chipselect <= 0; write <= 0;
    @(posedge clk);
    if (a == 20) byp = d[0]; else if (a < 20) c[a / 5][a % 5] = longint'($signed(d));
  endtask

  task automatic run(input int n, input int pv, input int pr);
    for (int i = 0; i < n; i++) begin
      avalon_sink_valid   <= ($urandom_range(0, 99) < pv);
      avalon_source_ready <= ($urandom_range(0, 99) < pr);
      avalon_sink_data    <= 16'($urandom);
      @(posedge clk);
    end
    avalon_sink_valid <= 0; avalon_source_ready <= 1;
    repeat (8) @(posedge clk);
  endtask

  initial begin
    for (int s = 0; s < 4; s++) begin
      for (int k = 0; k < 5; k++) c[s][k] = (k == 0) ? 4096 : 0;
      for (int k = 0; k < 4; k++) st[s][k] = 0;
    end
    byp = 1;
    repeat (3) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    run(200, 60, 60);                        // reset state: bypassed
    mm_write(20, 0);
    run(200, 60, 60);                        // unit gain sections
    for (int t = 0; t < 10; t++) begin
      for (int a = 0; a < 20; a++)
        mm_write(a, (a % 5 == 0) ? 16'($urandom_range(1024, 6144)) :
                    (a % 5 == 4) ? 16'($urandom_range(0, 2048)) - 16'd1024 :
                                   16'($urandom_range(0, 4095)) - 16'd2048);
      run(150, 70, 70);
    end
    // one section at a time: section 3 gain 1/2, others unit
    for (int a = 0; a < 20; a++) mm_write(a, (a % 5 == 0) ? 16'd4096 : 16'd0);
    mm_write(10, 16'd2048);
    run(100, 80, 80);
    mm_write(20, 1);
    run(100, 80, 80);
    mm_write(20, 0);
    // latency: 4 clocks from acceptance to output
    begin
      int lat;
      avalon_source_ready <= 1;
      avalon_sink_valid <= 1;
      avalon_sink_data <= 16'sd1000;
      @(posedge clk);
      avalon_sink_valid <= 0;
      lat = 0;
      do begin @(posedge clk); lat++; end while (!avalon_source_valid && lat < 20);
      checks++;
      if (lat != 4) begin failures++; $display("FAIL latency %0d", lat); end
    end
    repeat (8) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d outputs missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
