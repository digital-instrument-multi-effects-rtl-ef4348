// tb_limiter: checks the reset thresholds (+-1000), then random thresholds
// written over Avalon-MM, and the soft_on-clip mode with low-pass coefficients
// loaded into registers 3-7. Outputs are compared with a reference clipper
// followed by a reference biquad (or nothing when soft_on clip is off), under random
// valid/ready stalls; counts how many samples were clipped each way and checks
// the two-clock latency.
module tb_limiter;
  logic clk = 0, reset = 1;
  logic signed [15:0] ast_sink_data = 0, ast_source_data;
  logic ast_sink_valid = 0, ast_sink_ready, ast_source_valid, ast_source_ready = 0;
  logic [2:0] address = 0;
  logic chipselect = 0, write = 0;
  logic [15:0] writedata = 0;
  int checks = 0, failures = 0, n_hi = 0, n_lo = 0;
  longint tp, tn, c[5], x1, x2, y1, y2;
  bit soft_on;
  logic signed [15:0] expq[$];

  limiter dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint clip16(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  always @(posedge clk) if (!reset && ast_sink_valid && ast_sink_ready) begin
    longint h, y;
    h = ast_sink_data;
    if (h > tp) begin h = tp; n_hi++; end
    else if (h < tn) begin h = tn; n_lo++; end
    y = clip16((c[0] * h + c[1] * x1 + c[2] * x2 - c[3] * y1 - c[4] * y2) >>> 12);
    x2 = x1; x1 = h; y2 = y1; y1 = y;
    expq.push_back(16'(soft_on ? y : h));
  end

  always @(posedge clk) if (!reset && ast_source_valid && ast_source_ready) begin
    checks++;
    if (expq.size() == 0) begin failures++; $display("FAIL spurious output"); end
    else if (ast_source_data !== expq.pop_front()) begin
      failures++; $display("FAIL output %0d at %0t", ast_source_data, $time);
    end
  end

  task automatic mm_write(input int a, input logic [15:0] d);
    address <= 3'(a); writedata <= d; chipselect <= 1; write <= 1;
    @(posedge clk);
    chipselect <= 0; write <= 0;
    @(posedge clk);
    case (a)
      0: tp = longint'($signed(d));
      1: tn = longint'($signed(d));
      2: soft_on = d[0];
      default: c[a - 3] = longint'($signed(d));
    endcase
  endtask

  task automatic run(input int n, input int pv, input int pr);
    for (int i = 0; i < n; i++) begin
      ast_sink_valid   <= ($urandom_range(0, 99) < pv);
      ast_source_ready <= ($urandom_range(0, 99) < pr);
      ast_sink_data    <= 16'($urandom);
      @(posedge clk);
    end
    ast_sink_valid <= 0; ast_source_ready <= 1;
    repeat (6) @(posedge clk);
  endtask

  initial begin
    tp = 1000; tn = -1000; soft_on = 0;
    c[0] = 4096; c[1] = 0; c[2] = 0; c[3] = 0; c[4] = 0;
    x1 = 0; x2 = 0; y1 = 0; y2 = 0;
    repeat (3) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    run(300, 60, 60);
    for (int t = 0; t < 10; t++) begin
      mm_write(0, 16'($urandom_range(0, 30000)));
      mm_write(1, -16'($urandom_range(0, 30000)));
      run(150, 70, 70);
    end
    // soft_on clip: low-pass b = (1/4, 1/2, 1/4), a1 = -0.5, a2 = 0.125
    mm_write(0, 16'd8000);
    mm_write(1, -16'd6000);
    mm_write(3, 16'd1024); mm_write(4, 16'd2048); mm_write(5, 16'd1024);
    mm_write(6, -16'd2048); mm_write(7, 16'd512);
    mm_write(2, 16'd1);
    run(400, 70, 70);
    mm_write(2, 16'd0);
    run(100, 70, 70);
    begin
      int lat;
      ast_source_ready <= 1;
      ast_sink_valid <= 1;
      ast_sink_data <= 16'sd100;
      @(posedge clk);
      ast_sink_valid <= 0;
      lat = 0;
      do begin @(posedge clk); lat++; end while (!ast_source_valid && lat < 20);
      checks++;
      if (lat != 2) begin failures++; $display("FAIL latency %0d", lat); end
    end
    repeat (6) @(posedge clk);
    checks += 3;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d outputs missing", expq.size()); end
    if (n_hi == 0) begin failures++; $display("FAIL no positive clipping exercised"); end
    if (n_lo == 0) begin failures++; $display("FAIL no negative clipping exercised"); end
    $display("clipped high %0d, low %0d", n_hi, n_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
