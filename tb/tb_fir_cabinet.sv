// tb_fir_cabinet: full 500-tap filter. Checks the power-up coefficients (a
// one-sample delay), loads random coefficients over the coefficient port and
// reads them back, then streams random samples with random stalls and compares
// every output with a reference convolution (64-bit sum, >>15, clipped). Also
// checks an out-of-range coefficient address is ignored and that a result
// appears TAPS+3 clocks after its sample is accepted.
module tb_fir_cabinet;
  localparam int TAPS = 500;
  logic clk = 0, reset = 1;
  logic signed [15:0] ast_sink_data = 0, ast_source_data;
  logic ast_sink_valid = 0, ast_sink_ready, ast_source_valid, ast_source_ready = 0;
  logic [8:0] coeff_address = 0;
  logic coeff_write = 0, coeff_read = 0;
  logic [15:0] coeff_writedata = 0, coeff_readdata;
  logic coeff_readdatavalid;
  int checks = 0, failures = 0, n_sat = 0;
  longint h[TAPS];
  longint x[$];
  logic signed [15:0] expq[$];

  fir_cabinet #(.TAPS(TAPS)) dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!reset && ast_sink_valid && ast_sink_ready) begin
    longint acc;
    x.push_front(longint'(ast_sink_data));
    if (x.size() > TAPS) void'(x.pop_back());
    acc = 0;
    foreach (x[k]) acc += h[k] * x[k];
    acc = acc >>> 15;
    if (acc > 32767) begin acc = 32767; n_sat++; end
    if (acc < -32768) begin acc = -32768; n_sat++; end
    expq.push_back(16'(acc));
  end

  always @(posedge clk) if (!reset && ast_source_valid && ast_source_ready) begin
    checks++;
    if (expq.size() == 0) begin failures++; $display("FAIL spurious output"); end
    else if (ast_source_data !== expq.pop_front()) begin
      failures++; $display("FAIL output %0d at %0t", ast_source_data, $time);
    end
  end

  task automatic cwrite(input int a, input logic [15:0] d);
    coeff_address = 9'(a); coeff_writedata = d; coeff_write = 1;
    @(posedge clk);
    #1 coeff_write = 0;
    if (a < TAPS) h[a] = longint'($signed(d));
  endtask

  task automatic cread(input int a, input logic [15:0] e);
    coeff_address = 9'(a); coeff_read = 1;
    @(posedge clk);
    #1 coeff_read = 0;
    checks++;
    if (!coeff_readdatavalid || coeff_readdata !== e) begin
      failures++; $display("FAIL readback h[%0d] = %h", a, coeff_readdata);
    end
  endtask

  task automatic run(input int n, input int pv, input int pr, input int amp);
    int sent = 0;
    while (sent < n) begin
      ast_sink_valid   <= ($urandom_range(0, 99) < pv);
      ast_source_ready <= ($urandom_range(0, 99) < pr);
      ast_sink_data    <= 16'($signed(32'($urandom_range(0, 2 * amp)) - amp));
      @(posedge clk);
      if (ast_sink_valid && ast_sink_ready) sent++;
    end
    ast_sink_valid <= 0; ast_source_ready <= 1;
    repeat (TAPS + 10) @(posedge clk);
  endtask

  initial begin
    foreach (h[k]) h[k] = (k == 1) ? 32767 : 0;
    repeat (3) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    run(20, 50, 50, 32767);                      // power-up: one-sample delay
    cread(0, 16'h0000); cread(1, 16'h7fff);
    for (int k = 0; k < TAPS; k++) cwrite(k, 16'($urandom_range(0, 4000)) - 16'd2000);
    cwrite(TAPS + 3, 16'h1234);                  // ignored
    for (int k = 0; k < 10; k++) begin
      int a;
      a = $urandom_range(0, TAPS - 1);
      cread(a, 16'(h[a]));
    end
    cread(TAPS - 1, 16'(h[TAPS - 1]));
    run(150, 50, 50, 32767);
    // large coefficients: drive the sum into clipping
    for (int k = 0; k < TAPS; k++) cwrite(k, (k < 8) ? 16'sd30000 : 16'sd0);
    run(60, 50, 50, 32767);
    // latency: from acceptance to valid output
    begin
      int lat;
      ast_source_ready <= 1;
      ast_sink_valid <= 1;
      ast_sink_data <= 16'sd50;
      @(posedge clk);
      ast_sink_valid <= 0;
      lat = 0;
      do begin @(posedge clk); lat++; end while (!ast_source_valid && lat < 2 * TAPS);
      checks++;
      if (lat != TAPS + 3) begin failures++; $display("FAIL latency %0d", lat); end
    end
    repeat (10) @(posedge clk);
    checks += 2;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d outputs missing", expq.size()); end
    if (n_sat == 0) begin failures++; $display("FAIL clipping not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
