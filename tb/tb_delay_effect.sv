// tb_delay_effect: checks y[n] = x[n]/2 + x[n-L]*MIX/2^16 (clipped) against a
// reference history, at the reset settings (L = 6000, MIX = 30000) for longer
// than one delay, then at random lengths and mixes (including L = 0, clamped to
// 1, and L above the buffer size), random stalls, a change of L while running,
// and bypass. Also checks the one-clock latency.
module tb_delay_effect;
  localparam int DEPTH = 8192;
  logic clk = 0, reset = 1;
  logic signed [15:0] avalon_sink_data = 0, avalon_source_data;
  logic avalon_sink_valid = 0, avalon_sink_ready, avalon_source_valid, avalon_source_ready = 0;
  logic [2:0] address = 0;
  logic chipselect = 0, write = 0;
  logic [15:0] writedata = 0;
  int checks = 0, failures = 0, n_echo = 0;
  longint hist[$];       // all accepted inputs, oldest first
  int L, wp;
  longint ring[DEPTH];
  longint mix;
  bit byp;
  logic signed [15:0] expq[$];

  delay_effect #(.DEPTH(DEPTH)) dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint clip16(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  // reference: a ring of the effective length, as a software delay line
  always @(posedge clk) if (!reset && avalon_sink_valid && avalon_sink_ready) begin
    longint x, wet;
    int le;
    le = (L == 0) ? 1 : (L > DEPTH) ? DEPTH : L;
    x = avalon_sink_data;
    wet = ring[wp];
    ring[wp] = x;
    wp = (wp + 1 >= le) ? 0 : wp + 1;
    if (wet != 0) n_echo++;
    expq.push_back(16'(byp ? x : clip16(((x * 16384) >>> 15) + ((wet * mix) >>> 16))));
  end

  always @(posedge clk) if (!reset && avalon_source_valid && avalon_source_ready) begin
    checks++;
    if (expq.size() == 0) begin failures++; $display("FAIL spurious output"); end
    else if (avalon_source_data !== expq.pop_front()) begin
      failures++; $display("FAIL output %0d at %0t", avalon_source_data, $time);
    end
  end

  task automatic mm_write(input int a, input logic [15:0] d);
    address <= 3'(a); writedata <= d; chipselect <= 1; write <= 1;
    @(posedge clk);
    chipselect <= 0; write <= 0;
    @(posedge clk);
    case (a)
      0: byp = (d != 0);
      1: L = d;
      2: mix = longint'($signed(d));
      default: ;
    endcase
  endtask

  task automatic run(input int n, input int pv, input int pr);
    for (int i = 0; i < n; i++) begin
      avalon_sink_valid   <= ($urandom_range(0, 99) < pv);
      avalon_source_ready <= ($urandom_range(0, 99) < pr);
      avalon_sink_data    <= 16'($urandom);
      @(posedge clk);
    end
    avalon_sink_valid <= 0; avalon_source_ready <= 1;
    repeat (4) @(posedge clk);
  endtask

  initial begin
    L = 6000; mix = 30000; byp = 0; wp = 0;
    foreach (ring[i]) ring[i] = 0;
    repeat (3) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    run(16000, 90, 90);                  // more than one full delay at reset settings
    mm_write(1, 16'd37); mm_write(2, -16'd20000);
    run(1000, 70, 70);
    mm_write(1, 16'd5);                  // shorter than the current pointer
    run(300, 70, 70);
    mm_write(1, 16'd0);
    run(100, 70, 70);
    mm_write(1, 16'd60000);              // above DEPTH: clamped
    run(300, 70, 70);
    mm_write(1, 16'd3); mm_write(2, 16'd32767);
    mm_write(0, 16'd1);
    run(200, 70, 70);
    mm_write(0, 16'd0);
    run(200, 70, 70);
    begin
      int lat;
      avalon_source_ready <= 1;
      avalon_sink_valid <= 1;
      avalon_sink_data <= 16'sd100;
      @(posedge clk);
      avalon_sink_valid <= 0;
      lat = 0;
      do begin @(posedge clk); lat++; end while (!avalon_source_valid && lat < 20);
      checks++;
      if (lat != 1) begin failures++; $display("FAIL latency %0d", lat); end
    end
    repeat (4) @(posedge clk);
    checks += 2;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d outputs missing", expq.size()); end
    if (n_echo == 0) begin failures++; $display("FAIL no echo exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
