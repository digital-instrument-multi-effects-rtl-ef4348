// tb_sample_fifo: random pushes and pops against a queue model; checks data
// order, the full flag at DEPTH words, the empty flag and the fill count.
module tb_sample_fifo;
  localparam int DEPTH = 128;
  logic clk = 0, reset = 1;
  logic [15:0] in_data, out_data;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [7:0] count;
  int checks = 0, failures = 0;
  logic [15:0] q[$];
  bit saw_full = 0;

  sample_fifo #(.DW(16), .DEPTH(DEPTH)) dut (.*);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_data = 0;
    repeat (3) @(posedge clk);
    reset <= 0;
    for (int phase = 0; phase < 3; phase++) begin
      for (int i = 0; i < 2000; i++) begin
        // phase 0: mostly push (fills up), 1: mostly pop, 2: balanced
        in_valid  <= ($urandom_range(0, 99) < (phase == 0 ? 90 : phase == 1 ? 10 : 50));
        out_ready <= ($urandom_range(0, 99) < (phase == 0 ? 10 : phase == 1 ? 90 : 50));
        in_data   <= 16'($urandom);
        @(posedge clk);
        #1;
        check(count == 8'(q.size()), "count");
        check(in_ready == (q.size() < DEPTH), "full flag");
        check(out_valid == (q.size() > 0), "empty flag");
        if (out_valid) check(out_data == q[0], "data order");
      end
    end
    in_valid <= 0; out_ready <= 0;
    @(posedge clk);
    check(saw_full, "FIFO reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // queue model, updated at the clock edge with the same handshake
  always @(posedge clk) if (!reset) begin
    if (out_valid && out_ready) void'(q.pop_front());
    if (in_valid && in_ready) q.push_back(in_data);
    if (q.size() == DEPTH) saw_full = 1;
  end
endmodule
