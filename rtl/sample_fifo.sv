// sample_fifo: synchronous first-in first-out buffer for audio samples.
//
// Holds up to DEPTH words of DW bits in a circular array with separate read and
// write pointers and a fill counter. The write side accepts a word when
// in_valid and in_ready are both high; in_ready is low while the FIFO is full,
// so a producer that cannot wait (the serial input) loses that word. The read
// side is first-word-fall-through: out_data shows the oldest word whenever
// out_valid is high, and it is removed on a cycle with out_valid and out_ready.
// A push and a pop in the same cycle leave the count unchanged. Depth 128 is the
// size of the input FIFOs in the design's memory budget; the full/empty policy is
// this design's own choice.
module sample_fifo #(
  parameter int DW    = 16,
  parameter int DEPTH = 128
) (
  input  logic                       clk,
  input  logic                       reset,
  input  logic [DW-1:0]              in_data,
  input  logic                       in_valid,
  output logic                       in_ready,
  output logic [DW-1:0]              out_data,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic push, pop;

  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // Nothing may leave an empty FIFO or enter a full one.
  a_no_underflow: assert property (@(posedge clk) disable iff (reset) pop |-> count != '0);
  a_no_overflow:  assert property (@(posedge clk) disable iff (reset) push |-> count != DEPTH[$clog2(DEPTH+1)-1:0]);
endmodule
