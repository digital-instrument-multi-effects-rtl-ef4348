// image_rom: a read-only picture of W x H pixels, one byte per pixel (blue in
// bits 7:6, green in 5:3, red in 2:0), read synchronously (data one clock after address).
//
// The user interface draws a background picture and small sprites from on-chip
// ROMs of exactly these sizes. The artwork itself is not part of this RTL, so
// each ROM is filled at start-up with a simple computed stand-in chosen by
// PATTERN, drawn with the same geometry:
//   0  background: 8 x 8 tiles of colour, tile colour = row*32 + column*4 + 2
//   1  selector dot: dark disc of radius W/2 on light grey
//   2  switch on: blue track with a white knob on the right half
//   3  switch off: blue track with a white knob on the left half
// Replace the initial block with $readmemh of real artwork to use images.
// Addresses at or beyond W*H read as 0.
module image_rom #(
  parameter int W       = 13,
  parameter int H       = 13,
  parameter int PATTERN = 1
) (
  input  logic                       clock,
  input  logic [$clog2(W*H+1)-1:0]   address,
  output logic [7:0]                 q
);
  localparam int N = W * H;

  logic [7:0] mem [N];

  function automatic logic [7:0] pixel(input int x, input int y);
    int dx, dy;
    case (PATTERN)
      0: return 8'((y * 8 / H) * 32 + (x * 8 / W) * 4 + 2);
      1: begin
        dx = 2 * x - (W - 1);
        dy = 2 * y - (H - 1);
        return (dx * dx + dy * dy <= W * W) ? 8'h00 : 8'hb6;
      end
      2: return (x >= W / 2) ? 8'hff : 8'h13;
      default: return (x < W / 2) ? 8'hff : 8'h13;
    endcase
  endfunction

  initial begin
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        mem[y * W + x] = pixel(x, y);
  end

  always_ff @(posedge clock) begin
    q <= (32'(address) < N) ? mem[address] : 8'h00;
  end
endmodule
