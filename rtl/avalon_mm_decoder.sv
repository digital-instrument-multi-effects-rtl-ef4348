// avalon_mm_decoder: routes processor register accesses to the effect blocks.
//
// The processor reaches every block through one Avalon-MM bus with 16-bit
// registers spaced two bytes apart. This decoder compares the byte address with
// the fixed windows of the register map
//   0x0010-0x001f limiter    0x0020-0x002f delay     0x0100-0x013f biquad chain
//   0x1000-0x13ff FIR        0x2000-0x200f VGA user interface
// raises the chip select of the block whose window holds it, and gives the
// block the word address (byte offset / 2) within its window; the blocks take
// the bus's write and read strobes directly. Only one select is ever high. Purely combinational, so a
// write reaches the selected block's registers at the end of the same clock.
// The windows follow the design's register map; the decoder itself is the
// simplest circuit that implements it.
module avalon_mm_decoder
  import fx_pkg::*;
#(
  parameter int AW = 14
) (
  input  logic [AW-1:0] address,
  output logic          cs_lim,
  output logic          cs_dly,
  output logic          cs_biq,
  output logic          cs_fir,
  output logic          cs_vga,
  output logic [8:0]    word_addr
);
  function automatic logic in_win(input logic [AW-1:0] a, input logic [13:0] lo, input logic [13:0] hi);
    return (a >= AW'(lo)) && (a <= AW'(hi));
  endfunction

  logic [13:0] base;

  always_comb begin
    cs_lim = in_win(address, LIM_BASE, LIM_LAST);
    cs_dly = in_win(address, DLY_BASE, DLY_LAST);
    cs_biq = in_win(address, BIQ_BASE, BIQ_LAST);
    cs_fir = in_win(address, FIR_BASE, FIR_LAST);
    cs_vga = in_win(address, VGA_BASE, VGA_LAST);
    unique0 case (1'b1)
      cs_lim:  base = LIM_BASE;
      cs_dly:  base = DLY_BASE;
      cs_biq:  base = BIQ_BASE;
      cs_fir:  base = FIR_BASE;
      cs_vga:  base = VGA_BASE;
      default: base = '0;
    endcase
    word_addr = 9'((14'(address) - base) >> 1);
  end
endmodule
