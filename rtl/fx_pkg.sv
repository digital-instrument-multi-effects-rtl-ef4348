// fx_pkg: types and constants shared by the guitar multi-effects datapath.
//
// Audio samples are 16-bit signed integers (two's complement), the format the
// codec delivers in 16-bit left-justified mode. All effect registers are 16 bits
// wide and sit two bytes apart on the processor bus, so a block's word address
// is (byte address - window base) / 2. The window bases below are the register
// map of the processor interface; the saturating helper is shared by every
// arithmetic block so that overflow clips instead of wrapping.
package fx_pkg;

  typedef logic signed [15:0] sample_t;
  typedef logic signed [15:0] coef_t;

  localparam int SAMPLE_W = 16;

  // Byte-address windows of the register blocks (base, last byte).
  localparam logic [13:0] LIM_BASE   = 14'h0010;
  localparam logic [13:0] LIM_LAST   = 14'h001f;
  localparam logic [13:0] DLY_BASE   = 14'h0020;
  localparam logic [13:0] DLY_LAST   = 14'h002f;
  localparam logic [13:0] BIQ_BASE   = 14'h0100;
  localparam logic [13:0] BIQ_LAST   = 14'h013f;
  localparam logic [13:0] FIR_BASE   = 14'h1000;
  localparam logic [13:0] FIR_LAST   = 14'h13ff;
  localparam logic [13:0] VGA_BASE   = 14'h2000;
  localparam logic [13:0] VGA_LAST   = 14'h200f;

  // Clip a wide signed value to the 16-bit sample range.
  function automatic sample_t sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sh7fff;
    else if (v < -48'sd32768) return 16'sh8000;
    else                      return v[15:0];
  endfunction

endpackage
