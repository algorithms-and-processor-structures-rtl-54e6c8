// dct_pkg: shared constants of the bit-serial 8-point DCT processor.
//
// Word sizes follow the processor's specification: 12-bit signed input
// words and 12-bit signed output words. The kernel coefficients are held
// as signed-digit (SD) sums of powers of two with 14 fractional bits, so a
// serial product stream carries x*C where C = round(coef * 2^14) is the SD
// value listed below. Frame timing (32 cycles per 1-D transform) is this
// design's own schedule of the 32-cycle rate the processor is specified for.
// The SD_* values document the coefficients and serve reference models;
// the hardware realises them as delay-line taps, so lint lists them unused.
package dct_pkg;

  localparam int unsigned DW      = 12;  // bus / input / output word width
  localparam int unsigned FRAC    = 14;  // fractional bits of the SD coefficients
  localparam int unsigned TAPS    = 14;  // delay-line taps 2^-14 .. 2^-1
  localparam int unsigned NPTS    = 8;   // transform length
  localparam int unsigned FRAME   = 32;  // clock cycles per 1-D DCT
  localparam int unsigned PHW     = 5;   // phase counter width

  // Frame phases (see dct_controller for the full schedule)
  localparam int unsigned PH_LOAD0   = 0;   // x(0) .. x(7) written at phases 0..7
  localparam int unsigned PH_STREAM0 = 8;   // serial stream cycle s = 0
  localparam int unsigned PH_OUT0    = 8;   // z(0) .. z(7) read at phases 8..15
  localparam int unsigned PRE_BITS   = 13;  // butterfly result width (12 + 1)
  localparam int unsigned CAP_FIRST  = FRAC;          // first captured stream bit (s = 14)
  localparam int unsigned CAP_LAST   = FRAC + DW - 1; // last captured stream bit  (s = 25)

  // Signed-digit coefficient values times 2^14 (Table of SD representations)
  //   a = 2^-1 - 2^-7 - 2^-9 + 2^-13
  //   b = 2^-1 - 2^-5 - 2^-7 + 2^-10
  //   c = 2^-2 + 2^-3 + 2^-5 + 2^-7 + 2^-9 - 2^-12
  //   d = 2^-2 + 2^-4 + 2^-5 + 2^-7 + 2^-9
  //   e = 2^-2 + 2^-5 - 2^-8 + 2^-11
  //   f = 2^-3 + 2^-4 + 2^-8 - 2^-14
  //   g = 2^-4 + 2^-5 + 2^-8 - 2^-13
  localparam int SD_A = 8034;
  localparam int SD_B = 7568;
  localparam int SD_C = 6812;
  localparam int SD_D = 5792;
  localparam int SD_E = 4552;
  localparam int SD_F = 3135;
  localparam int SD_G = 1598;

endpackage
