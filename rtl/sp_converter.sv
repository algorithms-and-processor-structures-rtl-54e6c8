// sp_converter: serial-to-parallel output registers.
//
// Eight 12-bit shift registers, one per transform output. While `shift`
// is high each takes its serial input into the MSB and shifts right, so
// after 12 shifts a register holds the 12 stream bits seen, the first one
// in its LSB. The controller shifts during stream bits 14..25, which keeps
// the integer part of z (the product streams carry 14 fractional bits):
// the result is floor(z) taken modulo 2^12. Between captures the registers
// hold their value for the output multiplexer.
module sp_converter
  import dct_pkg::*;
(
  input  logic                  clk,
  input  logic                  shift,
  input  logic [NPTS-1:0]       zs,     // serial z(0)..z(7)
  output logic signed [DW-1:0]  z [NPTS]
);
  always_ff @(posedge clk)
    if (shift)
      for (int i = 0; i < NPTS; i++) z[i] <= {zs[i], z[i][DW-1:1]};

endmodule
