// ps_converter: input buffers merged with the parallel-to-serial registers.
//
// Eight 12-bit registers. While the bus is loading, the logic controller
// writes word x(i) into register i (wr_en, wr_sel). While `shift` is high
// every register shifts right arithmetically, so its LSB output presents
// the word LSB first and then repeats the sign bit (sign extension for
// free). Serial outputs are registered bits, so the stream starts the
// cycle after the last write. Merging the buffers with the shift
// registers follows the document; the arithmetic shift is this design's.
module ps_converter
  import dct_pkg::*;
(
  input  logic                 clk,
  input  logic                 wr_en,
  input  logic [2:0]           wr_sel,
  input  logic signed [DW-1:0] wr_data,
  input  logic                 shift,
  output logic [NPTS-1:0]      xs       // serial x(0)..x(7), LSB first
);
  logic signed [DW-1:0] r [NPTS];

  always_ff @(posedge clk) begin
    for (int i = 0; i < NPTS; i++) begin
      if (wr_en && wr_sel == 3'(i)) r[i] <= wr_data;
      else if (shift)               r[i] <= r[i] >>> 1;
    end
  end

  always_comb
    for (int i = 0; i < NPTS; i++) xs[i] = r[i][0];

endmodule
