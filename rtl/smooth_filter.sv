// smooth_filter: 5x5 box smoothing filter on a raster pixel stream.
//
// Pixels of a 16-pixel-wide block arrive one per clock, left to right and
// top to bottom. A chain of five registers with four adders forms the sum
// of the last five pixels (one row of the window, the partial result that
// all overlapping windows reuse); four 16-cycle delay lines give the same
// row sum one, two, three and four lines earlier, and a parallel adder
// adds the five. The output is the plain 5x5 sum (all-ones mask, no
// division), 13 bits, registered:
//   sm(t) = sum_{r=0..4} sum_{c=1..5} pix(t - 1 - 16 r - c)
// so it belongs to the window centred on the pixel that entered
// SMOOTH_DLY = 36 cycles earlier. Windows are taken on the 1-D stream, as
// in the document's derivation, so near the block edges they take pixels
// from the neighbouring line or block in stream order. Structure and
// delay lengths follow the document; register placement is this design's.
module smooth_filter
  import me_pkg::*;
(
  input  logic            clk,
  input  logic [PIXW-1:0] pix,
  output logic [SMW-1:0]  sm
);
  logic [SMW-1:0] r [5];                 // row-sum chain
  logic [SMW-1:0] dl [4][NBLK];          // four 16-cycle delay lines
  logic [SMW-1:0] row [5];

  always_ff @(posedge clk) begin
    r[0] <= SMW'(pix);
    for (int i = 1; i < 5; i++) r[i] <= r[i-1] + SMW'(pix);
    dl[0][0] <= r[4];
    for (int l = 1; l < 4; l++) dl[l][0] <= dl[l-1][NBLK-1];
    for (int l = 0; l < 4; l++)
      for (int k = 1; k < NBLK; k++) dl[l][k] <= dl[l][k-1];
    sm <= row[0] + row[1] + row[2] + row[3] + row[4];
  end

  always_comb begin
    row[0] = r[4];
    for (int l = 0; l < 4; l++) row[l+1] = dl[l][NBLK-1];
  end

endmodule
