// me_pkg: shared constants of the edge-masked motion estimator.
//
// Block size 16x16 and a 16-PE array searching 16 horizontal by 16
// vertical displacements in a 31x31 search area follow the document.
// Pixel and accumulator widths and the mask-stage latencies below are
// this design's.
package me_pkg;

  localparam int unsigned PIXW   = 8;    // pixel width
  localparam int unsigned NBLK   = 16;   // block size N (pixels per line)
  localparam int unsigned NPE    = 16;   // processing elements = displacements per pass
  localparam int unsigned NPIX   = NBLK * NBLK;  // 256 pixels / cycles per pass
  localparam int unsigned SMW    = 13;   // 5x5 sum of 8-bit pixels (<= 6375)
  localparam int unsigned EDW    = 17;   // |hx| + |hy| of the smoothed image
  localparam int unsigned NSHW   = 3;    // width of the barrel-shift amount n
  localparam int unsigned ACCW   = 20;   // EMMAD accumulator width
  localparam int unsigned MVW    = 4;    // motion vector component width

  // Centre delays of the two mask stages: output at time t belongs to the
  // pixel that entered at t - delay (raster order, 16 pixels per line).
  localparam int unsigned SMOOTH_DLY = 36;   // 1 (reg) + 2 (column) + 32 (rows) + 1 (adder reg)
  localparam int unsigned SOBEL_DLY  = 19;   // 2 (taps) + 16 (rows) + 1 (comparator reg)
  localparam int unsigned MASK_DLY   = SMOOTH_DLY + SOBEL_DLY;

endpackage
