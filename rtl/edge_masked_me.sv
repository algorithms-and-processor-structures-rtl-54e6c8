// edge_masked_me: edge-masked motion estimator (mask stage + detector).
//
// Stage 1 builds the edge mask of the current block: a 5x5 smoothing
// filter, a 3x3 Sobel operator and a threshold comparator (edge when
// |hx| + |hy| > thr, thr applying to the 5x5 sum, i.e. 25 times the
// local mean). Stage 2 is the 16-PE motion vector detector, whose PEs
// weight the absolute difference of an edge pixel by beta = 2^n:
//   EMMAD(u,v) = sum |a(i,j) - b(u+i, v+j)| * B(i,j)
// and which returns the (u,v) of the smallest EMMAD.
//
// The current block is streamed cyclically in raster order (pixel k of
// the block in every cycle t with t mod 256 = k, counted from `start`) for
// 2 + 16 passes of 256 cycles. The first two passes only fill the mask
// stage, whose windows reach about 130 pixels back. Its output for pixel k
// leaves MASK_DLY = 55 cycles after the pixel; a 1-bit delay line of
// 256 - 55 = 201 stages brings it level with the same pixel of the next
// pass. The search starts 512 cycles after `start`; `ref_req` is high
// while the detector reads the reference buses p and p' (see mv_detector
// for their format). Near the block edges the mask windows see pixels of
// the neighbouring line or of the block's other edge, because the block is
// repeated in the stream. The two stages, their filters and the PE
// weighting are the document's; the cyclic streaming, warm-up and mask
// alignment are this design's.
module edge_masked_me
  import me_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [PIXW-1:0] cur_pix,
  input  logic [PIXW-1:0] ref_p,
  input  logic [PIXW-1:0] ref_pp,
  input  logic [EDW-1:0]  thr,
  input  logic [NSHW-1:0] n,
  output logic            ref_req,
  output logic [MVW-1:0]  mv_u,
  output logic [MVW-1:0]  mv_v,
  output logic [ACCW-1:0] mv_min,
  output logic            mv_valid,
  output logic            busy
);
  localparam int unsigned WARM   = 2 * NPIX;
  localparam int unsigned ALIGN  = NPIX - MASK_DLY;   // 201
  localparam int unsigned SEARCH = NPE * NPIX + NBLK; // cycles the reference buses are read

  // ---------------- stage 1: mask generation ----------------
  logic [SMW-1:0] sm;
  logic           edge_bit;

  smooth_filter u_smooth (.clk, .pix(cur_pix), .sm);
  sobel_edge_detector u_sobel (.clk, .sm, .thr, .mag(), .edge_o(edge_bit));

  logic [ALIGN-1:0] mask_dl;
  always_ff @(posedge clk)
    mask_dl <= {mask_dl[ALIGN-2:0], edge_bit};

  // ---------------- sequencing ----------------
  logic [12:0] cnt;
  logic        warm, searching, me_start;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt       <= '0;
      warm      <= 1'b0;
      searching <= 1'b0;
    end else if (start) begin
      cnt       <= 13'd1;
      warm      <= 1'b1;
      searching <= 1'b0;
    end else if (warm) begin
      cnt <= cnt + 1'b1;
      if (cnt == 13'(WARM - 1)) begin
        warm      <= 1'b0;
        searching <= 1'b1;
        cnt       <= '0;
      end
    end else if (searching) begin
      cnt <= cnt + 1'b1;
      if (cnt == 13'(SEARCH - 1)) searching <= 1'b0;
    end

  always_comb begin
    me_start = searching && cnt == '0;
    ref_req  = searching;
  end

  // ---------------- stage 2: motion vector detector ----------------
  mv_detector u_mvd (
    .clk, .rst_n, .start(me_start), .cur(cur_pix), .mask(mask_dl[ALIGN-1]),
    .ref_p, .ref_pp, .n, .mv_u, .mv_v, .mv_min, .mv_valid, .busy
  );

endmodule
