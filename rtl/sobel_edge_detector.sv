// sobel_edge_detector: 3x3 Sobel operator and threshold (edge mask bit).
//
// Works on the smoothed raster stream (16 pixels per line). The document
// rewrites both Sobel convolutions as short 1-D filters along the line
// followed by taps spaced one line (16 cycles) apart:
//   P = s(k-1) + 2 s(k-2) + s(k-3)     hx = P(t) - P(t-32)
//   Q = s(k-1) - s(k-3)                hy = Q(t) + 2 Q(t-16) + Q(t-32)
// which this module builds with registers, a shift-by-one, adders, a
// 32-cycle and two 16-cycle delay lines, two absolute-value units and a
// final adder. The comparator sets edge = 1 when |hx| + |hy| > thr; its
// output is registered, so `edge` belongs to the smoothed sample that
// entered SOBEL_DLY = 19 cycles earlier. mag is the unregistered sum,
// brought out for test. Structure follows the document.
module sobel_edge_detector
  import me_pkg::*;
(
  input  logic           clk,
  input  logic [SMW-1:0] sm,
  input  logic [EDW-1:0] thr,
  output logic [EDW-1:0] mag,
  output logic           edge_o
);
  localparam int W = EDW + 1;            // signed working width

  logic signed [W-1:0] s1, s2, pa, pb, qb;  // registers
  logic signed [W-1:0] p_dl [2*NBLK];       // 32-cycle delay of P
  logic signed [W-1:0] q_dl [2*NBLK];       // 2 x 16-cycle delay of Q
  logic signed [W-1:0] hx, hy;
  logic signed [W-1:0] smx;

  always_comb smx = W'(sm);

  always_ff @(posedge clk) begin
    // horizontal [1 2 1]: pb = s(t-1) + 2 s(t-2) + s(t-3)
    s1 <= smx;
    pa <= (smx <<< 1) + s1;
    pb <= pa + smx;
    // horizontal [1 0 -1]: qb = s(t-1) - s(t-3)
    s2 <= s1;
    qb <= smx - s2;
    // line delays
    p_dl[0] <= pb;
    q_dl[0] <= qb;
    for (int k = 1; k < 2*NBLK; k++) begin
      p_dl[k] <= p_dl[k-1];
      q_dl[k] <= q_dl[k-1];
    end
    edge_o <= (mag > thr);
  end

  always_comb begin
    hx  = pb - p_dl[2*NBLK-1];
    hy  = qb + (q_dl[NBLK-1] <<< 1) + q_dl[2*NBLK-1];
    mag = EDW'(hx < 0 ? -hx : hx) + EDW'(hy < 0 ? -hy : hy);
  end

endmodule
