// emmad_pe: processing element with edge enhancement factor.
//
// Each clock, while `en` is high, forms |a - b|, shifts it left by n
// (a barrel shifter, beta = 2^n) when the pixel's edge-mask bit is set or
// passes it through otherwise, and adds it to an accumulator. `first`
// restarts the accumulation with the current term; `last` copies the
// final sum (including the current term) into the output latch, where it
// stays until the next `last`. So the latch holds
//   sum |a - b| * B,  B = 2^n on edge pixels, 1 elsewhere,
// the un-normalised edge-masked mean absolute difference. The datapath is
// the document's; the control strobes and widths are this design's.
module emmad_pe
  import me_pkg::*;
(
  input  logic            clk,
  input  logic            en,
  input  logic            first,
  input  logic            last,
  input  logic [PIXW-1:0] a,        // current-block pixel
  input  logic [PIXW-1:0] b,        // reference pixel
  input  logic            mask,     // edge-mask bit of pixel a
  input  logic [NSHW-1:0] n,        // enhancement shift, beta = 2^n
  output logic [ACCW-1:0] result
);
  logic [PIXW-1:0] ad;
  logic [ACCW-1:0] term, acc, sum;

  always_comb begin
    ad   = (a > b) ? a - b : b - a;
    term = mask ? (ACCW'(ad) << n) : ACCW'(ad);
    sum  = (first ? '0 : acc) + term;
  end

  always_ff @(posedge clk)
    if (en) begin
      acc <= sum;
      if (last) result <= sum;
    end

endmodule
