// dct_preproc: data pre-processing stage (serial butterflies).
//
// Forms e_j = x(j) + x(7-j) and o_j = x(j) - x(7-j), j = 0..3, with eight
// serial adders/subtractors, as the even/odd kernel decomposition of the
// 8-point DCT requires. The 13-bit butterfly results are complete after
// stream bit 12; from then on (`hold` high) each output repeats its own
// bit 12, the sign, which the kernel multipliers need for another 13
// cycles. This lets the input registers stop shifting after 13 cycles and
// take the next word while the kernels are still busy. The butterflies are
// the document's; the sign-hold register is this design's.
module dct_preproc
  import dct_pkg::*;
(
  input  logic            clk,
  input  logic            start,   // stream bit 0
  input  logic            hold,    // stream bits 13 and later
  input  logic [NPTS-1:0] xs,
  output logic [3:0]      e,
  output logic [3:0]      o
);
  logic [3:0] e_s, o_s, e_q, o_q;

  for (genvar j = 0; j < 4; j++) begin : g_bfly
    serial_addsub #(.SUB(1'b0)) u_add (.clk, .start, .a(xs[j]), .b(xs[7-j]), .s(e_s[j]));
    serial_addsub #(.SUB(1'b1)) u_sub (.clk, .start, .a(xs[j]), .b(xs[7-j]), .s(o_s[j]));
  end

  always_ff @(posedge clk)
    if (!hold) begin
      e_q <= e_s;
      o_q <= o_s;
    end

  always_comb begin
    e = hold ? e_q : e_s;
    o = hold ? o_q : o_s;
  end

endmodule
