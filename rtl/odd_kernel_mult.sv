// odd_kernel_mult: bit-serial signed-digit multiplier for the odd kernel.
//
// Same delay line as the even multiplier (stage k has weight 2^(k-14));
// the products a*x, c*x, e*x and g*x are formed in parallel from the taps
// named by the signed-digit coefficient forms:
//   a = (2^-1 + 2^-13) - (2^-7 + 2^-9)
//   c = ((2^-2 + 2^-3) + (2^-5 + 2^-7)) + (2^-9 - 2^-12)
//   e = (2^-5 - 2^-8) + (2^-2 + 2^-11)
//   g = (2^-4 - 2^-13) + (2^-5 + 2^-8)
// The tap structure follows the document's odd kernel multiplier. Output
// streams are x * C with C = coefficient * 2^14 (a 8034, c 6812, e 4552,
// g 1598), zero latency. tap_en and start as in even_kernel_mult. No odd
// coefficient names the 2^-14 digit (so tap_en[0] is unused here) or the
// 2^-10 and 2^-6 digits (those tap bits are unused); lint reports both.
module odd_kernel_mult
  import dct_pkg::*;
(
  input  logic            clk,
  input  logic            start,
  input  logic [TAPS-1:0] tap_en,
  input  logic            x,
  output logic            ax,
  output logic            cx,
  output logic            ex,
  output logic            gx
);
  logic [TAPS-1:1] dl;
  logic [TAPS-1:1] t;      // the odd coefficients use no 2^-14 digit

  always_ff @(posedge clk)
    dl <= {dl[TAPS-2:1], x};

  always_comb t = dl & tap_en[TAPS-1:1];

  // a*x
  logic a1, a2;
  serial_addsub #(.SUB(1'b0)) u_a1 (.clk, .start, .a(t[13]), .b(t[1]), .s(a1));
  serial_addsub #(.SUB(1'b0)) u_a2 (.clk, .start, .a(t[7]),  .b(t[5]), .s(a2));
  serial_addsub #(.SUB(1'b1)) u_a3 (.clk, .start, .a(a1),    .b(a2),   .s(ax));

  // c*x
  logic c1, c2, c3, c4;
  serial_addsub #(.SUB(1'b0)) u_c1 (.clk, .start, .a(t[12]), .b(t[11]), .s(c1));
  serial_addsub #(.SUB(1'b0)) u_c2 (.clk, .start, .a(t[9]),  .b(t[7]),  .s(c2));
  serial_addsub #(.SUB(1'b0)) u_c3 (.clk, .start, .a(c1),    .b(c2),    .s(c3));
  serial_addsub #(.SUB(1'b1)) u_c4 (.clk, .start, .a(t[5]),  .b(t[2]),  .s(c4));
  serial_addsub #(.SUB(1'b0)) u_c5 (.clk, .start, .a(c3),    .b(c4),    .s(cx));

  // e*x
  logic e1, e2;
  serial_addsub #(.SUB(1'b1)) u_e1 (.clk, .start, .a(t[9]),  .b(t[6]), .s(e1));
  serial_addsub #(.SUB(1'b0)) u_e2 (.clk, .start, .a(t[12]), .b(t[3]), .s(e2));
  serial_addsub #(.SUB(1'b0)) u_e3 (.clk, .start, .a(e1),    .b(e2),   .s(ex));

  // g*x
  logic g1, g2;
  serial_addsub #(.SUB(1'b1)) u_g1 (.clk, .start, .a(t[10]), .b(t[1]), .s(g1));
  serial_addsub #(.SUB(1'b0)) u_g2 (.clk, .start, .a(t[9]),  .b(t[6]), .s(g2));
  serial_addsub #(.SUB(1'b0)) u_g3 (.clk, .start, .a(g1),    .b(g2),   .s(gx));

endmodule
