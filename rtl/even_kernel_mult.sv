// even_kernel_mult: bit-serial signed-digit multiplier for the even kernel.
//
// One serial operand x (LSB first, sign-extended for the whole stream) runs
// down a 13-stage delay line. The line input carries weight 2^-14 and the
// output of stage k carries weight 2^(k-14), so stage 13 is 2^-1. The
// products b*x, d*x and f*x are formed in parallel by small trees of
// serial adders/subtractors that sum the taps named by the signed-digit
// forms of the coefficients:
//   b = (2^-1 + 2^-10) - (2^-5 + 2^-7)
//   d = ((2^-2 + 2^-4) + (2^-5 + 2^-7)) + 2^-9
//   f = (2^-3 + 2^-4) - (2^-14 - 2^-8)
// The tap structure follows the document's even kernel multiplier. Each
// output stream is x * C with C = coefficient * 2^14 (b 7568, d 5792,
// f 3135) and has zero latency with respect to the input stream.
//
// tap_en[k] must be 1 only once stream bit 0 has reached tap k (thermometer
// code: stream cycle s >= k); it keeps the previous word's bits, still in
// the delay line, out of the sums. `start` marks stream bit 0.
// Taps 2^-13..2^-11 and 2^-6 are named by no even coefficient, so lint
// reports those bits of the masked tap vector as unused; the delay line
// still needs the stages.
module even_kernel_mult
  import dct_pkg::*;
(
  input  logic            clk,
  input  logic            start,
  input  logic [TAPS-1:0] tap_en,
  input  logic            x,
  output logic            bx,
  output logic            dx,
  output logic            fx
);
  logic [TAPS-1:1] dl;     // dl[k] = x delayed by k cycles
  logic [TAPS-1:0] t;      // masked taps, t[k] weight 2^(k-14)

  always_ff @(posedge clk)
    dl <= {dl[TAPS-2:1], x};

  always_comb t = {dl, x} & tap_en;

  // b*x
  logic b1, b2;
  serial_addsub #(.SUB(1'b0)) u_b1 (.clk, .start, .a(t[13]), .b(t[4]), .s(b1));
  serial_addsub #(.SUB(1'b0)) u_b2 (.clk, .start, .a(t[9]),  .b(t[7]), .s(b2));
  serial_addsub #(.SUB(1'b1)) u_b3 (.clk, .start, .a(b1),    .b(b2),   .s(bx));

  // d*x
  logic d1, d2, d3;
  serial_addsub #(.SUB(1'b0)) u_d1 (.clk, .start, .a(t[12]), .b(t[10]), .s(d1));
  serial_addsub #(.SUB(1'b0)) u_d2 (.clk, .start, .a(t[9]),  .b(t[7]),  .s(d2));
  serial_addsub #(.SUB(1'b0)) u_d3 (.clk, .start, .a(d1),    .b(d2),    .s(d3));
  serial_addsub #(.SUB(1'b0)) u_d4 (.clk, .start, .a(d3),    .b(t[5]),  .s(dx));

  // f*x
  logic f1, f2;
  serial_addsub #(.SUB(1'b0)) u_f1 (.clk, .start, .a(t[11]), .b(t[10]), .s(f1));
  serial_addsub #(.SUB(1'b1)) u_f2 (.clk, .start, .a(t[0]),  .b(t[6]),  .s(f2));
  serial_addsub #(.SUB(1'b1)) u_f3 (.clk, .start, .a(f1),    .b(f2),    .s(fx));

endmodule
