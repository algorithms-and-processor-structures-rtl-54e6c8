// odd_kernel: bit-serial 4x4 odd kernel of the 8-point DCT.
//
// Computes, on LSB-first streams,
//   z(1) = a o0 + c o1 + e o2 + g o3
//   z(3) = c o0 - g o1 - a o2 - e o3
//   z(5) = e o0 - a o1 + g o2 + c o3
//   z(7) = g o0 - e o1 + c o2 - a o3
// with o_j = x(j) - x(7-j). One odd_kernel_mult per input supplies a, c, e
// and g times that input; a kernel_row per output adds the terms. Output
// streams carry z * 2^14 with zero latency. The matrix is the document's;
// the adder-tree grouping is this design's.
module odd_kernel
  import dct_pkg::*;
(
  input  logic            clk,
  input  logic            start,
  input  logic [TAPS-1:0] tap_en,
  input  logic [3:0]      o,       // serial pre-processed inputs odd-0..3
  output logic [3:0]      z        // serial z(1), z(3), z(5), z(7)
);
  logic [3:0] a, c, e, g;

  for (genvar j = 0; j < 4; j++) begin : g_mult
    odd_kernel_mult u_mult (.clk, .start, .tap_en, .x(o[j]),
                            .ax(a[j]), .cx(c[j]), .ex(e[j]), .gx(g[j]));
  end

  kernel_row #(.SUB1(1'b0), .SUB2(1'b0), .SUB3(1'b0)) u_z1
    (.clk, .start, .p0(a[0]), .p1(c[1]), .p2(e[2]), .p3(g[3]), .z(z[0]));
  kernel_row #(.SUB1(1'b1), .SUB2(1'b0), .SUB3(1'b1)) u_z3
    (.clk, .start, .p0(c[0]), .p1(g[1]), .p2(a[2]), .p3(e[3]), .z(z[1]));
  kernel_row #(.SUB1(1'b1), .SUB2(1'b0), .SUB3(1'b0)) u_z5
    (.clk, .start, .p0(e[0]), .p1(a[1]), .p2(g[2]), .p3(c[3]), .z(z[2]));
  kernel_row #(.SUB1(1'b1), .SUB2(1'b1), .SUB3(1'b0)) u_z7
    (.clk, .start, .p0(g[0]), .p1(e[1]), .p2(c[2]), .p3(a[3]), .z(z[3]));

endmodule
