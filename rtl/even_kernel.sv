// even_kernel: bit-serial 4x4 even kernel of the 8-point DCT.
//
// Computes, on LSB-first streams,
//   z(0) = d e0 + d e1 + d e2 + d e3
//   z(2) = b e0 + f e1 - f e2 - b e3
//   z(4) = d e0 - d e1 - d e2 + d e3
//   z(6) = f e0 - b e1 + b e2 - f e3
// with e_j = x(j) + x(7-j). One even_kernel_mult per input supplies b, d
// and f times that input in parallel; a kernel_row per output adds the four
// terms with the row's signs. Output streams carry z * 2^14 (14 fractional
// bits) with zero latency relative to the inputs. The matrix is the
// document's; the adder-tree grouping is this design's.
module even_kernel
  import dct_pkg::*;
(
  input  logic            clk,
  input  logic            start,
  input  logic [TAPS-1:0] tap_en,
  input  logic [3:0]      e,       // serial pre-processed inputs even-0..3
  output logic [3:0]      z        // serial z(0), z(2), z(4), z(6)
);
  logic [3:0] b, d, f;

  for (genvar j = 0; j < 4; j++) begin : g_mult
    even_kernel_mult u_mult (.clk, .start, .tap_en, .x(e[j]),
                             .bx(b[j]), .dx(d[j]), .fx(f[j]));
  end

  kernel_row #(.SUB1(1'b0), .SUB2(1'b0), .SUB3(1'b0)) u_z0
    (.clk, .start, .p0(d[0]), .p1(d[1]), .p2(d[2]), .p3(d[3]), .z(z[0]));
  kernel_row #(.SUB1(1'b0), .SUB2(1'b0), .SUB3(1'b1)) u_z2
    (.clk, .start, .p0(b[0]), .p1(f[1]), .p2(f[2]), .p3(b[3]), .z(z[1]));
  kernel_row #(.SUB1(1'b1), .SUB2(1'b1), .SUB3(1'b1)) u_z4
    (.clk, .start, .p0(d[0]), .p1(d[1]), .p2(d[2]), .p3(d[3]), .z(z[2]));
  kernel_row #(.SUB1(1'b1), .SUB2(1'b1), .SUB3(1'b0)) u_z6
    (.clk, .start, .p0(f[0]), .p1(b[1]), .p2(b[2]), .p3(f[3]), .z(z[3]));

endmodule
