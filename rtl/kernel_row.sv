// kernel_row: one row of a 4x4 kernel matrix product, bit-serially.
//
// Sums four product streams with the row's signs as a two-level tree of
// serial adders/subtractors: z = (p0 OP1 p1) OP3 (p2 OP2 p3), where OPn is
// subtraction when SUBn is set. Zero latency; `start` marks stream bit 0.
// The tree form is this design's choice for combining the kernel
// multiplier outputs of one row.
module kernel_row #(
  parameter bit SUB1 = 1'b0,
  parameter bit SUB2 = 1'b0,
  parameter bit SUB3 = 1'b0
) (
  input  logic clk,
  input  logic start,
  input  logic p0, p1, p2, p3,
  output logic z
);
  logic l, r;
  serial_addsub #(.SUB(SUB1)) u_l (.clk, .start, .a(p0), .b(p1), .s(l));
  serial_addsub #(.SUB(SUB2)) u_r (.clk, .start, .a(p2), .b(p3), .s(r));
  serial_addsub #(.SUB(SUB3)) u_z (.clk, .start, .a(l),  .b(r),  .s(z));
endmodule
