// serial_addsub: bit-serial two's-complement adder / subtractor.
//
// Operands arrive LSB first, one bit per clock. The sum bit is formed
// combinationally by a full adder and the carry is kept in one flip-flop,
// so the result stream has no latency relative to the operand streams and
// trees of these cells stay bit-aligned (as the kernel multipliers need).
// Subtraction (SUB = 1) inverts operand b and presets the carry to 1.
// `start` marks stream bit 0: the carry used in that cycle is the preset
// value, not the stored one. Word length is unbounded: feeding
// sign-extended operands yields a sign-extended result.
//
// The document names serial adders/subtractors with an implicit carry
// register; the zero-latency sum is this design's choice.
module serial_addsub #(
  parameter bit SUB = 1'b0
) (
  input  logic clk,
  input  logic start,   // high on stream bit 0
  input  logic a,
  input  logic b,
  output logic s
);
  logic carry_q;
  logic cin, bb;

  always_comb begin
    bb  = b ^ SUB;
    cin = start ? SUB : carry_q;
    s   = a ^ bb ^ cin;
  end

  always_ff @(posedge clk)
    carry_q <= (a & bb) | (a & cin) | (bb & cin);

endmodule
