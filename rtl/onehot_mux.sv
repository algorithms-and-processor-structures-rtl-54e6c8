// onehot_mux: multiplexer cell of the crossbar network.
//
// K inputs of W bits with one select line per input (one-hot). Each input
// bit is ANDed with its select line and the products are combined by a
// tree of OR gates, the multiplexer-cell form the document prefers for
// speed and area; a 4-to-1 cell is four AND and three OR gates per bit.
// With no select line high the output is 0; with several high it is the
// OR of the selected inputs (a caller must avoid that). Combinational.
module onehot_mux #(
  parameter int unsigned K = 4,
  parameter int unsigned W = 8
) (
  input  logic [K-1:0][W-1:0] din,
  input  logic [K-1:0]        sel,
  output logic [W-1:0]        dout
);
  // binary OR tree over the AND terms
  localparam int unsigned KP = (K <= 1) ? 1 : (1 << $clog2(K));
  logic [W-1:0] node [2*KP-1];

  always_comb begin
    for (int i = 0; i < KP; i++)
      node[KP-1+i] = (i < K) ? (din[i] & {W{sel[i]}}) : '0;
    for (int i = KP - 2; i >= 0; i--)
      node[i] = node[2*i+1] | node[2*i+2];
    dout = node[0];
  end

endmodule
