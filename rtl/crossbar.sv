// crossbar: single-stage multiplexer-based crossbar network.
//
// NOUT output ports, each with its own column of NIN-to-1 multiplexer
// cells (onehot_mux), so every output can take any input in the same
// cycle and several outputs may take the same input. Output o is driven
// by input src[o] when en[o] is high and is 0 otherwise; the binary index
// is decoded to the one-hot select lines of the cell. Combinational, no
// arbitration. The document gives the cell and the column organisation;
// the binary select with decoder is this design's.
module crossbar #(
  parameter int unsigned NIN  = 4,
  parameter int unsigned NOUT = 4,
  parameter int unsigned W    = 8,
  localparam int unsigned SW  = (NIN > 1) ? $clog2(NIN) : 1
) (
  input  logic [NIN-1:0][W-1:0]   din,
  input  logic [NOUT-1:0][SW-1:0] src,
  input  logic [NOUT-1:0]         en,
  output logic [NOUT-1:0][W-1:0]  dout
);
  for (genvar o = 0; o < NOUT; o++) begin : g_col
    logic [NIN-1:0] sel;
    always_comb
      for (int i = 0; i < NIN; i++) sel[i] = en[o] && (src[o] == SW'(i));
    onehot_mux #(.K(NIN), .W(W)) u_mux (.din, .sel, .dout(dout[o]));
  end
endmodule
