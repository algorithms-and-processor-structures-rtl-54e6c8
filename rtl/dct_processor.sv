// dct_processor: bit-serial 8-point 1-D DCT processor with bus interface.
//
// Computes z(u) = sum_m T(u,m) x(m) for the 8-point DCT-II kernel (scale
// 1/2 C(u), C(0) = 1/sqrt2) on 12-bit signed words. Four stages, as in the
// document: (1) the input words, written one per clock from a shared
// 12-bit bus, sit in registers that then shift them out LSB first; (2)
// serial butterflies form x(j) +/- x(7-j); (3) an even and an odd 4x4
// kernel multiply them bit-serially by signed-digit coefficients (shift
// and add only, no general multiplier); (4) serial-to-parallel registers
// collect the results, which leave over the same bus through an
// eight-way multiplexer driven by the logic controller.
//
// Interface: d_in carries x(0)..x(7) on eight consecutive cycles, x(0) with
// `start`; start is taken only in the cycle after `sync`. Forty cycles
// after x(0), z(0)..z(7) appear on d_out on eight consecutive cycles with
// out_valid and d_oe high. A new transform may start every 32 cycles.
// d_in/d_out/d_oe are the two directions and the enable of the tri-state
// bus D[11:0]. Results are floor(z) kept to 12 bits (modulo 2^12): inputs
// with |x| <= 724, for instance the rows and then the columns of an 8-bit
// pixel block, never overflow. Coefficient error is below 5e-5 each.
module dct_processor
  import dct_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [DW-1:0] d_in,
  output logic signed [DW-1:0] d_out,
  output logic                 d_oe,
  output logic                 out_valid,
  output logic                 sync
);
  logic            wr_en, ps_shift, stream_start, hold, sp_shift, rd_en;
  logic [2:0]      wr_sel, rd_sel;
  logic [TAPS-1:0] tap_en;
  logic [NPTS-1:0] xs, zs;
  logic [3:0]      e, o, ze, zo;
  logic signed [DW-1:0] z [NPTS];

  dct_controller u_ctrl (
    .clk, .rst_n, .start, .sync, .wr_en, .wr_sel, .ps_shift,
    .stream_start, .hold, .tap_en, .sp_shift, .rd_en, .rd_sel, .out_valid
  );

  ps_converter u_ps (
    .clk, .wr_en, .wr_sel, .wr_data(d_in), .shift(ps_shift), .xs
  );

  dct_preproc u_pre (
    .clk, .start(stream_start), .hold, .xs, .e, .o
  );

  even_kernel u_even (
    .clk, .start(stream_start), .tap_en, .e, .z(ze)
  );

  odd_kernel u_odd (
    .clk, .start(stream_start), .tap_en, .o, .z(zo)
  );

  // interleave: even kernel gives z(0,2,4,6), odd kernel z(1,3,5,7)
  always_comb
    for (int j = 0; j < 4; j++) begin
      zs[2*j]   = ze[j];
      zs[2*j+1] = zo[j];
    end

  sp_converter u_sp (
    .clk, .shift(sp_shift), .zs, .z
  );

  // output multiplexer
  always_comb begin
    d_out = rd_en ? z[rd_sel] : '0;
    d_oe  = out_valid;
  end

endmodule
