// mpc_top: the three motion-picture-compression engines side by side.
//
// The engines do not share data paths; each keeps its own ports, prefixed
// by its name, and all run on one clock and one active-low reset:
//  * dct_  : bit-serial 8-point 1-D DCT processor with its shared 12-bit
//            bus (dct_processor). One transform per 32 cycles.
//  * me_   : edge-masked motion estimator, 16x16 blocks, 16 x 16
//            candidate positions (edge_masked_me).
//  * mp_   : frame memory split into modules and the address and data
//            crossbars of the multiprocessor motion-estimation system
//            (mp_switch_system); its processors are attached from outside
//            through the mp_proc_* ports.
// See each module for its timing. Lint flags rst_n as both a synchronous
// and an asynchronous net: the synchronous use is only the disable
// condition of the memory-conflict assertion (see mp_switch_system).
module mpc_top
  import dct_pkg::*;
  import me_pkg::*;
#(
  parameter int unsigned MP_P         = 4,
  parameter int unsigned MP_MEM_WORDS = 65536,
  parameter int unsigned MP_BLK_WORDS = 64,
  parameter int unsigned MP_WORD_W    = 8,
  localparam int unsigned MP_KW = $clog2(MP_MEM_WORDS / MP_BLK_WORDS),
  localparam int unsigned MP_BW = $clog2(MP_BLK_WORDS)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // DCT processor
  input  logic                          dct_start,
  input  logic signed [DW-1:0]          dct_d_in,
  output logic signed [DW-1:0]          dct_d_out,
  output logic                          dct_d_oe,
  output logic                          dct_out_valid,
  output logic                          dct_sync,
  // edge-masked motion estimator
  input  logic                          me_start,
  input  logic [PIXW-1:0]               me_cur_pix,
  input  logic [PIXW-1:0]               me_ref_p,
  input  logic [PIXW-1:0]               me_ref_pp,
  input  logic [EDW-1:0]                me_thr,
  input  logic [NSHW-1:0]               me_n,
  output logic                          me_ref_req,
  output logic [MVW-1:0]                me_mv_u,
  output logic [MVW-1:0]                me_mv_v,
  output logic [ACCW-1:0]               me_mv_min,
  output logic                          me_mv_valid,
  output logic                          me_busy,
  // multiprocessor memory and switching network
  input  logic [MP_P-1:0]               mp_proc_en,
  input  logic [MP_P-1:0][MP_KW-1:0]    mp_proc_mod,
  input  logic [MP_P-1:0][MP_BW-1:0]    mp_proc_addr,
  output logic [MP_P-1:0][MP_WORD_W-1:0] mp_proc_data,
  output logic                          mp_conflict,
  input  logic                          mp_host_we,
  input  logic [MP_KW+MP_BW-1:0]        mp_host_addr,
  input  logic [MP_WORD_W-1:0]          mp_host_wdata
);

  dct_processor u_dct (
    .clk, .rst_n, .start(dct_start), .d_in(dct_d_in), .d_out(dct_d_out),
    .d_oe(dct_d_oe), .out_valid(dct_out_valid), .sync(dct_sync)
  );

  edge_masked_me u_me (
    .clk, .rst_n, .start(me_start), .cur_pix(me_cur_pix), .ref_p(me_ref_p),
    .ref_pp(me_ref_pp), .thr(me_thr), .n(me_n), .ref_req(me_ref_req),
    .mv_u(me_mv_u), .mv_v(me_mv_v), .mv_min(me_mv_min),
    .mv_valid(me_mv_valid), .busy(me_busy)
  );

  mp_switch_system #(
    .P(MP_P), .MEM_WORDS(MP_MEM_WORDS), .BLK_WORDS(MP_BLK_WORDS), .WORD_W(MP_WORD_W)
  ) u_mp (
    .clk, .rst_n, .proc_en(mp_proc_en), .proc_mod(mp_proc_mod),
    .proc_addr(mp_proc_addr), .proc_data(mp_proc_data), .conflict(mp_conflict),
    .host_we(mp_host_we), .host_addr(mp_host_addr), .host_wdata(mp_host_wdata)
  );

endmodule
