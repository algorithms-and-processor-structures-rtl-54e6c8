// dct_controller: logic controller of the serial DCT processor.
//
// A free-running 5-bit phase counter divides time into 32-cycle frames,
// one 1-D transform per frame. Schedule of one transform loaded in frame F:
//   F  phase 0..7   bus writes x(0)..x(7) into the input registers
//                   (x(0) together with `start`, which is only taken at
//                   phase 0; `sync` is high at phase 31 to announce it)
//   F  phase 8      serial stream bit s = 0 (s = phase - 8, modulo 32)
//   F  phase 8..20  input registers shift (s = 0..12)
//   s >= 13         butterfly outputs hold their sign
//   s = 14..25      output registers capture (F phase 22 .. F+1 phase 1)
//   F+1 phase 8..15 bus reads z(0)..z(7) through the output multiplexer
// The bus thus carries eight writes and eight reads in every frame and a
// new transform may start every 32 cycles; latency from x(0) to z(0) is
// 40 cycles. tap_en is the thermometer code (s >= k) for the multiplier
// delay lines; its bit 0 (s >= 0) is always 1 and is kept only so the
// vector indexes like the taps. The phase plan is this design's; the document fixes only
// the 32-cycle transform time and the input-then-output bus order.
module dct_controller
  import dct_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            sync,
  output logic            wr_en,
  output logic [2:0]      wr_sel,
  output logic            ps_shift,
  output logic            stream_start,
  output logic            hold,
  output logic [TAPS-1:0] tap_en,
  output logic            sp_shift,
  output logic            rd_en,
  output logic [2:0]      rd_sel,
  output logic            out_valid
);
  logic [PHW-1:0] phase;
  logic [PHW-1:0] s;
  logic           loading, v_comp, v_out;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      phase   <= '0;
      loading <= 1'b0;
      v_comp  <= 1'b0;
      v_out   <= 1'b0;
    end else begin
      phase <= phase + 1'b1;
      if (phase == PHW'(PH_LOAD0))  loading <= start;
      if (phase == PHW'(PH_LOAD0 + NPTS - 1)) v_out <= v_comp;
      if (phase == PHW'(PH_STREAM0 - 1)) v_comp <= loading;
    end

  always_comb begin
    s            = phase - PHW'(PH_STREAM0);
    sync         = (phase == PHW'(FRAME - 1));
    wr_sel       = phase[2:0];
    wr_en        = (phase == PHW'(PH_LOAD0)) ? start
                 : (loading && phase < PHW'(PH_LOAD0 + NPTS));
    ps_shift     = (s <= PHW'(PRE_BITS - 1));
    stream_start = (s == '0);
    hold         = (s >= PHW'(PRE_BITS));
    for (int k = 0; k < TAPS; k++) tap_en[k] = (s >= PHW'(k));
    sp_shift     = (s >= PHW'(CAP_FIRST)) && (s <= PHW'(CAP_LAST));
    rd_en        = (phase >= PHW'(PH_OUT0)) && (phase < PHW'(PH_OUT0 + NPTS));
    rd_sel       = 3'(phase - PHW'(PH_OUT0));
    out_valid    = rd_en && v_out;
  end

endmodule
