// mv_detector: motion vector detector, broadcast full-search PE array
// with edge-masked matching.
//
// Sixteen PEs each evaluate one horizontal displacement v = 0..15 for the
// vertical displacement u of the current pass; sixteen passes cover the
// 16 x 16 candidate positions of a 31 x 31 search area (the block's
// top-left candidate is u = v = 0). Per pass (256 cycles) the current
// block is streamed in raster order, a(i,j) at pass cycle 16 i + j. It and
// its edge-mask bit run down a chain of delay registers, so PE v sees
// a(i,j) at cycle 16 i + j + v. Reference pixels are broadcast on two
// buses:
//   p  at pass cycle 16 i + c       carries b(u+i, c),      c = 0..15
//   p' at pass cycle 16 (i+1) + c   carries b(u+i, 16 + c)  (one line late)
// PE v takes p when (cycle mod 16) >= v and p' otherwise, which gives it
// b(u+i, j+v). Consecutive passes overlap by 16 cycles: p' then still
// carries the last line of the previous pass while p starts the next.
// Control strobes (enable, first, last) run down their own delay chain so
// each PE starts and stops one cycle after its neighbour. When PE 15 has
// latched, all sixteen results are loaded into a shift chain (the S
// registers) and shifted into a comparator that keeps the smallest EMMAD;
// ties keep the smaller u, then the smaller v.
//
// Interface: pulse `start` in the cycle that carries pass 0, cycle 0 of
// the streams; keep the streams running for 16 passes (4096 cycles, plus
// 16 cycles of p'). mv_valid pulses once with (mv_u, mv_v, mv_min) about
// 4128 cycles after start. busy is high in between. The array, the PE
// chain and the mux selection follow the document; the control details,
// S-chain loading and tie rule are this design's.
module mv_detector
  import me_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [PIXW-1:0] cur,      // current block stream
  input  logic            mask,     // edge-mask bit of `cur`
  input  logic [PIXW-1:0] ref_p,    // reference bus p
  input  logic [PIXW-1:0] ref_pp,   // reference bus p'
  input  logic [NSHW-1:0] n,        // beta = 2^n
  output logic [MVW-1:0]  mv_u,
  output logic [MVW-1:0]  mv_v,
  output logic [ACCW-1:0] mv_min,
  output logic            mv_valid,
  output logic            busy
);
  localparam int GW = 13;                       // global cycle counter
  localparam int unsigned FEED = NPE * NPIX;    // 4096 feeding cycles

  // ---------------- control logic ----------------
  logic [GW-1:0] g;
  logic          feeding;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      g       <= '0;
      feeding <= 1'b0;
    end else if (start) begin
      g       <= GW'(1);
      feeding <= 1'b1;
    end else if (feeding) begin
      g <= g + 1'b1;
      if (g == GW'(FEED - 1)) feeding <= 1'b0;
    end

  logic en0, first0, last0;
  logic [3:0] gcol;
  always_comb begin
    en0    = start || feeding;
    gcol   = start ? 4'd0 : g[3:0];
    first0 = start || (feeding && g[7:0] == 8'd0);
    last0  = feeding && g[7:0] == 8'hFF;
  end

  // ---------------- delay chains (PE v sees index v) ----------------
  logic [PIXW-1:0] cur_d  [NPE];
  logic            mask_d [NPE];
  logic            en_d [NPE], first_d [NPE], last_d [NPE];

  always_comb begin
    cur_d[0]   = cur;
    mask_d[0]  = mask;
    en_d[0]    = en0;
    first_d[0] = first0;
    last_d[0]  = last0;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)
      for (int v = 1; v < NPE; v++) begin
        en_d[v]    <= 1'b0;
        first_d[v] <= 1'b0;
        last_d[v]  <= 1'b0;
      end
    else
      for (int v = 1; v < NPE; v++) begin
        en_d[v]    <= en_d[v-1];
        first_d[v] <= first_d[v-1];
        last_d[v]  <= last_d[v-1];
      end

  always_ff @(posedge clk)
    for (int v = 1; v < NPE; v++) begin
      cur_d[v]  <= cur_d[v-1];
      mask_d[v] <= mask_d[v-1];
    end

  // ---------------- PE array ----------------
  logic [ACCW-1:0] res [NPE];
  for (genvar v = 0; v < NPE; v++) begin : g_pe
    logic [PIXW-1:0] bsel;
    if (v == 0) begin : g_first
      always_comb bsel = ref_p;             // PE 0 never needs p'
    end else begin : g_sel
      always_comb bsel = (gcol >= 4'(v)) ? ref_p : ref_pp;
    end
    emmad_pe u_pe (
      .clk, .en(en_d[v]), .first(first_d[v]), .last(last_d[v]),
      .a(cur_d[v]), .b(bsel), .mask(mask_d[v]), .n, .result(res[v])
    );
  end

  // ---------------- S chain and comparator ----------------
  logic [ACCW-1:0] s_chain [NPE];
  logic            load_s;
  logic [4:0]      cmp_cnt;      // 16 .. 1 while comparing, 0 idle
  logic [MVW-1:0]  pass_u, cmp_u, best_u, best_v;
  logic [ACCW-1:0] best;
  logic            have_best;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      load_s    <= 1'b0;
      cmp_cnt   <= '0;
      pass_u    <= '0;
      cmp_u     <= '0;
      have_best <= 1'b0;
      mv_valid  <= 1'b0;
      busy      <= 1'b0;
      best      <= '0;
      best_u    <= '0;
      best_v    <= '0;
    end else begin
      load_s   <= en_d[NPE-1] && last_d[NPE-1];
      mv_valid <= 1'b0;
      if (start) begin
        busy      <= 1'b1;
        pass_u    <= '0;
        have_best <= 1'b0;
      end
      if (load_s) begin
        cmp_cnt <= 5'd16;
        cmp_u   <= pass_u;
        pass_u  <= pass_u + 1'b1;
      end else if (cmp_cnt != 0) begin
        // S chain delivers v = cmp_cnt - 1 (15 first, 0 last)
        if (!have_best || s_chain[NPE-1] < best ||
            (s_chain[NPE-1] == best && best_u == cmp_u)) begin
          best   <= s_chain[NPE-1];
          best_u <= cmp_u;
          best_v <= MVW'(cmp_cnt - 5'd1);
        end
        have_best <= 1'b1;
        cmp_cnt   <= cmp_cnt - 1'b1;
        if (cmp_cnt == 5'd1 && cmp_u == MVW'(NPE - 1)) begin
          mv_valid <= 1'b1;
          busy     <= 1'b0;
        end
      end
    end

  always_ff @(posedge clk)
    if (load_s)
      for (int v = 0; v < NPE; v++) s_chain[v] <= res[v];
    else if (cmp_cnt != 0)
      for (int v = 1; v < NPE; v++) s_chain[v] <= s_chain[v-1];

  always_comb begin
    mv_u   = best_u;
    mv_v   = best_v;
    mv_min = best;
  end

endmodule
