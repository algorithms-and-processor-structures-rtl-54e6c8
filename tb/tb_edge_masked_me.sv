// tb_edge_masked_me: end-to-end check of the edge-masked motion estimator.
//
// Builds a 32x32 search area holding a bright rectangle on a noisy
// background and takes the current block from it at a known displacement,
// with extra noise. A reference model computes the edge mask (5x5 box
// sum, Sobel |hx|+|hy| on the cyclic raster stream, threshold), every
// EMMAD(u,v) and the minimum with the tie rule (smaller u, then smaller
// v). Runs several searches, with beta = 1 (n = 0) and beta = 4 (n = 2),
// and checks the motion vector, the minimum, the ref_req window, the
// total search time and that edge pixels were present.
module tb_edge_masked_me;
  import me_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [PIXW-1:0] cur_pix = '0, ref_p = '0, ref_pp = '0;
  logic [EDW-1:0]  thr = EDW'(1000);
  logic [NSHW-1:0] n = '0;
  logic ref_req, mv_valid, busy;
  logic [MVW-1:0] mv_u, mv_v;
  logic [ACCW-1:0] mv_min;
  int checks = 0, failures = 0, edge_pixels = 0, searches_with_edges = 0;

  always #5 clk = ~clk;

  edge_masked_me dut (.*);

  int sa [32][32];
  int cb [256];
  bit bm [256];
  int exp_u, exp_v, exp_min;

  function automatic int smv(input int k);
    int s = 0;
    for (int r = -2; r <= 2; r++)
      for (int c = -2; c <= 2; c++) s += cb[(k + 16*r + c + 512) % 256];
    return s;
  endfunction

  function automatic int at(input int k);
    return smv((k + 512) % 256);
  endfunction

  task automatic make_case(input int du, input int dv, input int seed_noise);
    int x0 = 4 + $urandom_range(18), y0 = 4 + $urandom_range(18);
    for (int y = 0; y < 32; y++)
      for (int x = 0; x < 32; x++) begin
        sa[y][x] = 40 + $urandom_range(30);
        if (y >= y0 && y < y0 + 9 && x >= x0 && x < x0 + 7) sa[y][x] = 200 + $urandom_range(40);
      end
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        int v = sa[du+i][dv+j] + int'($urandom_range(2*seed_noise)) - seed_noise;
        cb[16*i+j] = (v < 0) ? 0 : (v > 255 ? 255 : v);
      end
  endtask

  task automatic model(input int nsh);
    int best = -1, cnt = 0;
    for (int k = 0; k < 256; k++) begin
      int hx = (at(k-17) + 2*at(k-16) + at(k-15)) - (at(k+15) + 2*at(k+16) + at(k+17));
      int hy = (at(k-17) - at(k-15)) + 2*(at(k-1) - at(k+1)) + (at(k+15) - at(k+17));
      int m = (hx < 0 ? -hx : hx) + (hy < 0 ? -hy : hy);
      bm[k] = (m > int'(thr));
      cnt += bm[k];
    end
    edge_pixels += cnt;
    if (cnt > 0) searches_with_edges++;
    for (int u = 0; u < 16; u++)
      for (int v = 0; v < 16; v++) begin
        int s = 0;
        for (int i = 0; i < 16; i++)
          for (int j = 0; j < 16; j++) begin
            int d = cb[16*i+j] - sa[u+i][v+j];
            if (d < 0) d = -d;
            s += bm[16*i+j] ? (d << nsh) : d;
          end
        if (best < 0 || s < best) begin
          best = s; exp_u = u; exp_v = v;
        end
      end
    exp_min = best;
  endtask

  longint k_now = -1;
  int t_valid;

  task automatic run_search(input int nsh);
    int total = 2*256 + 16*256 + 16 + 40;
    bit seen = 1'b0;
    int got_u = 0, got_v = 0, got_min = 0;
    n <= NSHW'(nsh);
    for (int k = 0; k < total; k++) begin
      int g = k - 512, h = k - 512 - 16;
      @(posedge clk);
      // outputs of the cycle that just ended (cycle k-1)
      if (k > 0) begin
        bit exp_req = (k-1 >= 512) && (k-1 < 512 + 4096 + 16);
        if (ref_req != exp_req) begin
          failures++;
          if (failures < 5) $display("ref_req wrong at k=%0d", k-1);
        end
        if (mv_valid && !seen) begin
          seen = 1'b1; got_u = mv_u; got_v = mv_v; got_min = mv_min; t_valid = k - 1;
        end
      end
      start   <= (k == 0);
      cur_pix <= PIXW'(cb[k % 256]);
      ref_p   <= (g >= 0 && g < 4096) ? PIXW'(sa[g/256 + (g%256)/16][g%16]) : PIXW'(0);
      ref_pp  <= (h >= 0 && h < 4096) ? PIXW'(sa[h/256 + (h%256)/16][16 + h%16]) : PIXW'(0);
    end
    checks += 5;
    if (!seen) begin failures++; $display("no motion vector"); end
    if (got_u != exp_u || got_v != exp_v) begin
      failures++; $display("MV got (%0d,%0d) exp (%0d,%0d)", got_u, got_v, exp_u, exp_v);
    end
    if (got_min != exp_min) begin
      failures++; $display("MIN got %0d exp %0d", got_min, exp_min);
    end
    // search time: 512 warm-up, last PE-0 term at 4095, 15 PE skew, 1 load, 16 compare
    if (t_valid != 512 + 4095 + 15 + 1 + 16 + 1) begin
      failures++; $display("mv_valid at cycle %0d", t_valid);
    end
    if (busy) begin failures++; $display("busy after result"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 6; t++) begin
      int du, dv, nsh;
      du  = $urandom_range(15);
      dv  = $urandom_range(15);
      nsh = (t % 2) ? 2 : 0;
      make_case(du, dv, (t < 2) ? 0 : 12);
      model(nsh);
      run_search(nsh);
      $display("search %0d: n=%0d mv=(%0d,%0d) exp (%0d,%0d) min %0d (true shift %0d,%0d)",
               t, nsh, mv_u, mv_v, exp_u, exp_v, exp_min, du, dv);
    end
    checks++;
    if (searches_with_edges == 0) begin failures++; $display("no edge pixels ever"); end
    $display("edge pixels seen: %0d", edge_pixels);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (6 * 5000 + 100) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
