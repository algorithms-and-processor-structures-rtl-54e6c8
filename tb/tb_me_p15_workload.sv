// tb_me_p15_workload: edge-masked motion search with maximum displacement
// p = 15, T = 40 and beta = 4 on the 16 x 16-position estimator.
//
// A search of +-15 covers 31 x 31 positions over a 46 x 46 area. The
// estimator covers 16 x 16 positions per search, so the host runs four
// searches on the four overlapping 31 x 31 quarters of the area (origins
// 0 and 15 in each direction) and keeps the best result, smaller u then
// smaller v on ties. A reference model does the full 31 x 31 search with
// the same mask; the combined vector and minimum must match it. The
// total time is checked: four searches of 4640 cycles.
module tb_me_p15_workload;
  import me_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [PIXW-1:0] cur_pix = '0, ref_p = '0, ref_pp = '0;
  logic [EDW-1:0]  thr = EDW'(25 * 40);
  logic [NSHW-1:0] n = NSHW'(2);
  logic ref_req, mv_valid, busy;
  logic [MVW-1:0] mv_u, mv_v;
  logic [ACCW-1:0] mv_min;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  edge_masked_me dut (.*);

  int sa [46][46];
  int cb [256];
  bit bm [256];

  function automatic int sm(input int k);
    int s = 0;
    for (int r = -2; r <= 2; r++)
      for (int c = -2; c <= 2; c++) s += cb[(k + 16*r + c + 1024) % 256];
    return s;
  endfunction

  function automatic int emmad(input int u, input int v);
    int s = 0;
    for (int k = 0; k < 256; k++) begin
      int d = cb[k] - sa[u + k/16][v + k%16];
      if (d < 0) d = -d;
      s += bm[k] ? (d << 2) : d;
    end
    return s;
  endfunction

  task automatic search(input int u0, input int v0, output int gu, output int gv,
                        output int gmin, output int t_valid);
    t_valid = -1;
    for (int k = 0; k < 2*256 + 4096 + 16 + 40; k++) begin
      automatic int g = k - 512, h = k - 528;
      @(posedge clk);
      if (k > 0 && mv_valid && t_valid < 0) begin
        t_valid = k - 1; gu = mv_u; gv = mv_v; gmin = mv_min;
      end
      start   <= (k == 0);
      cur_pix <= PIXW'(cb[k % 256]);
      ref_p   <= (g >= 0 && g < 4096) ? PIXW'(sa[u0 + g/256 + (g%256)/16][v0 + g%16]) : PIXW'(0);
      ref_pp  <= (h >= 0 && h < 4096) ? PIXW'(sa[u0 + h/256 + (h%256)/16][v0 + 16 + h%16]) : PIXW'(0);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int run = 0; run < 2; run++) begin
      automatic int du = $urandom_range(30), dv = $urandom_range(30);
      automatic int x0 = dv + 2 + $urandom_range(6), y0 = du + 2 + $urandom_range(6);
      automatic int best = -1, bu = 0, bv = 0, hw_best = -1, hu = 0, hv = 0, edges = 0;
      for (int y = 0; y < 46; y++)
        for (int x = 0; x < 46; x++) begin
          sa[y][x] = 50 + $urandom_range(40);
          if (y >= y0 && y < y0 + 8 && x >= x0 && x < x0 + 6) sa[y][x] = 190 + $urandom_range(50);
        end
      for (int k = 0; k < 256; k++) begin
        automatic int v = sa[du + k/16][dv + k%16] + int'($urandom_range(10)) - 5;
        cb[k] = (v < 0) ? 0 : (v > 255 ? 255 : v);
      end
      for (int k = 0; k < 256; k++) begin
        automatic int hx = (sm(k-17) + 2*sm(k-16) + sm(k-15)) - (sm(k+15) + 2*sm(k+16) + sm(k+17));
        automatic int hy = (sm(k-17) - sm(k-15)) + 2*(sm(k-1) - sm(k+1)) + (sm(k+15) - sm(k+17));
        bm[k] = ((hx < 0 ? -hx : hx) + (hy < 0 ? -hy : hy)) > int'(thr);
        edges += bm[k];
      end
      for (int u = 0; u < 31; u++)
        for (int v = 0; v < 31; v++) begin
          automatic int s = emmad(u, v);
          if (best < 0 || s < best) begin best = s; bu = u; bv = v; end
        end
      for (int q = 0; q < 4; q++) begin
        automatic int u0 = (q / 2) * 15, v0 = (q % 2) * 15;
        int gu, gv, gmin, tv;
        search(u0, v0, gu, gv, gmin, tv);
        checks++;
        if (tv != 4640) begin failures++; $display("search time %0d", tv); end
        gu += u0;
        gv += v0;
        if (hw_best < 0 || gmin < hw_best ||
            (gmin == hw_best && (gu < hu || (gu == hu && gv < hv)))) begin
          hw_best = gmin; hu = gu; hv = gv;
        end
      end
      checks += 3;
      if (hu != bu || hv != bv) begin
        failures++; $display("MV (%0d,%0d) exp (%0d,%0d)", hu, hv, bu, bv);
      end
      if (hw_best != best) begin failures++; $display("min %0d exp %0d", hw_best, best); end
      if (edges == 0) begin failures++; $display("no edge pixels"); end
      $display("run %0d: displacement (%0d,%0d) -> mv (%0d,%0d), min %0d, %0d edge pixels",
               run, du - 15, dv - 15, hu - 15, hv - 15, hw_best, edges);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2 * 4 * 4800 + 100) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
