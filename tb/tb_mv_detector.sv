// tb_mv_detector: self-checking test of the 16-PE motion vector detector.
//
// Drives the current-block stream, a mask stream and the two reference
// buses directly (no edge detector in front). A reference model computes
// every masked sum sum |a-b| * (mask ? 2^n : 1) over the 16 x 16
// candidates and picks the minimum with the tie rule (smaller u, then
// smaller v). Cases: random blocks at a random true displacement, random
// masks and n, and a flat picture where every candidate ties (expects
// (0,0)). Also checks the result time (4128 cycles after start) and busy.
module tb_mv_detector;
  import me_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [PIXW-1:0] cur = '0, ref_p = '0, ref_pp = '0;
  logic mask = 1'b0;
  logic [NSHW-1:0] n = '0;
  logic [MVW-1:0] mv_u, mv_v;
  logic [ACCW-1:0] mv_min;
  logic mv_valid, busy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mv_detector dut (.*);

  int sa [32][32];
  int cb [256];
  bit bm [256];
  int exp_u, exp_v, exp_min;

  task automatic make_case(input int kind);
    int du = $urandom_range(15), dv = $urandom_range(15);
    for (int y = 0; y < 32; y++)
      for (int x = 0; x < 32; x++)
        sa[y][x] = (kind == 0) ? 77 : int'($urandom_range(255));
    for (int k = 0; k < 256; k++) begin
      int v = sa[du + k/16][dv + k%16];
      if (kind == 2) v = v + int'($urandom_range(20)) - 10;
      cb[k] = (v < 0) ? 0 : (v > 255 ? 255 : v);
      bm[k] = ($urandom_range(3) == 0);
    end
  endtask

  task automatic model(input int nsh);
    int best = -1;
    for (int u = 0; u < 16; u++)
      for (int v = 0; v < 16; v++) begin
        int s = 0;
        for (int k = 0; k < 256; k++) begin
          int d = cb[k] - sa[u + k/16][v + k%16];
          if (d < 0) d = -d;
          s += bm[k] ? (d << nsh) : d;
        end
        if (best < 0 || s < best) begin best = s; exp_u = u; exp_v = v; end
      end
    exp_min = best;
  endtask

  task automatic run(input int nsh);
    int total = 4096 + 16 + 40, t_valid = -1;
    int got_u = 0, got_v = 0, got_min = 0;
    n <= NSHW'(nsh);
    for (int k = 0; k < total; k++) begin
      int h = k - 16;
      @(posedge clk);
      if (k > 0) begin
        if (mv_valid && t_valid < 0) begin
          t_valid = k - 1; got_u = mv_u; got_v = mv_v; got_min = mv_min;
        end
        if (k > 1 && k - 1 < 4128 && !busy) begin
          failures++; $display("busy low during search at %0d", k-1);
        end
      end
      start  <= (k == 0);
      cur    <= (k < 4096) ? PIXW'(cb[k % 256]) : PIXW'(0);
      mask   <= (k < 4096) ? bm[k % 256] : 1'b0;
      ref_p  <= (k < 4096) ? PIXW'(sa[k/256 + (k%256)/16][k%16]) : PIXW'(0);
      ref_pp <= (h >= 0 && h < 4096) ? PIXW'(sa[h/256 + (h%256)/16][16 + h%16]) : PIXW'(0);
    end
    checks += 4;
    if (got_u != exp_u || got_v != exp_v) begin
      failures++; $display("MV got (%0d,%0d) exp (%0d,%0d)", got_u, got_v, exp_u, exp_v);
    end
    if (got_min != exp_min) begin failures++; $display("MIN got %0d exp %0d", got_min, exp_min); end
    if (t_valid != 4128) begin failures++; $display("mv_valid at %0d", t_valid); end
    if (busy) begin failures++; $display("busy after result"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 6; t++) begin
      int kind, nsh;
      kind = (t == 0) ? 0 : ((t < 3) ? 1 : 2);
      nsh  = $urandom_range(3);
      make_case(kind);
      model(nsh);
      run(nsh);
      $display("case %0d: n=%0d mv=(%0d,%0d) min %0d exp (%0d,%0d) %0d",
               t, nsh, mv_u, mv_v, mv_min, exp_u, exp_v, exp_min);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (6 * 4200 + 100) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
