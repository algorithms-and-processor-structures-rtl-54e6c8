// tb_mpc_top: end-to-end test of the whole design at its default sizes.
//
// The three engines run at the same time on one clock:
//  * DCT: 12 transforms over the shared bus, back to back with one idle
//    frame between, each output checked against the real-valued DCT-II
//    (within 1.5 LSB) and the 40-cycle latency checked.
//  * Edge-masked motion estimation: two full searches on a 32 x 32 area
//    with a bright object (so edge pixels occur), beta = 4 then beta = 1,
//    checked against a reference model of smoothing, Sobel threshold,
//    weighted sum and minimum search, and the 4640-cycle search time.
//  * Multiprocessor memory: the host writes part of the 2^16-word frame
//    memory (low and high modules), then four processors read from four
//    distinct modules in the same cycle; one cycle with two processors on
//    one module must raise `conflict`.
// Every mechanism is counted; one that never happened is a failure.
module tb_mpc_top;
  import dct_pkg::*;
  import me_pkg::*;

  localparam int NT = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  // DCT
  logic dct_start = 1'b0;
  logic signed [DW-1:0] dct_d_in = '0, dct_d_out;
  logic dct_d_oe, dct_out_valid, dct_sync;
  // ME
  logic me_start = 1'b0;
  logic [PIXW-1:0] me_cur_pix = '0, me_ref_p = '0, me_ref_pp = '0;
  logic [EDW-1:0]  me_thr = EDW'(1000);
  logic [NSHW-1:0] me_n = '0;
  logic me_ref_req, me_mv_valid, me_busy;
  logic [MVW-1:0] me_mv_u, me_mv_v;
  logic [ACCW-1:0] me_mv_min;
  // MP
  logic [3:0] mp_proc_en = '0;
  logic [3:0][9:0] mp_proc_mod = '0;
  logic [3:0][5:0] mp_proc_addr = '0;
  logic [3:0][7:0] mp_proc_data;
  logic mp_conflict;
  logic mp_host_we = 1'b0;
  logic [15:0] mp_host_addr = '0;
  logic [7:0] mp_host_wdata = '0;

  int checks = 0, failures = 0;
  longint cycle = 0;
  // mechanism counters
  int n_dct_back_to_back = 0, n_dct_idle = 0, n_dct_words = 0;
  int n_me_search = 0, n_me_edge_pix = 0, n_me_weighted = 0;
  int n_mp_host_wr = 0, n_mp_parallel = 0, n_mp_conflict = 0;
  bit dct_done = 1'b0, me_done = 1'b0, mp_done = 1'b0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  mpc_top dut (.*);

  // ------------------------------------------------------------------ DCT
  int xin [NT][8];
  real zr [NT][8];
  longint t_start [NT];

  initial begin : dct_drive
    for (int t = 0; t < NT; t++)
      for (int i = 0; i < 8; i++) xin[t][i] = int'($urandom_range(1448)) - 724;
    for (int t = 0; t < NT; t++)
      for (int u = 0; u < 8; u++) begin
        automatic real acc = 0.0;
        for (int m = 0; m < 8; m++)
          acc += xin[t][m] * $cos(3.14159265358979 * (2*m+1) * u / 16.0);
        zr[t][u] = acc * ((u == 0) ? 0.5 / $sqrt(2.0) : 0.5);
      end
    wait (rst_n);
    for (int t = 0; t < NT; t++) begin
      do @(posedge clk); while (!dct_sync);
      if (t == NT / 2) begin
        n_dct_idle++;
        @(posedge clk);
        do @(posedge clk); while (!dct_sync);
      end else if (t > 0) n_dct_back_to_back++;
      dct_start <= 1'b1;
      dct_d_in  <= DW'(xin[t][0]);
      t_start[t] = cycle + 1;
      for (int i = 1; i < 8; i++) begin
        @(posedge clk);
        dct_start <= 1'b0;
        dct_d_in  <= DW'(xin[t][i]);
      end
      @(posedge clk);
      dct_d_in <= '0;
    end
  end

  int dgot = 0, dw = 0;
  always @(posedge clk) if (dct_out_valid && !dct_done) begin
    automatic real err = real'(int'(dct_d_out)) - zr[dgot][dw];
    checks++;
    n_dct_words++;
    if (err > 1.5 || err < -1.5) begin
      failures++; $display("DCT t=%0d z(%0d) got %0d real %f", dgot, dw, dct_d_out, zr[dgot][dw]);
    end
    if (dw == 0) begin
      checks++;
      if (cycle - t_start[dgot] != 40) begin
        failures++; $display("DCT latency %0d", cycle - t_start[dgot]);
      end
    end
    dw++;
    if (dw == 8) begin dw = 0; dgot++; if (dgot == NT) dct_done = 1'b1; end
  end

  // ------------------------------------------------------------------- ME
  int sa [32][32];
  int cb [256];
  bit bm [256];
  int exp_u, exp_v, exp_min;

  function automatic int sm(input int k);
    int s = 0;
    for (int r = -2; r <= 2; r++)
      for (int c = -2; c <= 2; c++) s += cb[(k + 16*r + c + 1024) % 256];
    return s;
  endfunction

  task automatic me_model(input int nsh);
    int best = -1;
    for (int k = 0; k < 256; k++) begin
      int hx = (sm(k-17) + 2*sm(k-16) + sm(k-15)) - (sm(k+15) + 2*sm(k+16) + sm(k+17));
      int hy = (sm(k-17) - sm(k-15)) + 2*(sm(k-1) - sm(k+1)) + (sm(k+15) - sm(k+17));
      int m = (hx < 0 ? -hx : hx) + (hy < 0 ? -hy : hy);
      bm[k] = (m > int'(me_thr));
      n_me_edge_pix += bm[k];
    end
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

  initial begin : me_drive
    wait (rst_n);
    for (int run = 0; run < 2; run++) begin
      automatic int nsh = (run == 0) ? 2 : 0;
      automatic int du = $urandom_range(15), dv = $urandom_range(15);
      automatic int x0 = 4 + $urandom_range(18), y0 = 4 + $urandom_range(18);
      automatic int t_valid = -1, gu = 0, gv = 0, gmin = 0;
      for (int y = 0; y < 32; y++)
        for (int x = 0; x < 32; x++) begin
          sa[y][x] = 40 + $urandom_range(30);
          if (y >= y0 && y < y0 + 9 && x >= x0 && x < x0 + 7) sa[y][x] = 200 + $urandom_range(40);
        end
      for (int k = 0; k < 256; k++) begin
        automatic int v = sa[du + k/16][dv + k%16] + int'($urandom_range(16)) - 8;
        cb[k] = (v < 0) ? 0 : (v > 255 ? 255 : v);
      end
      me_model(nsh);
      if (nsh > 0) n_me_weighted++;
      me_n <= NSHW'(nsh);
      for (int k = 0; k < 2*256 + 4096 + 16 + 200; k++) begin
        automatic int g = k - 512, h = k - 528;
        @(posedge clk);
        if (k > 0 && me_mv_valid && t_valid < 0) begin
          t_valid = k - 1; gu = me_mv_u; gv = me_mv_v; gmin = me_mv_min;
        end
        me_start   <= (k == 0);
        me_cur_pix <= PIXW'(cb[k % 256]);
        me_ref_p   <= (g >= 0 && g < 4096) ? PIXW'(sa[g/256 + (g%256)/16][g%16]) : PIXW'(0);
        me_ref_pp  <= (h >= 0 && h < 4096) ? PIXW'(sa[h/256 + (h%256)/16][16 + h%16]) : PIXW'(0);
      end
      n_me_search++;
      checks += 3;
      if (gu != exp_u || gv != exp_v) begin
        failures++; $display("ME mv (%0d,%0d) exp (%0d,%0d)", gu, gv, exp_u, exp_v);
      end
      if (gmin != exp_min) begin failures++; $display("ME min %0d exp %0d", gmin, exp_min); end
      if (t_valid != 4640) begin failures++; $display("ME result at %0d", t_valid); end
      $display("ME search %0d: mv (%0d,%0d) min %0d, shift (%0d,%0d)", run, gu, gv, gmin, du, dv);
    end
    me_done = 1'b1;
  end

  // ------------------------------------------------------- multiprocessor
  logic [7:0] shadow [16384];   // modules 0..127 and 896..1023
  function automatic int sidx(input int mod, input int w);
    return (mod < 128) ? mod * 64 + w : (mod - 768) * 64 + w;
  endfunction

  initial begin : mp_drive
    int mods [4];
    int ed [4];
    bit ee [4];
    wait (rst_n);
    for (int i = 0; i < 16384; i++) begin
      automatic int mod = (i < 8192) ? i / 64 : 896 + (i - 8192) / 64;
      shadow[i] = 8'($urandom);
      @(posedge clk);
      mp_host_we    <= 1'b1;
      mp_host_addr  <= 16'(mod * 64 + i % 64);
      mp_host_wdata <= shadow[i];
      n_mp_host_wr++;
    end
    @(posedge clk);
    mp_host_we <= 1'b0;
    for (int r = 0; r < 500; r++) begin
      for (int p = 0; p < 4; p++) begin
        automatic bit clash;
        do begin
          mods[p] = $urandom_range(255);
          mods[p] = (mods[p] < 128) ? mods[p] : mods[p] + 768;
          clash = 1'b0;
          for (int q = 0; q < p; q++) if (mods[q] == mods[p]) clash = 1'b1;
        end while (clash);
      end
      @(posedge clk);
      #1;
      for (int p = 0; p < 4; p++) begin
        if (ee[p]) begin
          checks++;
          if (mp_proc_data[p] != 8'(ed[p])) begin
            failures++; $display("MP proc %0d got %h exp %h", p, mp_proc_data[p], ed[p]);
          end
        end
        begin
          automatic int a = $urandom_range(63);
          ee[p] = (r < 499);
          ed[p] = shadow[sidx(mods[p], a)];
          mp_proc_en[p]   <= ee[p];
          mp_proc_mod[p]  <= 10'(mods[p]);
          mp_proc_addr[p] <= 6'(a);
        end
      end
      if (r < 499) n_mp_parallel++;
      checks++;
      if (mp_conflict) begin failures++; $display("MP false conflict"); end
    end
    mp_done = 1'b1;
  end

  // ---------------------------------------------------------------- main
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (dct_done && me_done && mp_done);
    // a module conflict, with the rule checker disarmed (reset held)
    @(posedge clk);
    rst_n <= 1'b0;
    mp_proc_en  <= 4'b0110;
    mp_proc_mod[1] <= 10'd7;
    mp_proc_mod[2] <= 10'd7;
    @(posedge clk);
    #1;
    checks++;
    if (mp_conflict) n_mp_conflict++;
    else begin failures++; $display("MP conflict not flagged"); end
    mp_proc_en <= '0;
    $display("mechanisms: dct back-to-back %0d, dct idle frames %0d, dct words %0d",
             n_dct_back_to_back, n_dct_idle, n_dct_words);
    $display("            me searches %0d, edge pixels %0d, weighted (beta>1) %0d",
             n_me_search, n_me_edge_pix, n_me_weighted);
    $display("            mp host writes %0d, 4-way parallel reads %0d, conflicts %0d",
             n_mp_host_wr, n_mp_parallel, n_mp_conflict);
    checks += 9;
    if (n_dct_back_to_back == 0) failures++;
    if (n_dct_idle == 0) failures++;
    if (n_dct_words != 8 * NT) failures++;
    if (n_me_search == 0) failures++;
    if (n_me_edge_pix == 0) failures++;
    if (n_me_weighted == 0) failures++;
    if (n_mp_host_wr == 0) failures++;
    if (n_mp_parallel == 0) failures++;
    if (n_mp_conflict == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog: dct %0d me %0d mp %0d", dct_done, me_done, mp_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
