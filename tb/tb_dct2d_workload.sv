// tb_dct2d_workload: 2-D DCT of a batch of 8x8 pixel blocks on the 1-D
// processor, the way a host uses it.
//
// For NBLK = 20 blocks of 8-bit pixels (level-shifted by -128) the host
// sends the eight rows of a block, keeps the row results, transposes them
// and sends the eight columns: 16 one-dimensional transforms per block,
// each pass of eight back to back at one per 32 cycles. Every coefficient
// is compared with the real-valued orthonormal 2-D DCT (tolerance 3, from
// the truncation of both passes). Because the column pass needs all row
// results, each pass costs 9 frames (8 transforms plus the 40-cycle
// latency), so the batch must finish within 20 x 2 x 9 x 32 cycles.
module tb_dct2d_workload;
  import dct_pkg::*;

  localparam int NB = 20;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [DW-1:0] d_in = '0, d_out;
  logic d_oe, out_valid, sync;
  int checks = 0, failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  dct_processor dut (.*);

  int pix [8][8];
  int rowres [8][8];
  int colres [8][8];
  real ref2d [8][8];
  int maxerr = 0;

  // send eight vectors, one per frame, and collect their eight results
  task automatic run8(input int vin [8][8], output int vout [8][8]);
    int nout = 0;
    fork
      for (int t = 0; t < 8; t++) begin
        do @(posedge clk); while (!sync);
        start <= 1'b1;
        d_in  <= DW'(vin[t][0]);
        for (int i = 1; i < 8; i++) begin
          @(posedge clk);
          start <= 1'b0;
          d_in  <= DW'(vin[t][i]);
        end
        @(posedge clk);
        d_in <= '0;
      end
      while (nout < 64) begin
        @(posedge clk);
        if (out_valid) begin
          vout[nout / 8][nout % 8] = int'(d_out);
          nout++;
        end
      end
    join
  endtask

  initial begin
    longint t0, t1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    do @(posedge clk); while (!sync);
    t0 = cycle;
    for (int b = 0; b < NB; b++) begin
      int cols [8][8];
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++)
          pix[y][x] = (b % 4 == 0) ? ((x + y) % 2 ? 127 : -128)     // worst-case texture
                                   : int'($urandom_range(255)) - 128;
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) begin
          automatic real acc = 0.0;
          for (int y = 0; y < 8; y++)
            for (int x = 0; x < 8; x++)
              acc += pix[y][x] * $cos(3.14159265358979 * (2*y+1) * u / 16.0)
                               * $cos(3.14159265358979 * (2*x+1) * v / 16.0);
          ref2d[u][v] = acc * ((u == 0) ? $sqrt(0.125) : 0.5) * ((v == 0) ? $sqrt(0.125) : 0.5);
        end
      run8(pix, rowres);                       // rowres[y][v]
      for (int x = 0; x < 8; x++)
        for (int y = 0; y < 8; y++) cols[x][y] = rowres[y][x];
      run8(cols, colres);                      // colres[v][u]
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) begin
          automatic real err = real'(colres[v][u]) - ref2d[u][v];
          automatic int ae = int'(err < 0 ? -err : err);
          checks++;
          if (ae > maxerr) maxerr = ae;
          if (err > 3.0 || err < -3.0) begin
            failures++;
            $display("block %0d F(%0d,%0d) got %0d real %f", b, u, v, colres[v][u], ref2d[u][v]);
          end
        end
    end
    t1 = cycle;
    // each run8 waits for its last result (40-cycle latency, 8 words) before
    // the next begins, so a pass of 8 transforms costs 7 x 32 + 40 + 8 cycles
    // plus the wait for the next frame boundary: 9 frames of 32 cycles
    checks++;
    if (t1 - t0 > longint'(NB) * 2 * 9 * 32 + 32) begin
      failures++; $display("too slow: %0d cycles", t1 - t0);
    end
    $display("%0d blocks, %0d cycles (%0d per block), max |error| %0d",
             NB, t1 - t0, (t1 - t0) / NB, maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NB * 2 * 10 * 32 + 1000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
