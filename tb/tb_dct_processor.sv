// tb_dct_processor: self-checking testbench of the serial DCT processor.
//
// Streams transforms through the bus interface, one every 32 cycles with
// one idle frame in between, and checks every output word against
//  (1) a bit-exact model: integer SD coefficients (x 2^14), exact sums,
//      floor to an integer and wrap to 12 bits, and
//  (2) the real-valued DCT-II, within 1.5 LSB, for inputs in range.
// It also checks the 40-cycle latency from x(0) to z(0), the 32-cycle
// transform rate, that no output appears for the idle frame, and that the
// bus is never driven during the write window.
module tb_dct_processor;
  import dct_pkg::*;

  localparam int NTRANS = 40;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [DW-1:0] d_in = '0, d_out;
  logic d_oe, out_valid, sync;
  int checks = 0, failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  dct_processor dut (.*);

  int xin  [NTRANS][8];
  int zexp [NTRANS][8];
  real zreal [NTRANS][8];
  longint t_start [NTRANS];
  int skip_idx = 20;        // no transform in this frame slot

  function automatic int wrap12(input longint v);
    longint m = v & 64'hFFF;
    return (m >= 2048) ? int'(m - 4096) : int'(m);
  endfunction

  function automatic void model(input int x[8], output int z[8], output real zr[8]);
    longint e[4], o[4];
    longint s;
    int ke[4][4] = '{'{SD_D, SD_D, SD_D, SD_D}, '{SD_B, SD_F, -SD_F, -SD_B},
                     '{SD_D, -SD_D, -SD_D, SD_D}, '{SD_F, -SD_B, SD_B, -SD_F}};
    int ko[4][4] = '{'{SD_A, SD_C, SD_E, SD_G}, '{SD_C, -SD_G, -SD_A, -SD_E},
                     '{SD_E, -SD_A, SD_G, SD_C}, '{SD_G, -SD_E, SD_C, -SD_A}};
    for (int j = 0; j < 4; j++) begin
      e[j] = x[j] + x[7-j];
      o[j] = x[j] - x[7-j];
    end
    for (int r = 0; r < 4; r++) begin
      s = 0;
      for (int j = 0; j < 4; j++) s += ke[r][j] * e[j];
      z[2*r] = wrap12(s >>> 14);
      s = 0;
      for (int j = 0; j < 4; j++) s += ko[r][j] * o[j];
      z[2*r+1] = wrap12(s >>> 14);
    end
    for (int u = 0; u < 8; u++) begin
      real acc = 0.0;
      for (int m = 0; m < 8; m++)
        acc += x[m] * $cos(3.14159265358979 * (2*m+1) * u / 16.0);
      zr[u] = acc * ((u == 0) ? 0.5 / $sqrt(2.0) : 0.5);
    end
  endfunction

  // stimulus
  initial begin
    for (int t = 0; t < NTRANS; t++)
      for (int i = 0; i < 8; i++) begin
        if (t == 0)      xin[t][i] = 724;                       // largest in-range DC
        else if (t == 1) xin[t][i] = (i % 2) ? -724 : 724;      // alternating
        else if (t == 2) xin[t][i] = -2048 + 585 * i;           // full range, wraps
        else if (t == 3) xin[t][i] = (i == 0) ? 2047 : 0;       // impulse
        else if (t < 30) xin[t][i] = int'($urandom_range(1448)) - 724;
        else             xin[t][i] = int'($urandom_range(4095)) - 2048;
      end
    for (int t = 0; t < NTRANS; t++) model(xin[t], zexp[t], zreal[t]);

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < NTRANS; t++) begin
      do @(posedge clk); while (!sync);
      if (t == skip_idx) begin
        @(posedge clk);  // leave one frame empty
        do @(posedge clk); while (!sync);
      end
      start <= 1'b1;
      d_in  <= DW'(xin[t][0]);
      t_start[t] = cycle + 1;
      for (int i = 1; i < 8; i++) begin
        @(posedge clk);
        start <= 1'b0;
        d_in  <= DW'(xin[t][i]);
      end
      @(posedge clk);
      d_in <= DW'($urandom);   // bus noise outside the write window
    end
  end

  // result checker
  int got = 0, widx = 0;
  longint first_out [NTRANS];
  always @(posedge clk) begin
    if (out_valid) begin
      if (widx == 0) first_out[got] = cycle;
      checks++;
      if (int'(d_out) != zexp[got][widx]) begin
        failures++;
        $display("MISMATCH t=%0d z(%0d) got %0d exp %0d", got, widx, d_out, zexp[got][widx]);
      end
      if (got < 30 && got != 2) begin
        automatic real err = real'(int'(d_out)) - zreal[got][widx];
        checks++;
        if (err > 1.5 || err < -1.5) begin
          failures++;
          $display("ACCURACY t=%0d z(%0d) got %0d real %f", got, widx, d_out, zreal[got][widx]);
        end
      end
      if (!d_oe) begin failures++; $display("d_oe low with out_valid"); end
      widx++;
      if (widx == 8) begin widx = 0; got++; end
    end
  end

  initial begin : finish_blk
    wait (got == NTRANS);
    repeat (40) @(posedge clk);
    // latency and rate
    for (int t = 0; t < NTRANS; t++) begin
      checks++;
      if (first_out[t] - t_start[t] != 40) begin
        failures++;
        $display("LATENCY t=%0d %0d cycles", t, first_out[t] - t_start[t]);
      end
      if (t > 0 && t != skip_idx) begin
        checks++;
        if (t_start[t] - t_start[t-1] != FRAME) begin
          failures++;
          $display("RATE t=%0d %0d cycles", t, t_start[t] - t_start[t-1]);
        end
      end
    end
    checks++;
    if (t_start[skip_idx] - t_start[skip_idx-1] != 2*FRAME) failures++;
    $display("done at cycle %0d time %0t, %0d transforms", cycle, $time, got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NTRANS * 80 + 500) @(posedge clk);
    failures++;
    $display("watchdog: %0d transforms received", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the processor must never drive the bus while the host writes
  always @(posedge clk) if (rst_n && start && d_oe) begin
    failures++; $display("bus conflict");
  end

endmodule
