// tb_sobel_edge_detector: checks the Sobel operator and comparator.
// Streams random smoothed samples (0..6375, with flat and step regions)
// and compares, once the delay lines are full, mag(t) with the 3x3 Sobel
// |hx| + |hy| centred on sample t - 18 of the 16-wide raster, and
// edge(t) with mag(t-1) > thr, for several thresholds.
module tb_sobel_edge_detector;
  import me_pkg::*;
  localparam int NS = 4000;
  logic clk = 1'b0;
  logic [SMW-1:0] sm = '0;
  logic [EDW-1:0] thr = EDW'(1000), mag;
  logic edge_o;
  int checks = 0, failures = 0, edges = 0;
  int h [NS];
  always #5 clk = ~clk;

  sobel_edge_detector dut (.*);

  function automatic int at(input int k); return h[k]; endfunction

  initial begin
    automatic int prev_mag = 0;
    automatic int prev_thr = 0;
    for (int t = 0; t < NS; t++)
      h[t] = (t < 1000) ? int'($urandom_range(6375))
           : (t < 2000) ? (((t / 7) % 2) ? 6375 : 0)
           : (t < 3000) ? 3000 : int'($urandom_range(6375));
    for (int t = 0; t < NS; t++) begin
      sm <= SMW'(h[t]);
      if (t % 500 == 0) thr <= EDW'($urandom_range(20000));
      @(negedge clk);
      if (t >= 60) begin
        automatic int c = t - 18;
        automatic int hx = (at(c-17) + 2*at(c-16) + at(c-15)) - (at(c+15) + 2*at(c+16) + at(c+17));
        automatic int hy = (at(c-17) - at(c-15)) + 2*(at(c-1) - at(c+1)) + (at(c+15) - at(c+17));
        automatic int m = (hx < 0 ? -hx : hx) + (hy < 0 ? -hy : hy);
        checks++;
        if (int'(mag) != m) begin failures++; if (failures < 5) $display("t=%0d mag %0d exp %0d", t, mag, m); end
        if (t >= 61) begin
          checks++;
          if (edge_o != (prev_mag > prev_thr)) begin failures++; if (failures < 5) $display("t=%0d edge", t); end
        end
        edges += edge_o;
        prev_mag = m;
        prev_thr = int'(thr);
      end
      @(posedge clk);
    end
    checks++;
    if (edges == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
