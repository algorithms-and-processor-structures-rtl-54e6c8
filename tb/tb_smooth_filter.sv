// tb_smooth_filter: checks the 5x5 box filter on a raster stream.
// Streams random 8-bit pixels (with runs of 255 to reach the largest sum)
// and, once the filter is full, compares each output with
//   sum_{r=0..4} sum_{c=1..5} pix(t - 1 - 16 r - c)
// computed from the stimulus history.
module tb_smooth_filter;
  import me_pkg::*;
  localparam int NS = 3000;
  logic clk = 1'b0;
  logic [PIXW-1:0] pix = '0;
  logic [SMW-1:0] sm;
  int checks = 0, failures = 0;
  int hist [NS];
  always #5 clk = ~clk;

  smooth_filter dut (.*);

  initial begin
    for (int t = 0; t < NS; t++)
      hist[t] = (t >= 1000 && t < 1200) ? 255 : int'($urandom_range(255));
    for (int t = 0; t < NS; t++) begin
      pix <= PIXW'(hist[t]);          // pixel of cycle t
      @(negedge clk);
      if (t >= 80) begin             // output of cycle t
        automatic int e = 0;
        for (int r = 0; r < 5; r++)
          for (int c = 1; c <= 5; c++) e += hist[t - 1 - 16*r - c];
        checks++;
        if (int'(sm) != e) begin failures++; if (failures < 5) $display("t=%0d %0d exp %0d", t, sm, e); end
      end
      @(posedge clk);
    end
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
