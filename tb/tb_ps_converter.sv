// tb_ps_converter: checks the input registers / parallel-to-serial bank.
// Writes eight random words through the select port, then shifts 16
// cycles: each serial output must show its word LSB first and then the
// sign bit. A write during shifting must land only in its register.
module tb_ps_converter;
  import dct_pkg::*;
  logic clk = 1'b0, wr_en = 1'b0, shift = 1'b0;
  logic [2:0] wr_sel = '0;
  logic signed [DW-1:0] wr_data = '0;
  logic [NPTS-1:0] xs;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ps_converter dut (.*);

  initial begin
    for (int w = 0; w < 50; w++) begin
      logic signed [DW-1:0] x [NPTS];
      for (int i = 0; i < NPTS; i++) begin
        x[i] = DW'($urandom);
        @(posedge clk);
        wr_en <= 1'b1; wr_sel <= 3'(i); wr_data <= x[i];
      end
      @(posedge clk);
      wr_en <= 1'b0; shift <= 1'b1;
      for (int s = 0; s < 16; s++) begin
        @(negedge clk);
        for (int i = 0; i < NPTS; i++) begin
          checks++;
          if (xs[i] != x[i][(s < DW) ? s : DW-1]) begin
            failures++; $display("word %0d bit %0d", i, s);
          end
        end
        @(posedge clk);
      end
      shift <= 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50 * 30 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
