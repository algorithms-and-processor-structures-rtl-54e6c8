// tb_sp_converter: checks the serial-to-parallel output registers.
// Shifts twelve random bits into each of the eight registers (first bit
// ends in the LSB), then idles with random serial inputs: the words must
// appear and then hold.
module tb_sp_converter;
  import dct_pkg::*;
  logic clk = 1'b0, shift = 1'b0;
  logic [NPTS-1:0] zs = '0;
  logic signed [DW-1:0] z [NPTS];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sp_converter dut (.*);

  initial begin
    for (int w = 0; w < 50; w++) begin
      logic [DW-1:0] v [NPTS];
      for (int i = 0; i < NPTS; i++) v[i] = DW'($urandom);
      for (int s = 0; s < DW; s++) begin
        @(posedge clk);
        shift <= 1'b1;
        for (int i = 0; i < NPTS; i++) zs[i] <= v[i][s];
      end
      @(posedge clk);
      shift <= 1'b0;
      zs <= NPTS'($urandom);
      repeat (3) @(posedge clk);
      @(negedge clk);
      for (int i = 0; i < NPTS; i++) begin
        checks++;
        if (z[i] != v[i]) begin failures++; $display("word %0d %h exp %h", i, z[i], v[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50 * 20 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
