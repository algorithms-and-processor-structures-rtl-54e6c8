// tb_odd_kernel_mult: checks a*x, c*x, e*x and g*x of the odd SD multiplier.
// Random 13-bit signed words are streamed back to back (28 stream cycles
// each, so the delay line still holds the previous word when a new one
// starts) with the thermometer tap enable; stream bits 0..27 of each
// product must equal x * C modulo 2^28 with C = 8034, 6812, 4552 and 1598.
module tb_odd_kernel_mult;
  import dct_pkg::*;
  localparam int L = 28;
  logic clk = 1'b0, start = 1'b0, x = 1'b0, ax, cx, ex, gx;
  logic [TAPS-1:0] tap_en = '0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  odd_kernel_mult dut (.*);

  initial begin
    for (int w = 0; w < 150; w++) begin
      logic signed [L-1:0] xv, pa, pc, pe, pg;
      xv = L'(signed'(13'($urandom)));
      if (w == 0) xv = -L'(4096);
      for (int s = 0; s < L; s++) begin
        start  <= (s == 0);
        x      <= xv[s];
        for (int k = 0; k < TAPS; k++) tap_en[k] <= (s >= k);
        @(negedge clk);
        pa[s] = ax; pc[s] = cx; pe[s] = ex; pg[s] = gx;
        @(posedge clk);
      end
      checks += 4;
      if (pa != L'(xv * SD_A)) begin failures++; $display("a*%0d -> %0d", xv, pa); end
      if (pc != L'(xv * SD_C)) begin failures++; $display("c*%0d -> %0d", xv, pc); end
      if (pe != L'(xv * SD_E)) begin failures++; $display("e*%0d -> %0d", xv, pe); end
      if (pg != L'(xv * SD_G)) begin failures++; $display("g*%0d -> %0d", xv, pg); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (150 * L + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
