// tb_even_kernel_mult: checks b*x, d*x and f*x of the even SD multiplier.
// Random 13-bit signed words are streamed back to back (28 stream cycles
// each, so the delay line still holds the previous word when a new one
// starts) with the thermometer tap enable; stream bits 0..27 of each
// product must equal x * C modulo 2^28 with C = 7568, 5792 and 3135.
module tb_even_kernel_mult;
  import dct_pkg::*;
  localparam int L = 28;
  logic clk = 1'b0, start = 1'b0, x = 1'b0, bx, dx, fx;
  logic [TAPS-1:0] tap_en = '0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  even_kernel_mult dut (.*);

  initial begin
    for (int w = 0; w < 150; w++) begin
      logic signed [L-1:0] xv, pb, pd, pf;
      xv = L'(signed'(13'($urandom)));
      if (w == 0) xv = -L'(4096);
      for (int s = 0; s < L; s++) begin
        start  <= (s == 0);
        x      <= xv[s];
        for (int k = 0; k < TAPS; k++) tap_en[k] <= (s >= k);
        @(negedge clk);
        pb[s] = bx; pd[s] = dx; pf[s] = fx;
        @(posedge clk);
      end
      checks += 3;
      if (pb != L'(xv * SD_B)) begin failures++; $display("b*%0d -> %0d", xv, pb); end
      if (pd != L'(xv * SD_D)) begin failures++; $display("d*%0d -> %0d", xv, pd); end
      if (pf != L'(xv * SD_F)) begin failures++; $display("f*%0d -> %0d", xv, pf); end
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
