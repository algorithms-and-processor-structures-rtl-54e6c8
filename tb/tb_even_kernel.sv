// tb_even_kernel: checks the bit-serial even kernel matrix product.
// Four random 13-bit signed inputs e0..e3 are streamed back to back for
// 30 stream cycles with the thermometer tap enable; stream bits 0..29 of
// z(0), z(2), z(4), z(6) must equal the even matrix rows (integer SD
// coefficients) times the inputs, modulo 2^30.
module tb_even_kernel;
  import dct_pkg::*;
  localparam int L = 30;
  logic clk = 1'b0, start = 1'b0;
  logic [3:0] e = '0, z;
  logic [TAPS-1:0] tap_en = '0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  even_kernel dut (.*);

  int km [4][4] = '{'{SD_D, SD_D, SD_D, SD_D}, '{SD_B, SD_F, -SD_F, -SD_B},
                    '{SD_D, -SD_D, -SD_D, SD_D}, '{SD_F, -SD_B, SD_B, -SD_F}};

  initial begin
    for (int w = 0; w < 100; w++) begin
      logic signed [L-1:0] in [4];
      logic signed [L-1:0] got [4];
      longint expv;
      for (int j = 0; j < 4; j++) in[j] = L'(signed'(13'($urandom)));
      for (int s = 0; s < L; s++) begin
        start <= (s == 0);
        for (int j = 0; j < 4; j++) e[j] <= in[j][s];
        for (int k = 0; k < TAPS; k++) tap_en[k] <= (s >= k);
        @(negedge clk);
        for (int r = 0; r < 4; r++) got[r][s] = z[r];
        @(posedge clk);
      end
      for (int r = 0; r < 4; r++) begin
        expv = 0;
        for (int j = 0; j < 4; j++) expv += longint'(km[r][j]) * longint'(in[j]);
        checks++;
        if (got[r] != L'(expv)) begin
          failures++; $display("row %0d got %0d exp %0d", r, got[r], expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100 * L + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
