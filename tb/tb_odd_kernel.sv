// tb_odd_kernel: checks the bit-serial odd kernel matrix product.
// Four random 13-bit signed inputs o0..o3 are streamed back to back for
// 30 stream cycles with the thermometer tap enable; stream bits 0..29 of
// z(1), z(3), z(5), z(7) must equal the odd matrix rows (integer SD
// coefficients) times the inputs, modulo 2^30.
module tb_odd_kernel;
  import dct_pkg::*;
  localparam int L = 30;
  logic clk = 1'b0, start = 1'b0;
  logic [3:0] o = '0, z;
  logic [TAPS-1:0] tap_en = '0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  odd_kernel dut (.*);

  int km [4][4] = '{'{SD_A, SD_C, SD_E, SD_G}, '{SD_C, -SD_G, -SD_A, -SD_E},
                    '{SD_E, -SD_A, SD_G, SD_C}, '{SD_G, -SD_E, SD_C, -SD_A}};

  initial begin
    for (int w = 0; w < 100; w++) begin
      logic signed [L-1:0] in [4];
      logic signed [L-1:0] got [4];
      longint expv;
      for (int j = 0; j < 4; j++) in[j] = L'(signed'(13'($urandom)));
      for (int s = 0; s < L; s++) begin
        start <= (s == 0);
        for (int j = 0; j < 4; j++) o[j] <= in[j][s];
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
