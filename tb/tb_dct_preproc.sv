// tb_dct_preproc: checks the serial butterflies and their sign hold.
// Eight random 12-bit words are presented LSB first, sign-extended, for 13
// cycles and then replaced by random garbage (as when the input registers
// stop shifting) while `hold` is high. Stream bits 0..27 of e_j and o_j
// must equal x(j) + x(7-j) and x(j) - x(7-j), sign-extended.
module tb_dct_preproc;
  import dct_pkg::*;
  localparam int L = 28;
  logic clk = 1'b0, start = 1'b0, hold = 1'b0;
  logic [NPTS-1:0] xs = '0;
  logic [3:0] e, o;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dct_preproc dut (.*);

  initial begin
    for (int w = 0; w < 200; w++) begin
      logic signed [L-1:0] x [NPTS];
      logic signed [L-1:0] ge [4];
      logic signed [L-1:0] go [4];
      for (int i = 0; i < NPTS; i++) x[i] = L'(signed'(12'($urandom)));
      if (w == 0) for (int i = 0; i < NPTS; i++) x[i] = (i < 4) ? L'(2047) : -L'(2048);
      for (int s = 0; s < L; s++) begin
        start <= (s == 0);
        hold  <= (s >= 13);
        for (int i = 0; i < NPTS; i++) xs[i] <= (s < 13) ? x[i][s] : 1'($urandom);
        @(negedge clk);
        for (int j = 0; j < 4; j++) begin ge[j][s] = e[j]; go[j][s] = o[j]; end
        @(posedge clk);
      end
      for (int j = 0; j < 4; j++) begin
        checks += 2;
        if (ge[j] != x[j] + x[7-j]) begin failures++; $display("e%0d %0d", j, ge[j]); end
        if (go[j] != x[j] - x[7-j]) begin failures++; $display("o%0d %0d", j, go[j]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * L + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
