// tb_emmad_pe: checks the edge-weighted absolute-difference accumulator.
// Runs random-length accumulations of random pixel pairs and mask bits,
// with n from 0 to 4 and idle (en low) cycles mixed in; at each `last` the
// latched result must equal sum |a-b| * (mask ? 2^n : 1), and it must hold
// until the next `last`.
module tb_emmad_pe;
  import me_pkg::*;
  logic clk = 1'b0, en = 1'b0, first = 1'b0, last = 1'b0, mask = 1'b0;
  logic [PIXW-1:0] a = '0, b = '0;
  logic [NSHW-1:0] n = '0;
  logic [ACCW-1:0] result;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  emmad_pe dut (.*);

  initial begin
    for (int w = 0; w < 200; w++) begin
      int len, k, expv;
      len  = 1 + $urandom_range(300);
      expv = 0;
      k    = 0;
      n   <= NSHW'(w % 5);
      while (k < len) begin
        @(posedge clk);
        en <= 1'($urandom);
        begin
          int av, bv, mv, d;
          av = $urandom_range(255); bv = $urandom_range(255); mv = $urandom_range(1);
          a <= PIXW'(av); b <= PIXW'(bv); mask <= mv[0];
          if ($urandom_range(3) != 0) begin
            en <= 1'b1; first <= (k == 0); last <= (k == len - 1);
            d = (av > bv) ? av - bv : bv - av;
            expv += mv ? (d << (w % 5)) : d;
            k++;
          end else begin
            en <= 1'b0; first <= 1'b1; last <= 1'b1;   // ignored while en is low
          end
        end
      end
      @(posedge clk);
      en <= 1'b0;
      @(negedge clk);
      checks++;
      if (int'(result) != expv) begin failures++; $display("w=%0d got %0d exp %0d", w, result, expv); end
      repeat (3) @(posedge clk);
      @(negedge clk);
      checks++;
      if (int'(result) != expv) begin failures++; $display("w=%0d result not held", w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * 450 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
