// tb_serial_addsub: checks the bit-serial adder and subtractor.
// Random signed 16-bit operand pairs are streamed LSB first, sign-extended
// to 20 bits, through an adder and a subtractor instance back to back with
// no idle cycle; the 20 result bits of each must equal a+b and a-b.
module tb_serial_addsub;
  logic clk = 1'b0, start = 1'b0, a = 1'b0, b = 1'b0, s_add, s_sub;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  serial_addsub #(.SUB(1'b0)) u_add (.clk, .start, .a, .b, .s(s_add));
  serial_addsub #(.SUB(1'b1)) u_sub (.clk, .start, .a, .b, .s(s_sub));

  initial begin
    for (int w = 0; w < 200; w++) begin
      logic signed [19:0] x, y, ra, rs;
      x = 20'(signed'(16'($urandom)));
      y = 20'(signed'(16'($urandom)));
      if (w == 0) begin x = 20'sd32767; y = 20'sd32767; end
      if (w == 1) begin x = -20'sd32768; y = 20'sd32767; end
      for (int i = 0; i < 20; i++) begin
        start <= (i == 0);
        a <= x[i];
        b <= y[i];
        @(negedge clk);
        ra[i] = s_add;
        rs[i] = s_sub;
        @(posedge clk);
      end
      checks += 2;
      if (ra != x + y) begin failures++; $display("add %0d %0d -> %0d", x, y, ra); end
      if (rs != x - y) begin failures++; $display("sub %0d %0d -> %0d", x, y, rs); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * 20 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
