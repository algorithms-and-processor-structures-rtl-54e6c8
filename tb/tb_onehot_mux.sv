// tb_onehot_mux: exhaustive-select test of the AND-OR multiplexer cell.
//
// For K = 4 (the document's 4-to-1 cell) and K = 5 (non-power-of-two
// tree) it applies random data with every select pattern: no select
// gives 0, one select gives that input, several give the OR of them.
module tb_onehot_mux;
  logic [3:0][7:0] d4;
  logic [3:0]      s4;
  logic [7:0]      o4;
  logic [4:0][5:0] d5;
  logic [4:0]      s5;
  logic [5:0]      o5;
  int checks = 0, failures = 0;

  onehot_mux #(.K(4), .W(8)) u4 (.din(d4), .sel(s4), .dout(o4));
  onehot_mux #(.K(5), .W(6)) u5 (.din(d5), .sel(s5), .dout(o5));

  initial begin
    for (int r = 0; r < 50; r++)
      for (int m = 0; m < 32; m++) begin
        logic [7:0] e4;
        logic [5:0] e5;
        for (int i = 0; i < 4; i++) d4[i] = 8'($urandom);
        for (int i = 0; i < 5; i++) d5[i] = 6'($urandom);
        s4 = 4'(m);
        s5 = 5'(m);
        e4 = '0;
        e5 = '0;
        for (int i = 0; i < 4; i++) if (s4[i]) e4 |= d4[i];
        for (int i = 0; i < 5; i++) if (s5[i]) e5 |= d5[i];
        #1;
        checks += 2;
        if (o4 != e4) begin failures++; $display("K4 sel=%b got %h exp %h", s4, o4, e4); end
        if (o5 != e5) begin failures++; $display("K5 sel=%b got %h exp %h", s5, o5, e5); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
