// tb_crossbar: random routing test of the multiplexer crossbar.
//
// A 6-input, 4-output crossbar gets random data, sources and enables:
// each enabled output must carry its chosen input (several outputs may
// share one input), each disabled output 0. A 4 x 4 instance with all
// outputs reading distinct inputs checks a full permutation.
module tb_crossbar;
  logic [5:0][7:0] din;
  logic [3:0][2:0] src;
  logic [3:0]      en;
  logic [3:0][7:0] dout;
  logic [3:0][7:0] din2, dout2;
  logic [3:0][1:0] src2;
  int checks = 0, failures = 0, shared = 0;

  crossbar #(.NIN(6), .NOUT(4), .W(8)) dut (.din, .src, .en, .dout);
  crossbar #(.NIN(4), .NOUT(4), .W(8)) dut2 (.din(din2), .src(src2), .en(4'hf), .dout(dout2));

  initial begin
    for (int r = 0; r < 2000; r++) begin
      for (int i = 0; i < 6; i++) din[i] = 8'($urandom);
      for (int o = 0; o < 4; o++) src[o] = 3'($urandom_range(5));
      en = 4'($urandom);
      for (int i = 0; i < 4; i++) din2[i] = 8'($urandom);
      // random permutation
      for (int o = 0; o < 4; o++) src2[o] = 2'(o);
      for (int o = 3; o > 0; o--) begin
        int j = $urandom_range(o);
        logic [1:0] t = src2[o];
        src2[o] = src2[j];
        src2[j] = t;
      end
      #1;
      for (int o = 0; o < 4; o++) begin
        logic [7:0] e;
        e = en[o] ? din[src[o]] : 8'h00;
        checks++;
        if (dout[o] != e) begin failures++; $display("out %0d got %h exp %h", o, dout[o], e); end
        checks++;
        if (dout2[o] != din2[src2[o]]) begin failures++; $display("perm out %0d wrong", o); end
        for (int q = o + 1; q < 4; q++) if (en[o] && en[q] && src[o] == src[q]) shared++;
      end
    end
    checks++;
    if (shared == 0) begin failures++; $display("no shared input ever"); end
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
