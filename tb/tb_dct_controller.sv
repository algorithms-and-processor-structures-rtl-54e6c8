// tb_dct_controller: checks the logic controller's 32-cycle schedule.
// After reset the phase is 0. Over several frames, with start given in
// some and not others, every control output is compared each cycle with
// the schedule worked out from the phase (see dct_controller): write
// window and select, shift windows, stream start, sign hold, tap enable
// thermometer, capture window, output window and out_valid one frame
// after each started transform.
module tb_dct_controller;
  import dct_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic sync, wr_en, ps_shift, stream_start, hold, sp_shift, rd_en, out_valid;
  logic [2:0] wr_sel, rd_sel;
  logic [TAPS-1:0] tap_en;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dct_controller dut (.*);

  bit started [16];

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < 16; f++) started[f] = (f % 3) != 1;
    for (int f = 0; f < 16; f++)
      for (int p = 0; p < FRAME; p++) begin
        int s;
        logic [TAPS-1:0] te;
        bit ld, ov;
        start <= (p == 0) ? started[f] : 1'($urandom);  // start outside phase 0 is ignored
        @(negedge clk);
        s  = (p - 8 + 32) % 32;
        ld = started[f];
        ov = (f > 0) && started[f-1] && p >= 8 && p < 16;
        for (int k = 0; k < TAPS; k++) te[k] = (s >= k);
        checks++;
        if (sync != (p == 31) || wr_sel != 3'(p) ||
            wr_en != (ld && p < 8) || ps_shift != (s <= 12) ||
            stream_start != (s == 0) || hold != (s >= 13) || tap_en != te ||
            sp_shift != (s >= 14 && s <= 25) || rd_en != (p >= 8 && p < 16) ||
            (rd_en && rd_sel != 3'(p - 8)) || out_valid != ov) begin
          failures++;
          $display("frame %0d phase %0d: wr_en %b ps %b st %b hold %b sp %b rd %b ov %b",
                   f, p, wr_en, ps_shift, stream_start, hold, sp_shift, rd_en, out_valid);
        end
        @(posedge clk);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (16 * FRAME + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
