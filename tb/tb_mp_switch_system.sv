// tb_mp_switch_system: memory modules and switching networks.
//
// A reduced instance (4 processors, 16 modules of 64 words) is filled by
// the host port from a shadow array, then four processors read in every
// cycle from distinct random modules (conflict-free, as a scheduler
// would arrange). Each read word must arrive one cycle after its
// address. A final cycle with two processors on one module must raise
// `conflict` (with rst_n low so the assertion is not armed).
module tb_mp_switch_system;
  localparam int P = 4, MEM_WORDS = 1024, BLK = 64, K = MEM_WORDS / BLK;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [P-1:0] proc_en = '0;
  logic [P-1:0][3:0] proc_mod = '0;
  logic [P-1:0][5:0] proc_addr = '0;
  logic [P-1:0][7:0] proc_data;
  logic conflict;
  logic host_we = 1'b0;
  logic [9:0] host_addr = '0;
  logic [7:0] host_wdata = '0;
  int checks = 0, failures = 0;
  logic [7:0] shadow [MEM_WORDS];

  always #5 clk = ~clk;

  mp_switch_system #(.P(P), .MEM_WORDS(MEM_WORDS), .BLK_WORDS(BLK), .WORD_W(8)) dut (.*);

  initial begin
    int exp_data [P];
    bit exp_en [P];
    for (int a = 0; a < MEM_WORDS; a++) shadow[a] = 8'($urandom);
    @(posedge clk);
    for (int a = 0; a < MEM_WORDS; a++) begin
      host_we <= 1'b1; host_addr <= 10'(a); host_wdata <= shadow[a];
      @(posedge clk);
    end
    host_we <= 1'b0;
    rst_n <= 1'b1;
    for (int r = 0; r < 600; r++) begin
      int mods [P];
      // distinct modules
      for (int p = 0; p < P; p++) begin
        bit clash;
        do begin
          mods[p] = $urandom_range(K-1);
          clash = 1'b0;
          for (int q = 0; q < p; q++) if (mods[q] == mods[p]) clash = 1'b1;
        end while (clash);
      end
      for (int p = 0; p < P; p++) begin
        automatic bit e = ($urandom_range(4) != 0);
        automatic logic [5:0] a = 6'($urandom);
        proc_en[p]   <= e;
        proc_mod[p]  <= 4'(mods[p]);
        proc_addr[p] <= a;
        exp_en[p]   = e;
        exp_data[p] = shadow[{4'(mods[p]), a}];
      end
      @(posedge clk);
      #1;
      // the read addressed in the cycle just ended is now on proc_data
      for (int p = 0; p < P; p++) begin
        if (exp_en[p]) begin
          checks++;
          if (proc_data[p] != 8'(exp_data[p])) begin
            failures++; $display("proc %0d got %h exp %h", p, proc_data[p], exp_data[p]);
          end
        end
      end
      checks++;
      if (conflict) begin failures++; $display("false conflict"); end
    end
    rst_n <= 1'b0;
    proc_en <= 4'b0011;
    proc_mod[0] <= 4'd5;
    proc_mod[1] <= 4'd5;
    @(posedge clk);
    #1;
    checks++;
    if (!conflict) begin failures++; $display("conflict not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
