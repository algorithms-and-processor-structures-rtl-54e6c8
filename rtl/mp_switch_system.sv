// mp_switch_system: memory modules and switching networks of the
// multiprocessor motion-estimation system.
//
// The frame memory (MEM_WORDS words of WORD_W bits) is split into
// K = MEM_WORDS / BLK_WORDS equal modules. P processors reach them through
// two crossbars: the address network routes each processor's word address
// (log2 BLK_WORDS bits) to the module it names (K columns of P-to-1
// multiplexers), and the data network routes each module's read word back
// to the processor that addressed it (P columns of K-to-1 multiplexers).
// Defaults are the document's worked example: 4 processors, 8x8-word
// modules, a 2^16-word memory of 8-bit words, hence 1024 modules.
//
// Processor port p: proc_en, proc_mod (module index), proc_addr (word in
// the module); the word read appears on proc_data one cycle later
// (synchronous memory). Two processors must not name the same module in
// the same cycle -- the scheduler keeps them apart; `conflict` flags it
// and an assertion checks it. The host port writes the memory, one word
// per cycle, by full address (module index in the high bits). The
// processors themselves and their scheduler are outside this module.
// rst_n only gates the conflict assertion; the datapath needs no reset.
// Because of that, lint sees rst_n sampled synchronously here while other
// blocks of the top use it as an asynchronous reset (SYNCASYNCNET); the
// sampling is in the assertion only and drives no flop.
module mp_switch_system #(
  parameter int unsigned P         = 4,
  parameter int unsigned MEM_WORDS = 65536,
  parameter int unsigned BLK_WORDS = 64,
  parameter int unsigned WORD_W    = 8,
  localparam int unsigned K  = MEM_WORDS / BLK_WORDS,
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned BW = (BLK_WORDS > 1) ? $clog2(BLK_WORDS) : 1,
  localparam int unsigned PW = (P > 1) ? $clog2(P) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // processor ports
  input  logic [P-1:0]                proc_en,
  input  logic [P-1:0][KW-1:0]        proc_mod,
  input  logic [P-1:0][BW-1:0]        proc_addr,
  output logic [P-1:0][WORD_W-1:0]    proc_data,
  output logic                        conflict,
  // host write port
  input  logic                        host_we,
  input  logic [KW+BW-1:0]            host_addr,
  input  logic [WORD_W-1:0]           host_wdata
);
  // ---------------- address network: processors -> modules ----------------
  logic [K-1:0][PW-1:0] mod_src;     // which processor addresses module k
  logic [K-1:0]         mod_en;
  logic [K-1:0][BW-1:0] mod_addr;

  always_comb begin
    mod_src = '0;
    mod_en  = '0;
    for (int k = 0; k < K; k++)
      for (int p = 0; p < P; p++)
        if (proc_en[p] && proc_mod[p] == KW'(k)) begin
          mod_src[k] = PW'(p);
          mod_en[k]  = 1'b1;
        end
  end

  crossbar #(.NIN(P), .NOUT(K), .W(BW)) u_addr_net (
    .din(proc_addr), .src(mod_src), .en(mod_en), .dout(mod_addr)
  );

  // ---------------- memory modules ----------------
  logic [WORD_W-1:0]         mem [K][BLK_WORDS];
  logic [K-1:0][WORD_W-1:0]  mod_rdata;

  always_ff @(posedge clk) begin
    if (host_we) mem[host_addr[KW+BW-1:BW]][host_addr[BW-1:0]] <= host_wdata;
    for (int k = 0; k < K; k++)
      if (mod_en[k]) mod_rdata[k] <= mem[k][mod_addr[k]];
  end

  // ---------------- data network: modules -> processors ----------------
  logic [P-1:0][KW-1:0] rd_mod;
  logic [P-1:0]         rd_en;
  always_ff @(posedge clk) begin
    rd_mod <= proc_mod;
    rd_en  <= proc_en;
  end

  crossbar #(.NIN(K), .NOUT(P), .W(WORD_W)) u_data_net (
    .din(mod_rdata), .src(rd_mod), .en(rd_en), .dout(proc_data)
  );

  // ---------------- module conflicts ----------------
  always_comb begin
    conflict = 1'b0;
    for (int p = 0; p < P; p++)
      for (int q = p + 1; q < P; q++)
        if (proc_en[p] && proc_en[q] && proc_mod[p] == proc_mod[q]) conflict = 1'b1;
  end

  a_no_conflict: assert property (@(posedge clk) disable iff (!rst_n) !conflict)
    else $error("two processors addressed the same memory module");

endmodule
