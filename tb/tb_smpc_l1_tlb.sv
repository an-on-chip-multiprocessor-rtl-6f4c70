// tb_smpc_l1_tlb: self-checking test of the level-1 TLB (8-entry data
// configuration). A behavioural level-2 responder answers one cycle after a
// request with the mapping ppn = f(vpn) (or a fault for one marked page).
// Checks: translations, the one-cycle miss penalty, that ENTRIES pages stay
// resident, round-robin eviction, flush and fault passing.
module tb_smpc_l1_tlb;
  import smpc_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, flush = 0, req = 0;
  logic [31:0] va;
  logic hit, cacheable, fault, miss_cycle, l2_req, l2_valid = 0, l2_fault = 0;
  logic [35:0] pa;
  logic [2:0] acc;
  logic [19:0] l2_vpn;
  tlb_entry_t l2_entry;
  int checks = 0, failures = 0, l2_requests = 0;

  smpc_l1_tlb #(.ENTRIES(N)) dut (.clk, .rst_n, .flush, .req, .va, .hit, .pa, .cacheable, .acc, .fault,
    .miss_cycle, .l2_req, .l2_vpn, .l2_valid, .l2_fault, .l2_entry);

  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [23:0] f(logic [19:0] v); return {4'hA, v ^ 20'h5A5A5}; endfunction
  localparam logic [19:0] BAD = 20'hDEAD0;

  // behavioural L2: answer one cycle after a request
  always_ff @(posedge clk) begin
    l2_valid <= 1'b0; l2_fault <= 1'b0;
    if (l2_req && !l2_valid && !l2_fault) begin
      l2_requests++;
      if (l2_vpn == BAD) l2_fault <= 1'b1;
      else begin l2_valid <= 1'b1; l2_entry <= '{valid:1'b1, vpn:l2_vpn, ppn:f(l2_vpn), acc:3'd3, c:1'b1}; end
    end
  end

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  // translate and return the number of cycles until hit
  task automatic xlate(input logic [31:0] a, output int cyc, output logic flt);
    @(negedge clk); req = 1; va = a; cyc = 0; flt = 0;
    #1;
    while (!hit && !fault) begin @(negedge clk); #1; cyc++; if (cyc > 20) break; end
    flt = fault;
    if (!fault) chk(pa, {f(a[31:12]), a[11:0]}, "pa");
    @(posedge clk); #1 req = 0;
  endtask

  initial begin
    int c; logic fl; int n_before;
    repeat (2) @(negedge clk); rst_n = 1;
    // first touch: one-cycle penalty
    xlate(32'h0040_1234, c, fl); chk(c, 1, "miss penalty");
    xlate(32'h0040_1FF0, c, fl); chk(c, 0, "hit same page");
    // fill all entries, then all must hit
    for (int p = 1; p < N; p++) begin xlate(32'h1000_0000 + p*4096, c, fl); chk(c, 1, "fill miss"); end
    n_before = l2_requests;
    xlate(32'h0040_1000, c, fl); chk(c, 0, "resident 0");
    for (int p = 1; p < N; p++) begin xlate(32'h1000_0000 + p*4096 + 4, c, fl); chk(c, 0, "resident"); end
    chk(l2_requests - n_before, 0, "no L2 traffic when resident");
    // one more page evicts the oldest (round-robin: entry 0, page 0x00401)
    xlate(32'h2000_0000, c, fl); chk(c, 1, "new page");
    xlate(32'h0040_1000, c, fl); chk(c, 1, "evicted page misses");
    // fault passing
    xlate({BAD, 12'h10}, c, fl); chk(fl, 1, "fault");
    // flush
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    xlate(32'h2000_0000, c, fl); chk(c, 1, "miss after flush");
    // random addresses in a small page set
    for (int i = 0; i < 300; i++) xlate({16'h3000, 4'($urandom), 12'($urandom)}, c, fl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
