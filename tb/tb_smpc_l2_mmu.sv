// tb_smpc_l2_mmu: self-checking test of the shared level-2 MMU.
// A behavioural memory holds a four-level page-table tree (context table,
// level-1, level-2, level-3 tables) built by the testbench in the SPARC
// reference-MMU layout, and answers table-walk reads after a fixed delay.
// Four requester models issue page numbers. Checks: translations from
// 4 KB leaves and from a 16 MB leaf, faults on invalid entries, the
// one-cycle penalty of an L2 hit, answers to four simultaneous hits over four
// consecutive cycles, four reads for a full walk and one read after a hit in
// the page table pointer cache.
module tb_smpc_l2_mmu;
  import smpc_pkg::*;
  localparam int NREQ = 4;
  logic clk = 0, rst_n = 0, flush = 0;
  logic [35:0] ctp = 36'h0_0010_0000;
  logic [7:0] ctx = 8'd1;
  logic [NREQ-1:0] req = '0, resp_valid, resp_fault;
  logic [19:0] vpn [NREQ];
  tlb_entry_t resp_entry;
  logic mem_req, mem_valid = 0;
  logic [35:0] mem_addr;
  logic [31:0] mem_rdata, walk_count, ptpc_hit_count;
  int checks = 0, failures = 0, mem_reads = 0;

  smpc_l2_mmu #(.NREQ(NREQ)) dut (.clk, .rst_n, .flush, .ctp, .ctx, .req, .vpn, .resp_valid, .resp_fault,
    .resp_entry, .mem_req, .mem_addr, .mem_valid, .mem_rdata, .walk_count, .ptpc_hit_count);

  always #5 clk = ~clk;
  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic [31:0] mem [logic [35:0]];
  // memory: two-cycle read latency
  int lat = 0;
  always_ff @(posedge clk) begin
    mem_valid <= 1'b0;
    if (mem_req && !mem_valid) begin
      if (lat == 1) begin mem_valid <= 1'b1; mem_rdata <= mem.exists(mem_addr) ? mem[mem_addr] : 32'h0; lat <= 0; mem_reads++; end
      else lat <= lat + 1;
    end
  end

  function automatic logic [31:0] ptd(logic [35:0] tbl); return {tbl[35:6], 2'b01}; endfunction
  function automatic logic [31:0] pte(logic [23:0] ppn); return {ppn, 1'b1, 2'b00, 3'd3, 2'b10}; endfunction
  function automatic logic [23:0] f(logic [19:0] v); return {4'h7, v ^ 20'h0F0F0}; endfunction

  // tables: L1 at 0x200000, L2 tables at 0x300000 + i*0x100, L3 tables at 0x400000 + j*0x100
  int n_l2 = 0, n_l3 = 0;
  logic [35:0] l2_of [int];
  logic [35:0] l3_of [int];
  task automatic map4k(logic [19:0] v);
    logic [35:0] l1b, l2b, l3b; int i1, i12;
    l1b = 36'h20_0000;
    i1 = int'(v[19:12]); i12 = int'(v[19:6]);
    if (!l2_of.exists(i1)) begin l2_of[i1] = 36'h30_0000 + 36'(n_l2) * 36'h100; n_l2++; mem[l1b + 36'(i1*4)] = ptd(l2_of[i1]); end
    l2b = l2_of[i1];
    if (!l3_of.exists(i12)) begin l3_of[i12] = 36'h40_0000 + 36'(n_l3) * 36'h100; n_l3++; mem[l2b + 36'(v[11:6])*4] = ptd(l3_of[i12]); end
    l3b = l3_of[i12];
    mem[l3b + 36'(v[5:0])*4] = pte(f(v));
  endtask

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  // one requester, wait for the answer, return cycles and whether it faulted
  task automatic ask(int r, logic [19:0] v, output int cyc, output logic flt, output tlb_entry_t e);
    @(negedge clk); req[r] = 1; vpn[r] = v; cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (!resp_valid[r] && !resp_fault[r] && cyc < 200);
    flt = resp_fault[r]; e = resp_entry;
    @(negedge clk); req[r] = 0;
  endtask

  initial begin
    int c, r0; logic fl; tlb_entry_t e;
    for (int r = 0; r < NREQ; r++) vpn[r] = '0;
    mem[ctp + 36'(ctx)*4] = ptd(36'h20_0000);
    map4k(20'h00401); map4k(20'h00402); map4k(20'h00403); map4k(20'h00404); map4k(20'h12345);
    // a 16 MB leaf directly in the level-1 table for VA[31:24] = 0x80
    mem[36'h20_0000 + 36'h80*4] = pte(24'hABC000);
    repeat (2) @(negedge clk); rst_n = 1;

    // full walk: 4 reads
    r0 = mem_reads;
    ask(0, 20'h00401, c, fl, e);
    chk(fl, 0, "walk ok"); chk(e.ppn, f(20'h00401), "walk ppn"); chk(mem_reads - r0, 4, "full walk reads");
    // same level-3 table: pointer cache hit, 1 read
    r0 = mem_reads;
    ask(1, 20'h00402, c, fl, e);
    chk(e.ppn, f(20'h00402), "ptpc ppn"); chk(mem_reads - r0, 1, "ptpc walk reads");
    chk(ptpc_hit_count, 1, "ptpc count");
    // L2 hit: answer in the next cycle
    ask(2, 20'h00401, c, fl, e);
    chk(c, 1, "L2 hit penalty"); chk(e.ppn, f(20'h00401), "hit ppn");
    // other walks
    ask(3, 20'h12345, c, fl, e); chk(e.ppn, f(20'h12345), "walk 2");
    ask(0, 20'h00403, c, fl, e); ask(0, 20'h00404, c, fl, e);
    // large page
    ask(1, 20'h80123, c, fl, e); chk(fl, 0, "16MB ok"); chk(e.ppn, {12'hABC, 12'h123}, "16MB ppn");
    // fault
    ask(2, 20'h55555, c, fl, e); chk(fl, 1, "fault");
    // four simultaneous hits: answered on 4 consecutive cycles
    begin
      int when [NREQ]; int t;
      @(negedge clk);
      vpn[0] = 20'h00401; vpn[1] = 20'h00402; vpn[2] = 20'h00403; vpn[3] = 20'h00404; req = '1;
      t = 0;
      for (int r = 0; r < NREQ; r++) when[r] = -1;
      while (t < 10) begin
        @(posedge clk); #1; t++;
        for (int r = 0; r < NREQ; r++) if (resp_valid[r] && when[r] < 0) begin
          when[r] = t; chk(resp_entry.ppn, f(vpn[r]), "multi ppn");
          req[r] = 0;
        end
      end
      begin
        int mx, mn; mx = 0; mn = 99;
        for (int r = 0; r < NREQ; r++) begin if (when[r] > mx) mx = when[r]; if (when[r] < mn) mn = when[r]; end
        chk(mn, 1, "first answer after 1 cycle"); chk(mx, 4, "last answer after 4 cycles (3 extra)");
      end
    end
    // flush forces a new walk
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    r0 = mem_reads; ask(0, 20'h00401, c, fl, e); chk(mem_reads - r0, 4, "walk after flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
