// tb_smpc_top: end-to-end test of the SMPC at its default sizes.
// The chip runs from a behavioural external memory that holds the page
// tables (context table, level-1/2/3 tables), the code of both IUs and
// their data; every address the IUs use is virtual and goes through the
// TLBs and the table walker. Both IUs add to one shared counter under a
// lock (MCIS lock set/clear), store across twelve pages that fall into one
// data-cache set (level-1 TLB misses, L2 TLB hits, dirty write-backs), then
// meet at a barrier and read what the other IU stored before it. IU1 also
// runs the string and IOP instructions. The testbench snoops the counter's
// line now and then, as another chip on the bus would, which forces
// upgrades. At the end the results are read through the snoop port (or
// from memory when the cache no longer holds them) and compared with the
// expected values, and each mechanism is required to have happened.
module tb_smpc_top;
  import smpc_pkg::*;
  import smpc_asm_pkg::*;
  localparam int N = 20;                     // lock-protected increments per IU
  logic clk = 0, rst_n = 0;
  logic [35:0] mmu_ctp = 36'h0_0010_0000;
  logic [7:0] mmu_ctx = 8'd0;
  logic mmu_flush = 0;
  logic [3:0] mmu_fault;
  logic ext_req, ext_gnt, ext_shared, ext_rvalid, ext_wready;
  bus_cmd_e ext_cmd; logic [35:0] ext_addr; logic [63:0] ext_rdata, ext_wdata;
  logic snp_valid = 0, snp_hit, snp_supply;
  snp_cmd_e snp_cmd = SNP_RD;
  logic [35:0] snp_addr = 0;
  logic [255:0] snp_data;
  logic [1:0] halted, barrier_state;
  iu_perf_t iu_perf [2];
  logic [31:0] itlb_miss_cycles [2], dtlb_miss_cycles [2], walk_count, ptpc_hit_count, icache_miss_count [2];
  logic [31:0] dcache_miss_count, dcache_writeback_count, dcache_upgrade_count, dcache_snoop_hit_count, dcache_conflict_count;
  int nlr, nwr, nwb, ninv;
  int checks = 0, failures = 0;

  smpc_top dut (.*);
  smpc_ext_mem u_mem (.clk, .ext_req, .ext_cmd, .ext_addr, .ext_gnt, .ext_shared, .ext_rvalid, .ext_rdata,
    .ext_wdata, .ext_wready, .shared_in(1'b0), .n_line_reads(nlr), .n_word_reads(nwr), .n_writebacks(nwb),
    .n_invalidates(ninv));

  always #5 clk = ~clk;
  initial begin #3000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [35:0] v2p(logic [31:0] v); return {4'h1, v}; endfunction

  // ---- page tables ----
  int n_l2 = 0, n_l3 = 0;
  logic [35:0] l2_of [int], l3_of [int];
  function automatic logic [31:0] ptd(logic [35:0] t); return {t[35:6], 2'b01}; endfunction
  task automatic map4k(logic [19:0] v);
    logic [35:0] l1b; int i1, i12; logic [23:0] ppn;
    l1b = 36'h0_0020_0000; i1 = int'(v[19:12]); i12 = int'(v[19:6]);
    if (!l2_of.exists(i1)) begin l2_of[i1] = 36'h0_0030_0000 + 36'(n_l2) * 36'h100; n_l2++; u_mem.poke(l1b + 36'(i1*4), ptd(l2_of[i1])); end
    if (!l3_of.exists(i12)) begin l3_of[i12] = 36'h0_0040_0000 + 36'(n_l3) * 36'h100; n_l3++; u_mem.poke(l2_of[i1] + 36'(v[11:6])*4, ptd(l3_of[i12])); end
    ppn = {4'h1, v};
    u_mem.poke(l3_of[i12] + 36'(v[5:0])*4, {ppn, 1'b1, 2'b00, 3'd3, 2'b10});
  endtask

  // ---- programs ----
  logic [31:0] va_at;
  task automatic put(logic [31:0] w); u_mem.poke(v2p(va_at), w); va_at += 4; endtask

  task automatic lock_loop();
    int loop;
    put(sethi(4, 32'h10000));               // r4 = shared data page
    put(alui(OR, 1, 0, N));
    loop = 0;
    put(alui(OP3_LOCKSET, 0, 4, 0));
    put(mem(LD, 2, 4, 12'h040));
    put(alui(ADD, 2, 2, 1));                // load interlock
    put(mem(ST, 2, 4, 12'h040));
    put(alui(OP3_LOCKCLR, 0, 4, 0));
    put(alui(SUBCC, 1, 1, 1));
    put(bicc(C_NE, 0, -6));
    put(nop());
  endtask

  task automatic build();
    // IU0 at VA 0
    va_at = 32'h0;
    lock_loop();
    put(sethi(5, 32'h20000)); put(sethi(7, 32'h1000)); put(alui(OR, 6, 0, 12));
    put(mem(ST, 6, 5, 0));                  // twelve pages, one cache set
    put(alur(ADD, 5, 5, 7));
    put(alui(SUBCC, 6, 6, 1));
    put(bicc(C_NE, 0, -3));
    put(nop());
    put(sethi(5, 32'h20000));
    put(mem(LD, 8, 5, 0));                  // evicted line comes back
    put(mem(ST, 8, 4, 12'h080));            // [0x80] = 12
    put(alui(OP3_BARSET, 0, 0, 0));
    put(mem(LD, 9, 4, 12'h0C0));            // IU1's value
    put(mem(ST, 9, 4, 12'h084));            // [0x84] = 0x5A5
    put(alui(OP3_BARCLR, 0, 0, 0));
    put(halt());
    // IU1 at VA 0x4000
    va_at = 32'h4000;
    lock_loop();
    put(alui(OR, 10, 0, 12'h5A5));
    put(mem(ST, 10, 4, 12'h0C0));
    put(mem(LD, 12, 4, 12'h0C0));           // store interlock
    put(mem(ST, 12, 4, 12'h0C4));           // load aligner -> E; [0xC4] = 0x5A5
    put(alur(ADD, 13, 12, 12)); put(alur(ADD, 13, 13, 13));  // forwarding chain: 0x1694
    put(mem(ST, 13, 4, 12'h0C8));
    put(alui(OR, 16, 4, 12'h0C0));
    put(mem(OP3_LDUPD, 17, 16, 4));         // r17 = [0xC4], r16 = base + 0xC4 (IOP)
    put(mem(ST, 16, 4, 12'h0CC));           // [0xCC] = 0x100C4
    put(sethi(18, 32'h41420000)); put(sethi(19, 32'h41430000));
    put(alur(OP3_CMPSTR, 20, 18, 19));      // differ at byte 1 -> 1
    put(bicc(C_A, 1, 2));                   // ba,a: slot annulled
    put(alui(OR, 20, 0, 99));
    put(mem(ST, 20, 4, 12'h0D0));           // [0xD0] = 1
    put(alui(OP3_BARSET, 0, 0, 0));
    put(mem(LD, 11, 4, 12'h080));           // IU0's value
    put(mem(ST, 11, 4, 12'h088));           // [0x88] = 12
    put(alui(OP3_BARCLR, 0, 0, 0));
    put(halt());
    for (int p = 0; p < 8; p++) begin map4k(20'(p)); end
    map4k(20'h00010);
    for (int p = 0; p < 12; p++) map4k(20'h00020 + 20'(p));
    u_mem.poke(36'h0_0010_0000, ptd(36'h0_0020_0000));   // context 0 -> level-1 table
    u_mem.poke(v2p(32'h10040), 32'h0);                  // shared counter starts at 0
  endtask

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h (%0d) exp %h (%0d)", what, got, got, exp, exp); end
  endtask

  // read a word as another bus agent would: snoop first, else memory
  task automatic bus_read(logic [31:0] va, output logic [31:0] d);
    @(negedge clk); snp_valid = 1; snp_cmd = SNP_RD; snp_addr = v2p(va);
    #1 d = snp_supply ? snp_data[32*va[4:2] +: 32] : u_mem.peek(v2p(va));
    @(negedge clk); snp_valid = 0;
  endtask

  int lock_wait = 0, bar_wait = 0, cyc = 0;
  always @(posedge clk) begin
    for (int i = 0; i < 2; i++)
      if (dut.mc_req[i] && !dut.mc_ack[i]) begin
        if (dut.mc_op[i] == MC_LOCKSET) lock_wait++;
        if (dut.mc_op[i] == MC_BARSET) bar_wait++;
      end
  end

  initial begin
    logic [31:0] d;
    build();
    repeat (3) @(negedge clk); rst_n = 1;
    while (halted != 2'b11 && cyc < 200000) begin
      @(negedge clk); cyc++;
      if (cyc % 97 == 0 && halted == 2'b00) begin         // another chip reads the counter line
        snp_valid = 1; snp_cmd = SNP_RD; snp_addr = v2p(32'h10040);
        @(negedge clk); snp_valid = 0; cyc++;
      end
    end
    $display("both IUs halted after %0d cycles; retired %0d + %0d", cyc, iu_perf[0].retired, iu_perf[1].retired);
    chk(halted, 2'b11, "both halted");
    chk(mmu_fault, 0, "no faults");
    bus_read(32'h10040, d); chk(d, 2*N, "shared counter under lock");
    bus_read(32'h10080, d); chk(d, 12, "written-back line re-read");
    bus_read(32'h10084, d); chk(d, 32'h5A5, "IU0 sees IU1 store after barrier");
    bus_read(32'h10088, d); chk(d, 12, "IU1 sees IU0 store after barrier");
    bus_read(32'h100C4, d); chk(d, 32'h5A5, "load->store forward");
    bus_read(32'h100C8, d); chk(d, 32'h1694, "forward chain");
    bus_read(32'h100CC, d); chk(d, 32'h100C4, "load-update base");
    bus_read(32'h100D0, d); chk(d, 1, "compare string");
    for (int p = 1; p < 12; p++) begin bus_read(32'h20000 + p*4096, d); chk(d, 12 - p, "page store"); end
    // mechanisms
    $display("lock_wait=%0d bar_wait=%0d walks=%0d ptpc=%0d itlb=%0d/%0d dtlb=%0d/%0d ic=%0d/%0d dc=%0d wb=%0d up=%0d snp=%0d conf=%0d",
      lock_wait, bar_wait, walk_count, ptpc_hit_count, itlb_miss_cycles[0], itlb_miss_cycles[1], dtlb_miss_cycles[0],
      dtlb_miss_cycles[1], icache_miss_count[0], icache_miss_count[1], dcache_miss_count, dcache_writeback_count,
      dcache_upgrade_count, dcache_snoop_hit_count, dcache_conflict_count);
    chk(lock_wait > 0, 1, "lock contention happened");
    chk(bar_wait > 0, 1, "barrier wait happened");
    chk(walk_count > 0, 1, "table walks happened");
    chk(ptpc_hit_count > 0, 1, "page table pointer cache hits happened");
    chk(itlb_miss_cycles[0] > 0 && itlb_miss_cycles[1] > 0, 1, "instruction TLB misses happened");
    chk(dtlb_miss_cycles[0] > 0 && dtlb_miss_cycles[1] > 0, 1, "data TLB misses happened");
    chk(dtlb_miss_cycles[0] > walk_count, 1, "L1 misses served by L2 hits");
    chk(icache_miss_count[0] > 0 && icache_miss_count[1] > 0, 1, "instruction cache misses happened");
    chk(dcache_miss_count > 0, 1, "data cache misses happened");
    chk(dcache_writeback_count > 0, 1, "dirty write-backs happened");
    chk(dcache_upgrade_count > 0, 1, "upgrades happened");
    chk(dcache_snoop_hit_count > 0, 1, "snoop hits happened");
    for (int i = 0; i < 2; i++) begin
      chk(iu_perf[i].load_interlock > 0, 1, "load interlock");
      chk(iu_perf[i].fwd_e > 0, 1, "E->D forwarding");
      chk(iu_perf[i].mem_stall > 0, 1, "memory stalls");
      chk(iu_perf[i].fetch_stall > 0, 1, "fetch stalls");
      chk(iu_perf[i].taken > 0, 1, "taken branches");
    end
    chk(iu_perf[1].store_interlock > 0, 1, "store interlock");
    chk(iu_perf[1].fwd_load > 0, 1, "load aligner forwarding");
    chk(iu_perf[1].iop, 1, "IOP issued");
    chk(iu_perf[1].annulled, 1, "annulled slot");
    chk(nwb > 0, 1, "write-backs on the external bus");
    chk(ninv > 0, 1, "invalidates on the external bus");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
