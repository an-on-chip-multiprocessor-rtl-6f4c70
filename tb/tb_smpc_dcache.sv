// tb_smpc_dcache: self-checking test of the shared data cache.
// A behavioural line source backs the cache with a word memory (reads,
// reads-for-ownership, write-backs, invalidates). A golden memory is
// updated whenever a store is accepted, and every accepted load is compared
// with it. Directed parts check same-cycle visibility of one IU's store to
// the other IU, the two-cycle store (same-set access waits one cycle),
// Exclusive/Shared fills, snoop answers and state changes (M->O on a read
// with data supplied, invalidation on read-for-ownership), the upgrade of a
// Shared line on a store, and dirty write-back on eviction. A random phase
// runs both ports at once over 16 KB (twice the cache).
module tb_smpc_dcache;
  import smpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] p_req = 0, p_pa_valid = 0, p_we = 0, p_ready;
  logic [31:0] p_va [2], p_wdata [2], p_rdata [2];
  logic [35:0] p_pa [2];
  logic [3:0] p_be [2];
  logic snp_valid = 0, snp_hit, snp_supply;
  snp_cmd_e snp_cmd = SNP_RD;
  logic [35:0] snp_addr = 0;
  logic [255:0] snp_data, l_wdata, l_rdata;
  logic l_req, l_done = 0, l_shared = 0;
  bus_cmd_e l_cmd;
  logic [35:0] l_addr;
  logic [31:0] miss_count, writeback_count, upgrade_count, snoop_hit_count, conflict_count;
  int checks = 0, failures = 0;
  logic shared_next = 0;

  smpc_dcache dut (.*);

  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic [31:0] back [logic [33:0]];     // backing memory, word-addressed (physical)
  logic [31:0] gold [logic [29:0]];     // architectural memory, word-addressed (virtual)
  function automatic logic [31:0] bk(logic [33:0] wa); return back.exists(wa) ? back[wa] : {wa[15:0], wa[31:16]}; endfunction
  function automatic logic [35:0] v2p(logic [31:0] v); return {4'h1, v[31:12] ^ 20'h0A000, v[11:0]}; endfunction
  function automatic logic [31:0] gd(logic [31:0] v); return gold.exists(v[31:2]) ? gold[v[31:2]] : bk(v2p(v) >> 2); endfunction

  int lat = 0;
  always @(posedge clk) begin
    l_done <= 0;
    if (l_req && !l_done) begin
      if (lat == 2) begin
        lat <= 0; l_done <= 1; l_shared <= shared_next;
        for (int w = 0; w < 8; w++) begin
          if (l_cmd == BUS_WB_LINE) back[{l_addr[35:5], 3'(w)}] = l_wdata[32*w +: 32];
          l_rdata[32*w +: 32] <= bk({l_addr[35:5], 3'(w)});
        end
      end else lat <= lat + 1;
    end
  end

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h @%0t", what, got, exp, $time); end
  endtask

  // one access on port p; returns cycles waited
  task automatic acc(int p, logic [31:0] va, logic we, logic [31:0] wd, logic [3:0] be, output int cyc);
    @(negedge clk);
    p_req[p] = 1; p_pa_valid[p] = 1; p_va[p] = va; p_pa[p] = v2p(va); p_we[p] = we; p_wdata[p] = wd; p_be[p] = be;
    cyc = 0;
    #1 while (!p_ready[p]) begin @(negedge clk); #1; cyc++; if (cyc > 100) break; end
    if (we) begin
      logic [31:0] g; g = gd(va);
      for (int b = 0; b < 4; b++) if (be[b]) g[8*b +: 8] = wd[8*b +: 8];
      gold[va[31:2]] = g;
    end else chk(p_rdata[p], gd(va), $sformatf("load p%0d %h", p, va));
    @(posedge clk); #1 p_req[p] = 0;
  endtask

  initial begin
    int c, c1, wb0, up0;
    p_va[0] = 0; p_va[1] = 0; p_pa[0] = 0; p_pa[1] = 0; p_wdata[0] = 0; p_wdata[1] = 0; p_be[0] = 0; p_be[1] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // load miss then hit, line Exclusive
    acc(0, 32'h0000_2000, 0, 0, 0, c); chk(c > 0, 1, "cold miss");
    acc(0, 32'h0000_2004, 0, 0, 0, c); chk(c, 0, "hit");
    // store on IU0, the other IU sees it
    acc(0, 32'h0000_2008, 1, 32'h11223344, 4'hF, c); chk(c, 0, "store hit on E");
    acc(1, 32'h0000_2008, 0, 0, 0, c);
    // byte store
    acc(1, 32'h0000_2008, 1, 32'h000000AA, 4'h1, c);
    acc(0, 32'h0000_2008, 0, 0, 0, c);
    // two-cycle store: a load to the same set right after waits one cycle
    fork
      acc(0, 32'h0000_200C, 1, 32'hCAFEF00D, 4'hF, c);
      begin @(negedge clk); acc(1, 32'h0000_2010, 0, 0, 0, c1); end
    join
    chk(c1, 1, "same-set access waits for store's second cycle");
    // snoop read of a Modified line: supplies new data, becomes Owned
    @(negedge clk); snp_valid = 1; snp_cmd = SNP_RD; snp_addr = v2p(32'h0000_2000);
    #1 chk(snp_hit, 1, "snoop hit"); chk(snp_supply, 1, "snoop supplies M data");
    chk(snp_data[32*3 +: 32], 32'hCAFEF00D, "snoop data");
    @(negedge clk); snp_valid = 1; #1 chk(snp_supply, 1, "owned still supplies");
    @(negedge clk); snp_valid = 0;
    // store to Owned line needs an upgrade
    up0 = upgrade_count;
    acc(1, 32'h0000_2014, 1, 32'h55667788, 4'hF, c);
    chk(upgrade_count - up0, 1, "upgrade on store to O");
    // snoop read-for-ownership invalidates; next load misses and re-reads the
    // written-back data? (no: line was M, supplied data must come from the snoop)
    @(negedge clk); snp_valid = 1; snp_cmd = SNP_RDX; snp_addr = v2p(32'h0000_2000);
    #1 chk(snp_supply, 1, "rdx supply");
    for (int w = 0; w < 8; w++) back[{v2p(32'h0000_2000) >> 5, 3'(w)}] = snp_data[32*w +: 32];
    @(negedge clk); snp_valid = 0; #1 chk(snp_hit, 0, "invalidated");
    acc(0, 32'h0000_2014, 0, 0, 0, c); chk(c > 0, 1, "miss after invalidate");
    // shared fill, then store upgrades
    shared_next = 1;
    acc(0, 32'h0000_3000, 0, 0, 0, c);
    shared_next = 0;
    up0 = upgrade_count;
    acc(0, 32'h0000_3000, 1, 32'h01020304, 4'hF, c); chk(upgrade_count - up0, 1, "upgrade on store to S");
    // eviction of dirty lines: 5 lines in one set (4 ways)
    wb0 = writeback_count;
    for (int k = 0; k < 5; k++) acc(0, 32'h0001_0040 + k*32'h800, 1, 32'hD0000000 + k, 4'hF, c);
    chk(writeback_count - wb0 >= 1, 1, "dirty write-back");
    for (int k = 0; k < 5; k++) acc(1, 32'h0001_0040 + k*32'h800, 0, 0, 0, c);
    // random: both ports together
    fork
      for (int i = 0; i < 3000; i++) acc(0, {18'h0, 12'($urandom_range(0, 4095)), 2'b00} & 32'h3FFC, $urandom_range(0,1), $urandom, 4'($urandom_range(1,15)), c);
      for (int i = 0; i < 3000; i++) acc(1, {18'h0, 12'($urandom_range(0, 4095)), 2'b00} & 32'h3FFC, $urandom_range(0,1), $urandom, 4'($urandom_range(1,15)), c);
    join
    chk(conflict_count > 0, 1, "conflicts seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
