// tb_smpc_dtlb_sweep: level-1 data TLB size sweep on a synthetic
// data-reference trace.
//
// Four level-1 TLBs with 2, 4, 8 and 16 entries run the same trace. The
// chip's data TLB has 8 entries; the other sizes show how the miss rate
// changes with size. Each TLB has its own behavioural level-2 MMU that
// answers one cycle after a request, so every miss costs one cycle.
//
// The trace is generated here from a fixed-seed linear congruential
// generator and has 4000 data references. It imitates a loop kernel:
//   * word accesses to a stack page,
//   * three arrays of three pages each, walked in step with a 16-byte stride (a[i] = b[i] + c[i]),
//   * random reads of a four-page global table.
// That is 14 distinct pages. The trace, its mix and its length are this
// design's own choice; they stand in for program traces, which are not
// available here.
//
// Checks:
//   * every translation gives the expected physical address;
//   * each TLB misses at least once per distinct page;
//   * the 16-entry TLB, which holds the whole working set, misses only once
//     per page;
//   * the 2-entry TLB misses more often than the 16-entry one.
// At the end the miss rate of each size is printed.
module tb_smpc_dtlb_sweep;
  import smpc_pkg::*;
  localparam int NREF = 4000;
  localparam int NSIZE = 4;
  localparam int SIZES [NSIZE] = '{2, 4, 8, 16};
  localparam int NPAGES = 14;

  logic clk = 0, rst_n = 0;
  logic [31:0] trace [NREF];
  int misses [NSIZE];
  logic [NSIZE-1:0] done = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [23:0] f(logic [19:0] v); return {4'h3, v ^ 20'h0F0F3}; endfunction

  // ---- trace generation ----
  initial begin
    logic [31:0] seed = 32'h1234_5678;
    int i = 0, k = 0;
    while (i < NREF) begin
      seed = seed * 32'd1103515245 + 32'd12345;
      case (seed[31:29])
        3'd0, 3'd1: trace[i] = 32'h7FFF_E000 + {20'd0, seed[11:2], 2'b00};      // stack
        3'd2:       trace[i] = 32'h0080_0000 + {18'd0, seed[28:27], 12'd0} + {20'd0, seed[13:4], 2'b00}; // table (4 pages)
        default: begin                                                              // arrays
          trace[i] = 32'h0040_0000 + 32'((k * 16) % 12288);                         // b[k]
          if (i + 1 < NREF) trace[i+1] = 32'h0050_0000 + 32'((k * 16) % 12288);     // c[k]
          if (i + 2 < NREF) trace[i+2] = 32'h0060_0000 + 32'((k * 16) % 12288);     // a[k]
          i += 2; k++;
        end
      endcase
      i++;
    end
  end

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  for (genvar s = 0; s < NSIZE; s++) begin : g_size
    logic req = 0, hit, cacheable, fault, miss_cycle, l2_req, l2_valid = 0, l2_fault = 0;
    logic [31:0] va = 0;
    logic [35:0] pa;
    logic [2:0] acc;
    logic [19:0] l2_vpn;
    tlb_entry_t l2_entry;

    smpc_l1_tlb #(.ENTRIES(SIZES[s])) u_tlb (.clk, .rst_n, .flush(1'b0), .req, .va, .hit, .pa, .cacheable,
      .acc, .fault, .miss_cycle, .l2_req, .l2_vpn, .l2_valid, .l2_fault, .l2_entry);

    always_ff @(posedge clk) begin
      l2_valid <= 1'b0;
      if (l2_req && !l2_valid) begin
        l2_valid <= 1'b1;
        l2_entry <= '{valid:1'b1, vpn:l2_vpn, ppn:f(l2_vpn), acc:3'd3, c:1'b1};
      end
    end

    initial begin
      int n = 0;
      repeat (3) @(negedge clk);
      for (int i = 0; i < NREF; i++) begin
        req = 1; va = trace[i];
        #1;
        if (!hit) begin
          n++;
          while (!hit) begin @(negedge clk); #1; end
        end
        chk(pa, {f(va[31:12]), va[11:0]}, "pa");
        @(negedge clk);
      end
      req = 0;
      misses[s] = n;
      done[s] = 1'b1;
    end
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    wait (&done);
    for (int s = 0; s < NSIZE; s++) begin
      $display("L1 DTLB %2d entries: %4d misses in %0d references, miss rate %0d.%02d %%",
               SIZES[s], misses[s], NREF, misses[s] * 100 / NREF, (misses[s] * 10000 / NREF) % 100);
      checks++;
      if (misses[s] < NPAGES) begin failures++; $display("FAIL fewer misses than pages at %0d", SIZES[s]); end
    end
    chk(misses[NSIZE-1], NPAGES, "16 entries: compulsory misses only");
    checks++;
    if (!(misses[0] > misses[NSIZE-1])) begin failures++; $display("FAIL 2 entries not worse than 16"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
