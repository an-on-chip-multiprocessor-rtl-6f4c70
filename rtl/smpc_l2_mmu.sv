// smpc_l2_mmu: shared level-2 MMU of the SMPC: a 128-entry fully associative
// TLB shared by the four level-1 TLBs, a request arbiter, and the single
// hardware table walker with its page table pointer cache.
//
// Arbitration: NREQ level-1 TLBs (IU0 I/D, IU1 I/D) may request at once.
// One request per cycle is granted, round-robin, and looked up in the TLB;
// the answer appears on resp_valid/resp_entry in the next cycle, so an L2 hit
// costs one cycle and four simultaneous requests are answered over four
// cycles (up to three extra). A requester that is being answered is not
// granted again in the same cycle.
//
// Table walk: on an L2 miss the walker reads page-table entries over a
// 32-bit physical read port, using a tree of four tables in the layout of the
// SPARC reference MMU: the context table (base ctp, index ctx), then level-1
// (VA[31:24]), level-2 (VA[23:18]) and level-3 (VA[17:12]) tables. A page
// table descriptor (type 1) holds PA[35:6] of the next table in bits 31:2; a
// page table entry (type 2) holds the physical page number in bits 31:8,
// cacheable in bit 7 and the access code in bits 4:2. A leaf found at an
// upper level maps a larger region; the walker stores it as the 4 KB
// translation of the page asked for. The page table pointer cache keeps
// the pointers to level-3 tables, tagged by VA[31:18]; a hit there skips the
// first three reads. The result is written into the TLB (round-robin
// replacement) and returned to the requester; an invalid entry returns a
// fault. Arbitration pauses while a walk is in progress. Referenced and
// modified bits are not written back. Sizes of the pointer cache, the
// replacement policies and the pause are this design's choices.
module smpc_l2_mmu
  import smpc_pkg::*;
#(
  parameter int unsigned NREQ     = 4,
  parameter int unsigned ENTRIES  = 128,
  parameter int unsigned PTPC_ENT = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  input  logic [PA_W-1:0]   ctp,          // context table base (physical, 64-byte aligned)
  input  logic [7:0]        ctx,          // current context
  // level-1 TLB requests
  input  logic [NREQ-1:0]   req,
  input  logic [VPN_W-1:0]  vpn [NREQ],
  output logic [NREQ-1:0]   resp_valid,
  output logic [NREQ-1:0]   resp_fault,
  output tlb_entry_t        resp_entry,
  // table-walk memory read port
  output logic              mem_req,
  output logic [PA_W-1:0]   mem_addr,
  input  logic              mem_valid,
  input  logic [31:0]       mem_rdata,
  // event counts for observation
  output logic [31:0]       walk_count,
  output logic [31:0]       ptpc_hit_count
);
  localparam int unsigned RW = $clog2(NREQ);
  localparam int unsigned EW = $clog2(ENTRIES);
  localparam int unsigned PW = (PTPC_ENT > 1) ? $clog2(PTPC_ENT) : 1;

  typedef enum logic [1:0] { W_IDLE, W_READ, W_DONE } walk_state_e;

  tlb_entry_t      tlb [ENTRIES];
  logic [EW-1:0]   tlb_repl;
  logic [RW-1:0]   rr;                 // round-robin pointer
  walk_state_e     wst;
  logic [1:0]      wlevel;             // 0 = context table ... 3 = level-3 table
  logic [RW-1:0]   wreq;               // requester being walked for
  logic [VPN_W-1:0] wvpn;
  logic [PA_W-1:0] waddr;

  // page table pointer cache
  logic            ptpc_v   [PTPC_ENT];
  logic [13:0]     ptpc_tag [PTPC_ENT];
  logic [29:0]     ptpc_ptp [PTPC_ENT];
  logic [PW-1:0]   ptpc_repl;

  // ---------------- arbitration and lookup ----------------
  logic            gnt_v;
  logic [RW-1:0]   gnt;
  logic            lk_hit;
  tlb_entry_t      lk_ent;

  always_comb begin
    logic [RW-1:0] i;
    gnt_v = 1'b0; gnt = '0; i = '0;
    for (int k = 0; k < NREQ; k++) begin
      i = RW'((int'(rr) + k) % NREQ);
      if (wst == W_IDLE && !gnt_v && req[i] && !resp_valid[i]) begin gnt_v = 1'b1; gnt = i; end
    end
    lk_hit = 1'b0; lk_ent = '0;
    for (int e = 0; e < ENTRIES; e++)
      if (tlb[e].valid && tlb[e].vpn == vpn[gnt]) begin lk_hit = 1'b1; lk_ent = tlb[e]; end
  end

  // ---------------- pointer cache lookup ----------------
  logic            pc_hit;
  logic [29:0]     pc_ptp;
  always_comb begin
    pc_hit = 1'b0; pc_ptp = '0;
    for (int p = 0; p < PTPC_ENT; p++)
      if (ptpc_v[p] && ptpc_tag[p] == vpn[gnt][19:6]) begin pc_hit = 1'b1; pc_ptp = ptpc_ptp[p]; end
  end

  // ---------------- walker ----------------
  logic [1:0]      et;
  logic [PPN_W-1:0] leaf_ppn;
  logic [PA_W-1:0] next_tbl;
  always_comb begin
    logic [PPN_W-1:0] mask;
    et = mem_rdata[1:0];
    unique case (wlevel)
      2'd0:    mask = 24'h0F_FFFF;     // whole 4 GB context
      2'd1:    mask = 24'h00_0FFF;     // 16 MB region
      2'd2:    mask = 24'h00_003F;     // 256 KB region
      default: mask = 24'h00_0000;     // 4 KB page
    endcase
    leaf_ppn = (mem_rdata[31:8] & ~mask) | ({4'h0, wvpn} & mask);
    next_tbl = {mem_rdata[31:2], 6'b0};
  end

  function automatic logic [PA_W-1:0] index_addr(input logic [PA_W-1:0] base, input logic [1:0] lvl,
                                                 input logic [VPN_W-1:0] v);
    unique case (lvl)
      2'd1:    return base + {26'h0, v[19:12], 2'b00};
      2'd2:    return base + {28'h0, v[11:6], 2'b00};
      default: return base + {28'h0, v[5:0], 2'b00};
    endcase
  endfunction

  assign mem_req  = (wst == W_READ);
  assign mem_addr = waddr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) tlb[e] <= '0;
      for (int p = 0; p < PTPC_ENT; p++) begin ptpc_v[p] <= 1'b0; ptpc_tag[p] <= '0; ptpc_ptp[p] <= '0; end
      tlb_repl <= '0; ptpc_repl <= '0; rr <= '0;
      wst <= W_IDLE; wlevel <= '0; wreq <= '0; wvpn <= '0; waddr <= '0;
      resp_valid <= '0; resp_fault <= '0; resp_entry <= '0;
      walk_count <= '0; ptpc_hit_count <= '0;
    end else begin
      resp_valid <= '0;
      resp_fault <= '0;
      if (flush) begin
        for (int e = 0; e < ENTRIES; e++) tlb[e].valid <= 1'b0;
        for (int p = 0; p < PTPC_ENT; p++) ptpc_v[p] <= 1'b0;
      end
      unique case (wst)
        W_IDLE: if (gnt_v && !flush) begin
          rr <= RW'((int'(gnt) + 1) % NREQ);
          if (lk_hit) begin
            resp_valid[gnt] <= 1'b1;
            resp_entry      <= lk_ent;
          end else begin
            wst  <= W_READ;
            wreq <= gnt;
            wvpn <= vpn[gnt];
            walk_count <= walk_count + 1;
            if (pc_hit) begin
              wlevel <= 2'd3;
              waddr  <= index_addr({pc_ptp, 6'b0}, 2'd3, vpn[gnt]);
              ptpc_hit_count <= ptpc_hit_count + 1;
            end else begin
              wlevel <= 2'd0;
              waddr  <= ctp + {26'h0, ctx, 2'b00};
            end
          end
        end
        W_READ: if (mem_valid) begin
          if (et == ET_PTE) begin
            tlb[tlb_repl] <= '{valid: 1'b1, vpn: wvpn, ppn: leaf_ppn, acc: mem_rdata[4:2], c: mem_rdata[7]};
            tlb_repl <= tlb_repl + 1'b1;
            resp_entry <= '{valid: 1'b1, vpn: wvpn, ppn: leaf_ppn, acc: mem_rdata[4:2], c: mem_rdata[7]};
            resp_valid[wreq] <= 1'b1;
            wst <= W_DONE;
          end else if (et == ET_PTD && wlevel != 2'd3) begin
            if (wlevel == 2'd2) begin            // pointer to a level-3 table: cache it
              ptpc_v[ptpc_repl]   <= 1'b1;
              ptpc_tag[ptpc_repl] <= wvpn[19:6];
              ptpc_ptp[ptpc_repl] <= mem_rdata[31:2];
              ptpc_repl <= PW'((int'(ptpc_repl) + 1) % PTPC_ENT);
            end
            wlevel <= wlevel + 2'd1;
            waddr  <= index_addr(next_tbl, wlevel + 2'd1, wvpn);
          end else begin
            resp_fault[wreq] <= 1'b1;
            resp_entry <= '0;
            wst <= W_DONE;
          end
        end
        default: wst <= W_IDLE;       // W_DONE: one cycle for the requester to take the answer
      endcase
    end
  end
endmodule
