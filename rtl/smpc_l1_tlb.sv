// smpc_l1_tlb: small fully associative level-1 TLB (one per IU and per
// instruction/data side).
//
// The design uses a 2-entry instruction TLB and an 8-entry data TLB for each
// IU; ENTRIES selects which. A lookup is combinational: when req is high and
// the virtual page of va matches a valid entry, hit is high in the same
// cycle together with the 36-bit physical address. On a miss, l2_req is
// raised with the virtual page number and held until the shared level-2 MMU
// answers with l2_valid. The answer is passed straight through to hit/pa in
// that cycle (bypass) and written into the TLB at the same clock edge, so an
// L1 miss that hits in the L2 TLB costs one clock cycle. A page fault from
// the L2 MMU is passed on as fault for one cycle and not stored. The
// requester must hold req and va until hit or fault. Replacement is
// round-robin and flush clears every entry; both are this design's choices.
module smpc_l1_tlb
  import smpc_pkg::*;
#(
  parameter int unsigned ENTRIES = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  input  logic              req,
  input  logic [VA_W-1:0]   va,
  output logic              hit,
  output logic [PA_W-1:0]   pa,
  output logic              cacheable,
  output logic [2:0]        acc,
  output logic              fault,
  output logic              miss_cycle,   // high in each cycle of an outstanding miss
  // refill interface to the level-2 MMU
  output logic              l2_req,
  output logic [VPN_W-1:0]  l2_vpn,
  input  logic              l2_valid,
  input  logic              l2_fault,
  input  tlb_entry_t        l2_entry
);
  localparam int unsigned IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  tlb_entry_t      ent [ENTRIES];
  logic [IW-1:0]   repl;
  logic [VPN_W-1:0] vpn;
  logic            l1_hit;
  tlb_entry_t      sel;

  assign vpn = va[31:12];

  always_comb begin
    l1_hit = 1'b0; sel = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (ent[i].valid && ent[i].vpn == vpn) begin l1_hit = 1'b1; sel = ent[i]; end
    if (!l1_hit && l2_valid && l2_entry.vpn == vpn) sel = l2_entry;   // bypass
  end

  assign hit        = req && (l1_hit || (l2_valid && !l2_fault && l2_entry.vpn == vpn));
  assign fault      = req && !l1_hit && l2_fault;
  assign pa         = {sel.ppn, va[11:0]};
  assign cacheable  = sel.c;
  assign acc        = sel.acc;
  assign l2_req     = req && !l1_hit && !l2_valid && !l2_fault;
  assign l2_vpn     = vpn;
  assign miss_cycle = req && !l1_hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ent[i] <= '0;
      repl <= '0;
    end else if (flush) begin
      for (int i = 0; i < ENTRIES; i++) ent[i].valid <= 1'b0;
    end else if (req && !l1_hit && l2_valid && !l2_fault) begin
      ent[repl] <= l2_entry;
      repl <= (int'(repl) == ENTRIES-1) ? '0 : repl + 1'b1;
    end
  end
endmodule
