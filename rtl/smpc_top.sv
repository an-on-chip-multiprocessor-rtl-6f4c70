// smpc_top: SMPC, a single-chip multiprocessor with two integer units that
// share their MMU and their data cache.
//
// Blocks and connections:
//   * two integer units (IU0, IU1), each with a private 8 KB instruction
//     cache and two level-1 TLBs: a 2-entry instruction TLB in front of the
//     instruction cache and an 8-entry data TLB in front of the data cache;
//   * one shared level-2 MMU (128-entry TLB, arbiter, table walker with a
//     page table pointer cache) that refills all four level-1 TLBs
//     (requester 0 = IU0 instruction, 1 = IU0 data, 2 = IU1 instruction,
//     3 = IU1 data);
//   * one shared 8 KB data cache with a port per IU and a snoop port;
//   * the bus unit, which puts the walker, the data cache and the two
//     instruction caches onto the external bus, holds the lock array and
//     barrier registers for the MCIS instructions and generates the on-chip
//     reset.
// The caches are virtually indexed and physically tagged: the virtual
// address goes to the cache and the TLB in the same cycle, and the TLB's
// physical address is used for the tag compare. The external bus, the snoop
// port and the MMU's context-table pointer and context are brought out as
// ports; the last two are pins here rather than registers written by
// software (this design's choice). Each IU starts at its own reset address.
// Event counters of every block are brought out for observation.
module smpc_top
  import smpc_pkg::*;
#(
  parameter logic [31:0] RESET_PC0 = 32'h0000_0000,
  parameter logic [31:0] RESET_PC1 = 32'h0000_4000
) (
  input  logic              clk,
  input  logic              rst_n,
  // MMU control
  input  logic [PA_W-1:0]   mmu_ctp,
  input  logic [7:0]        mmu_ctx,
  input  logic              mmu_flush,
  output logic [3:0]        mmu_fault,       // level-1 TLB faults: IU0 I, IU0 D, IU1 I, IU1 D
  // external bus
  output logic              ext_req,
  output bus_cmd_e          ext_cmd,
  output logic [PA_W-1:0]   ext_addr,
  input  logic              ext_gnt,
  input  logic              ext_shared,
  input  logic              ext_rvalid,
  input  logic [63:0]       ext_rdata,
  output logic [63:0]       ext_wdata,
  input  logic              ext_wready,
  // snoop port (bus transactions of other agents)
  input  logic              snp_valid,
  input  snp_cmd_e          snp_cmd,
  input  logic [PA_W-1:0]   snp_addr,
  output logic              snp_hit,
  output logic              snp_supply,
  output logic [LINE_W-1:0] snp_data,
  // status and event counts
  output logic [1:0]        halted,
  output logic [1:0]        barrier_state,
  output iu_perf_t          iu_perf [2],
  output logic [31:0]       itlb_miss_cycles [2],
  output logic [31:0]       dtlb_miss_cycles [2],
  output logic [31:0]       walk_count,
  output logic [31:0]       ptpc_hit_count,
  output logic [31:0]       icache_miss_count [2],
  output logic [31:0]       dcache_miss_count,
  output logic [31:0]       dcache_writeback_count,
  output logic [31:0]       dcache_upgrade_count,
  output logic [31:0]       dcache_snoop_hit_count,
  output logic [31:0]       dcache_conflict_count
);
  logic rst_n_sync;

  // IU side signals
  logic [1:0]  if_req, if_ready, dm_req, dm_we, dm_ready, mc_req, mc_ack, ic_flush;
  logic [31:0] if_va [2], if_instr [2], dm_va [2], dm_wdata [2], dm_rdata [2], mc_addr [2];
  logic [3:0]  dm_be [2];
  mc_op_e      mc_op [2];

  // TLB signals
  logic [1:0]  itlb_hit, dtlb_hit, itlb_c, dtlb_c, itlb_miss, dtlb_miss;
  logic [PA_W-1:0] itlb_pa [2], dtlb_pa [2];
  logic [2:0]  itlb_acc [2], dtlb_acc [2];
  logic [3:0]  l2_req, l2_valid, l2_fault;
  logic [VPN_W-1:0] l2_vpn [4];
  tlb_entry_t  l2_entry;

  // memory clients of the bus unit
  logic [3:0]  c_req, c_done;
  bus_cmd_e    c_cmd [4];
  logic [PA_W-1:0] c_addr [4];
  logic [LINE_W-1:0] c_wdata [4];
  logic [LINE_W-1:0] c_rdata;
  logic        c_shared;
  logic        walk_req;
  logic [PA_W-1:0] walk_addr;

  for (genvar i = 0; i < 2; i++) begin : g_iu
    smpc_iu #(.RESET_PC(i == 0 ? RESET_PC0 : RESET_PC1)) u_iu (
      .clk, .rst_n(rst_n_sync),
      .if_req(if_req[i]), .if_va(if_va[i]), .if_ready(if_ready[i]), .if_instr(if_instr[i]),
      .dm_req(dm_req[i]), .dm_va(dm_va[i]), .dm_we(dm_we[i]), .dm_be(dm_be[i]), .dm_wdata(dm_wdata[i]),
      .dm_ready(dm_ready[i]), .dm_rdata(dm_rdata[i]),
      .mc_req(mc_req[i]), .mc_op(mc_op[i]), .mc_addr(mc_addr[i]), .mc_ack(mc_ack[i]),
      .ic_flush(ic_flush[i]), .halted(halted[i]), .perf(iu_perf[i]));

    smpc_l1_tlb #(.ENTRIES(2)) u_itlb (
      .clk, .rst_n(rst_n_sync), .flush(mmu_flush), .req(if_req[i]), .va(if_va[i]),
      .hit(itlb_hit[i]), .pa(itlb_pa[i]), .cacheable(itlb_c[i]), .acc(itlb_acc[i]), .fault(mmu_fault[2*i]),
      .miss_cycle(itlb_miss[i]),
      .l2_req(l2_req[2*i]), .l2_vpn(l2_vpn[2*i]), .l2_valid(l2_valid[2*i]), .l2_fault(l2_fault[2*i]),
      .l2_entry(l2_entry));

    smpc_l1_tlb #(.ENTRIES(8)) u_dtlb (
      .clk, .rst_n(rst_n_sync), .flush(mmu_flush), .req(dm_req[i]), .va(dm_va[i]),
      .hit(dtlb_hit[i]), .pa(dtlb_pa[i]), .cacheable(dtlb_c[i]), .acc(dtlb_acc[i]), .fault(mmu_fault[2*i+1]),
      .miss_cycle(dtlb_miss[i]),
      .l2_req(l2_req[2*i+1]), .l2_vpn(l2_vpn[2*i+1]), .l2_valid(l2_valid[2*i+1]), .l2_fault(l2_fault[2*i+1]),
      .l2_entry(l2_entry));

    smpc_icache u_icache (
      .clk, .rst_n(rst_n_sync), .flush(ic_flush[i]), .req(if_req[i]), .va(if_va[i]),
      .pa_valid(itlb_hit[i]), .pa(itlb_pa[i]), .ready(if_ready[i]), .rdata(if_instr[i]),
      .l_req(c_req[2+i]), .l_cmd(c_cmd[2+i]), .l_addr(c_addr[2+i]), .l_done(c_done[2+i]), .l_rdata(c_rdata),
      .miss_count(icache_miss_count[i]));
    assign c_wdata[2+i] = '0;

    // miss-cycle counters of the level-1 TLBs
    always_ff @(posedge clk or negedge rst_n_sync)
      if (!rst_n_sync) begin itlb_miss_cycles[i] <= '0; dtlb_miss_cycles[i] <= '0; end
      else begin
        if (itlb_miss[i] && !itlb_hit[i]) itlb_miss_cycles[i] <= itlb_miss_cycles[i] + 1;
        if (dtlb_miss[i] && !dtlb_hit[i]) dtlb_miss_cycles[i] <= dtlb_miss_cycles[i] + 1;
      end
  end

  smpc_l2_mmu u_l2 (
    .clk, .rst_n(rst_n_sync), .flush(mmu_flush), .ctp(mmu_ctp), .ctx(mmu_ctx),
    .req(l2_req), .vpn(l2_vpn), .resp_valid(l2_valid), .resp_fault(l2_fault), .resp_entry(l2_entry),
    .mem_req(walk_req), .mem_addr(walk_addr), .mem_valid(c_done[0]), .mem_rdata(c_rdata[31:0]),
    .walk_count, .ptpc_hit_count);
  assign c_req[0]   = walk_req;
  assign c_cmd[0]   = BUS_RD_WORD;
  assign c_addr[0]  = walk_addr;
  assign c_wdata[0] = '0;

  smpc_dcache u_dcache (
    .clk, .rst_n(rst_n_sync),
    .p_req(dm_req), .p_va(dm_va), .p_pa_valid(dtlb_hit), .p_pa(dtlb_pa), .p_we(dm_we), .p_be(dm_be),
    .p_wdata(dm_wdata), .p_ready(dm_ready), .p_rdata(dm_rdata),
    .snp_valid, .snp_cmd, .snp_addr, .snp_hit, .snp_supply, .snp_data,
    .l_req(c_req[1]), .l_cmd(c_cmd[1]), .l_addr(c_addr[1]), .l_wdata(c_wdata[1]), .l_done(c_done[1]),
    .l_rdata(c_rdata), .l_shared(c_shared),
    .miss_count(dcache_miss_count), .writeback_count(dcache_writeback_count),
    .upgrade_count(dcache_upgrade_count), .snoop_hit_count(dcache_snoop_hit_count),
    .conflict_count(dcache_conflict_count));

  smpc_bus_unit u_bus (
    .clk, .rst_n_in(rst_n), .rst_n_out(rst_n_sync),
    .c_req, .c_cmd, .c_addr, .c_wdata, .c_done, .c_rdata, .c_shared,
    .ext_req, .ext_cmd, .ext_addr, .ext_gnt, .ext_shared, .ext_rvalid, .ext_rdata, .ext_wdata, .ext_wready,
    .mc_req, .mc_op, .mc_addr, .mc_ack, .barrier_state);
endmodule
