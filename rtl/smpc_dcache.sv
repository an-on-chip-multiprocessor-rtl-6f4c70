// smpc_dcache: data cache shared by the two IUs: 8 KB, 4-way set
// associative, 32-byte lines, write-back, virtually indexed and physically
// tagged, with five-state (MOESI) write-invalidate snooping.
//
// Because both IUs use the same cache there is no coherence traffic between
// them: a word one IU stores is seen by the other's next load. The tags are
// looked up three times per cycle: once for each IU port and once for the
// snoop port. Each 2 KB way is indexed by VA[10:5]; the tag is PA[35:11].
//
// IU port timing. A load that hits returns its word in the same cycle
// (ready). A store takes two cycles: in the first the tag is checked
// (ready, the line becomes Modified), in the second the bytes are written;
// during that second cycle accesses to the same set wait. When both ports
// touch one set in one cycle and either stores, port 1 waits a cycle.
//
// Misses. One miss is handled at a time, port 0 first. The victim is an
// invalid way or else the least recently used one (2-bit ages per way). A
// Modified or Owned victim is first written back. A load miss then reads the
// line (state Shared if another cache answered shared, else Exclusive); a
// store miss reads it for ownership (Modified). A store that hits a Shared
// or Owned line first broadcasts an invalidate and then owns the line.
// Accesses to the set being replaced wait until the miss is finished.
//
// Snoops from the external bus (read, read-for-ownership, invalidate) are
// answered combinationally: snp_hit says the line is present, snp_supply
// that this cache holds the newest data (M or O), given on snp_data. At the
// clock edge M becomes O and E becomes S on a read; any other request
// invalidates. All lines are treated as cacheable. Port arbitration, LRU
// ages and the one-at-a-time miss handling are this design's choices.
module smpc_dcache
  import smpc_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 8192,
  parameter int unsigned WAYS       = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // two IU ports
  input  logic [1:0]        p_req,
  input  logic [VA_W-1:0]   p_va      [2],
  input  logic [1:0]        p_pa_valid,
  input  logic [PA_W-1:0]   p_pa      [2],
  input  logic [1:0]        p_we,
  input  logic [3:0]        p_be      [2],     // bit i enables data bits 8i+7:8i
  input  logic [31:0]       p_wdata   [2],
  output logic [1:0]        p_ready,
  output logic [31:0]       p_rdata   [2],
  // snoop port
  input  logic              snp_valid,
  input  snp_cmd_e          snp_cmd,
  input  logic [PA_W-1:0]   snp_addr,
  output logic              snp_hit,
  output logic              snp_supply,
  output logic [LINE_W-1:0] snp_data,
  // line transfers through the bus unit
  output logic              l_req,
  output bus_cmd_e          l_cmd,
  output logic [PA_W-1:0]   l_addr,
  output logic [LINE_W-1:0] l_wdata,
  input  logic              l_done,
  input  logic [LINE_W-1:0] l_rdata,
  input  logic              l_shared,
  // event counts
  output logic [31:0]       miss_count,
  output logic [31:0]       writeback_count,
  output logic [31:0]       upgrade_count,
  output logic [31:0]       snoop_hit_count,
  output logic [31:0]       conflict_count
);
  localparam int unsigned SETS = SIZE_BYTES / (WAYS * LINE_BYTES);
  localparam int unsigned SW   = $clog2(SETS);
  localparam int unsigned WW   = $clog2(WAYS);
  localparam int unsigned TW   = PA_W - 5 - SW;

  logic [LINE_W-1:0] data  [WAYS][SETS];
  logic [TW-1:0]     tag   [WAYS][SETS];
  line_state_e       state [WAYS][SETS];
  logic [WW-1:0]     age   [WAYS][SETS];

  // pending second cycle of a store, per port
  typedef struct packed {
    logic          v;
    logic [WW-1:0] way;
    logic [SW-1:0] set;
    logic [2:0]    word;
    logic [3:0]    be;
    logic [31:0]   data;
  } pend_t;
  pend_t pend [2];

  // miss handler
  typedef enum logic [1:0] { F_IDLE, F_WB, F_FILL, F_UPG } fst_e;
  fst_e          fst;
  logic [SW-1:0] fset;
  logic [WW-1:0] fway;
  logic [PA_W-1:0] faddr;
  logic          fstore;
  logic [LINE_W-1:0] wbuf;

  // ---------------- per-port lookup ----------------
  logic [SW-1:0] pset  [2];
  logic [1:0]    phit;
  logic [WW-1:0] pway  [2];
  line_state_e   pst   [2];
  logic [1:0]    pblock;
  logic [1:0]    pneed;          // port needs the miss handler

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      pset[p] = p_va[p][5 +: SW];
      phit[p] = 1'b0; pway[p] = '0; pst[p] = ST_I;
      for (int w = 0; w < WAYS; w++)
        if (state[w][pset[p]] != ST_I && tag[w][pset[p]] == p_pa[p][PA_W-1 -: TW]) begin
          phit[p] = 1'b1; pway[p] = WW'(w); pst[p] = state[w][pset[p]];
        end
      pblock[p] = 1'b0;
      for (int q = 0; q < 2; q++)
        if (pend[q].v && pend[q].set == pset[p]) pblock[p] = 1'b1;
      if (fst != F_IDLE && fset == pset[p]) pblock[p] = 1'b1;
    end
    if (p_req[0] && p_req[1] && pset[0] == pset[1] && (p_we[0] || p_we[1])) pblock[1] = 1'b1;
    for (int p = 0; p < 2; p++) begin
      p_ready[p] = p_req[p] && p_pa_valid[p] && !pblock[p] && phit[p] &&
                   (!p_we[p] || pst[p] == ST_E || pst[p] == ST_M);
      pneed[p]   = p_req[p] && p_pa_valid[p] && !pblock[p] && !p_ready[p];
      p_rdata[p] = data[pway[p]][pset[p]][32*p_va[p][4:2] +: 32];
    end
  end

  // ---------------- snoop lookup ----------------
  logic [SW-1:0] sset;
  logic [WW-1:0] sway;
  line_state_e   sst;
  always_comb begin
    sset = snp_addr[5 +: SW];
    snp_hit = 1'b0; sway = '0; sst = ST_I;
    for (int w = 0; w < WAYS; w++)
      if (state[w][sset] != ST_I && tag[w][sset] == snp_addr[PA_W-1 -: TW]) begin
        snp_hit = snp_valid; sway = WW'(w); sst = state[w][sset];
      end
    snp_supply = snp_hit && (sst == ST_M || sst == ST_O);
    snp_data = data[sway][sset];
    for (int q = 0; q < 2; q++)          // include a store still in its second cycle
      if (pend[q].v && pend[q].set == sset && pend[q].way == sway)
        for (int b = 0; b < 4; b++)
          if (pend[q].be[b]) snp_data[32*pend[q].word + 8*b +: 8] = pend[q].data[8*b +: 8];
  end

  // ---------------- victim choice for the miss handler ----------------
  logic          start;
  logic          sport;
  logic [WW-1:0] vway;
  always_comb begin
    sport = pneed[0] ? 1'b0 : 1'b1;
    start = (fst == F_IDLE) && (pneed != 2'b00) && !pend[0].v && !pend[1].v;
    vway = '0;
    begin
      logic found;
      found = 1'b0;
      for (int w = 0; w < WAYS; w++)
        if (!found && state[w][pset[sport]] == ST_I) begin found = 1'b1; vway = WW'(w); end
      for (int w = 0; w < WAYS; w++)
        if (!found && age[w][pset[sport]] == WW'(WAYS-1)) begin found = 1'b1; vway = WW'(w); end
    end
  end

  assign l_req   = (fst != F_IDLE);
  assign l_cmd   = (fst == F_WB) ? BUS_WB_LINE : (fst == F_UPG) ? BUS_INV :
                   (fstore ? BUS_RDX_LINE : BUS_RD_LINE);
  assign l_addr  = (fst == F_WB) ? {tag[fway][fset], fset, 5'b0} : {faddr[PA_W-1:5], 5'b0};
  assign l_wdata = wbuf;

  // age update: the touched way becomes youngest
  task automatic touch(input logic [SW-1:0] s, input logic [WW-1:0] w);
    for (int k = 0; k < WAYS; k++)
      if (age[k][s] < age[w][s]) age[k][s] <= age[k][s] + 1'b1;
    age[w][s] <= '0;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < WAYS; w++) for (int s = 0; s < SETS; s++) begin
        state[w][s] <= ST_I; tag[w][s] <= '0; age[w][s] <= WW'(w);
      end
      for (int q = 0; q < 2; q++) pend[q] <= '0;
      fst <= F_IDLE; fset <= '0; fway <= '0; faddr <= '0; fstore <= 1'b0; wbuf <= '0;
      miss_count <= '0; writeback_count <= '0; upgrade_count <= '0; snoop_hit_count <= '0; conflict_count <= '0;
    end else begin
      // second cycle of stores: write the bytes
      for (int q = 0; q < 2; q++) begin
        if (pend[q].v)
          for (int b = 0; b < 4; b++)
            if (pend[q].be[b]) data[pend[q].way][pend[q].set][32*pend[q].word + 8*b +: 8] <= pend[q].data[8*b +: 8];
        pend[q] <= '0;
      end
      // first cycle: hits
      for (int p = 0; p < 2; p++) begin
        if (p_req[p] && p_pa_valid[p] && pblock[p]) conflict_count <= conflict_count + 1;
        if (p_ready[p]) begin
          if (!(p == 1 && p_ready[0] && pset[0] == pset[1])) touch(pset[p], pway[p]);
          if (p_we[p]) begin
            state[pway[p]][pset[p]] <= ST_M;
            pend[p] <= '{v: 1'b1, way: pway[p], set: pset[p], word: p_va[p][4:2], be: p_be[p], data: p_wdata[p]};
          end
        end
      end
      // snoop state changes
      if (snp_hit) begin
        snoop_hit_count <= snoop_hit_count + 1;
        if (snp_cmd == SNP_RD) begin
          if (sst == ST_M) state[sway][sset] <= ST_O;
          else if (sst == ST_E) state[sway][sset] <= ST_S;
        end else begin
          state[sway][sset] <= ST_I;
        end
      end
      // miss handler
      unique case (fst)
        F_IDLE: if (start) begin
          fset   <= pset[sport];
          faddr  <= p_pa[sport];
          fstore <= p_we[sport];
          if (phit[sport]) begin                      // store to a Shared/Owned line
            fway <= pway[sport];
            fst  <= F_UPG;
            upgrade_count <= upgrade_count + 1;
          end else begin
            fway <= vway;
            miss_count <= miss_count + 1;
            wbuf <= data[vway][pset[sport]];
            if (state[vway][pset[sport]] == ST_M || state[vway][pset[sport]] == ST_O) begin
              fst <= F_WB;
              writeback_count <= writeback_count + 1;
            end else begin
              state[vway][pset[sport]] <= ST_I;
              fst <= F_FILL;
            end
          end
        end
        F_WB: if (l_done) begin
          state[fway][fset] <= ST_I;
          fst <= F_FILL;
        end
        F_FILL: if (l_done) begin
          data[fway][fset]  <= l_rdata;
          tag[fway][fset]   <= faddr[PA_W-1 -: TW];
          state[fway][fset] <= fstore ? ST_M : (l_shared ? ST_S : ST_E);
          touch(fset, fway);
          fst <= F_IDLE;
        end
        default: if (l_done) begin                  // F_UPG
          if (state[fway][fset] != ST_I) state[fway][fset] <= ST_M;
          fst <= F_IDLE;
        end
      endcase
    end
  end

  // the two IU ports are never granted a store to the same set together
  a_no_double_store: assert property (@(posedge clk) disable iff (!rst_n)
    !(p_ready[0] && p_ready[1] && (p_we[0] || p_we[1]) && pset[0] == pset[1]));
endmodule
