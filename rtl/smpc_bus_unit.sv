// smpc_bus_unit: the SMPC bus unit. It connects the on-chip memory clients
// to the external bus and holds the multiprocessor control state (lock
// array and barrier registers) used by the MCIS instructions.
//
// Memory side. Four clients share one external bus, served one transaction
// at a time in fixed priority: the table walker (32-bit word reads), the
// data cache, instruction cache 0 and instruction cache 1 (line reads,
// read-for-ownership, invalidate and line write-back). A client raises its
// request with command and address and holds them until a one-cycle done
// pulse, which returns read data and the shared indication. On the external
// bus a transaction has an address phase (ext_req until ext_gnt; ext_shared
// is sampled with ext_gnt and says another cache holds the line) and then a
// data phase of 64-bit beats: four ext_rvalid beats for a line read (first
// beat = bytes 0-7 of the line), one for a word read (data in bits 31:0),
// four beats handed over on ext_wready for a write-back, none for an
// invalidate. Priorities, beat width and this protocol are this design's
// choices.
//
// MCIS side. Each IU presents one operation (lock set, lock clear, barrier
// set, barrier clear) with an address and holds it until mc_ack. One
// operation is accepted per cycle, the IUs taking turns when both ask. Lock
// set succeeds when no other IU holds the address in the lock array and a
// slot is free (or the IU already holds it); otherwise it is not
// acknowledged and the IU retries. Lock clear frees the IU's slot. Barrier
// set records that the IU reached the barrier and is acknowledged once every
// IU has done so; barrier clear withdraws the IU. Lock-array size is this
// design's choice.
//
// Reset: the external reset reaches the chip at once and its release is
// synchronised by two flip-flops; the result is rst_n_out (reset generation). The released reset drives
// asynchronous flip-flop resets and also the disable condition of the
// assertions, which a linter may report as a net used both ways; it is
// intended.
module smpc_bus_unit
  import smpc_pkg::*;
#(
  parameter int unsigned NCLIENT = 4,
  parameter int unsigned NLOCK   = 8
) (
  input  logic                 clk,
  input  logic                 rst_n_in,
  output logic                 rst_n_out,
  // on-chip clients (0 = table walker, 1 = D-cache, 2/3 = I-caches)
  input  logic [NCLIENT-1:0]   c_req,
  input  bus_cmd_e             c_cmd   [NCLIENT],
  input  logic [PA_W-1:0]      c_addr  [NCLIENT],
  input  logic [LINE_W-1:0]    c_wdata [NCLIENT],
  output logic [NCLIENT-1:0]   c_done,
  output logic [LINE_W-1:0]    c_rdata,
  output logic                 c_shared,
  // external bus
  output logic                 ext_req,
  output bus_cmd_e             ext_cmd,
  output logic [PA_W-1:0]      ext_addr,
  input  logic                 ext_gnt,
  input  logic                 ext_shared,
  input  logic                 ext_rvalid,
  input  logic [63:0]          ext_rdata,
  output logic [63:0]          ext_wdata,
  input  logic                 ext_wready,
  // MCIS
  input  logic [NUM_IU-1:0]    mc_req,
  input  mc_op_e               mc_op   [NUM_IU],
  input  logic [31:0]          mc_addr [NUM_IU],
  output logic [NUM_IU-1:0]    mc_ack,
  output logic [NUM_IU-1:0]    barrier_state
);
  localparam int unsigned CW = $clog2(NCLIENT);
  localparam int unsigned IW = (NUM_IU > 1) ? $clog2(NUM_IU) : 1;

  // ---------------- reset generation ----------------
  // asserted at once with the external reset, released two clocks later
  logic rsync0, rsync1, rst_n;
  always_ff @(posedge clk or negedge rst_n_in)
    if (!rst_n_in) begin rsync0 <= 1'b0; rsync1 <= 1'b0; end
    else begin rsync0 <= 1'b1; rsync1 <= rsync0; end
  assign rst_n     = rsync1 & rst_n_in;
  assign rst_n_out = rst_n;

  // ---------------- external bus sequencer ----------------
  typedef enum logic [1:0] { B_IDLE, B_ADDR, B_DATA } bst_e;
  bst_e            bst;
  logic [CW-1:0]   cur;
  logic [1:0]      beat;
  logic [LINE_W-1:0] rbuf;
  logic            shared_q;
  logic            pick_v;
  logic [CW-1:0]   pick;

  always_comb begin
    pick_v = 1'b0; pick = '0;
    for (int i = NCLIENT-1; i >= 0; i--)
      if (c_req[i]) begin pick_v = 1'b1; pick = CW'(i); end
  end

  assign ext_req   = (bst == B_ADDR);
  assign ext_cmd   = c_cmd[cur];
  assign ext_addr  = c_addr[cur];
  assign ext_wdata = c_wdata[cur][64*beat +: 64];
  assign c_rdata   = rbuf;
  assign c_shared  = shared_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bst <= B_IDLE; cur <= '0; beat <= '0; rbuf <= '0; shared_q <= 1'b0; c_done <= '0;
    end else begin
      c_done <= '0;
      unique case (bst)
        B_IDLE: if (pick_v && !c_done[pick]) begin cur <= pick; bst <= B_ADDR; end
        B_ADDR: if (ext_gnt) begin
          shared_q <= ext_shared;
          beat <= '0;
          if (c_cmd[cur] == BUS_INV) begin c_done[cur] <= 1'b1; bst <= B_IDLE; end
          else bst <= B_DATA;
        end
        default: begin   // B_DATA
          if ((c_cmd[cur] == BUS_WB_LINE || c_cmd[cur] == BUS_WR_WORD) && ext_wready) begin
            beat <= beat + 1'b1;
            if (beat == 2'd3 || c_cmd[cur] == BUS_WR_WORD) begin c_done[cur] <= 1'b1; bst <= B_IDLE; end
          end else if (c_cmd[cur] != BUS_WB_LINE && c_cmd[cur] != BUS_WR_WORD && ext_rvalid) begin
            rbuf[64*beat +: 64] <= ext_rdata;
            beat <= beat + 1'b1;
            if (c_cmd[cur] == BUS_RD_WORD) begin
              rbuf[31:0] <= ext_rdata[31:0];
              c_done[cur] <= 1'b1; bst <= B_IDLE;
            end else if (beat == 2'd3) begin
              c_done[cur] <= 1'b1; bst <= B_IDLE;
            end
          end
        end
      endcase
    end
  end

  // ---------------- lock array and barrier registers ----------------
  logic             lk_v     [NLOCK];
  logic [31:0]      lk_addr  [NLOCK];
  logic [IW-1:0]    lk_owner [NLOCK];
  logic [NUM_IU-1:0] bar;
  logic [IW-1:0]    mc_prio;

  logic             sel_v;
  logic [IW-1:0]    sel;
  logic             ok;
  logic             found, free_v;
  int unsigned      found_i, free_i;

  always_comb begin
    logic [IW-1:0] i;
    sel_v = 1'b0; sel = '0; i = '0;
    for (int k = 0; k < NUM_IU; k++) begin
      i = IW'((int'(mc_prio) + k) % NUM_IU);
      if (!sel_v && mc_req[i]) begin sel_v = 1'b1; sel = i; end
    end
    found = 1'b0; found_i = 0; free_v = 1'b0; free_i = 0;
    for (int l = NLOCK-1; l >= 0; l--) begin
      if (lk_v[l] && lk_addr[l] == mc_addr[sel]) begin found = 1'b1; found_i = l; end
      if (!lk_v[l]) begin free_v = 1'b1; free_i = l; end
    end
    ok = 1'b0;
    if (sel_v)
      unique case (mc_op[sel])
        MC_LOCKSET: ok = found ? (lk_owner[found_i] == sel) : free_v;
        MC_LOCKCLR: ok = 1'b1;
        MC_BARSET:  ok = &(bar | (NUM_IU'(1) << sel));
        default:    ok = 1'b1;     // MC_BARCLR
      endcase
    mc_ack = '0;
    if (sel_v && ok) mc_ack[sel] = 1'b1;
  end

  assign barrier_state = bar;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < NLOCK; l++) begin lk_v[l] <= 1'b0; lk_addr[l] <= '0; lk_owner[l] <= '0; end
      bar <= '0; mc_prio <= '0;
    end else if (sel_v) begin
      mc_prio <= IW'((int'(sel) + 1) % NUM_IU);
      unique case (mc_op[sel])
        MC_LOCKSET: if (ok && !found) begin
          lk_v[free_i] <= 1'b1; lk_addr[free_i] <= mc_addr[sel]; lk_owner[free_i] <= sel;
        end
        MC_LOCKCLR: if (found && lk_owner[found_i] == sel) lk_v[found_i] <= 1'b0;
        MC_BARSET:  bar[sel] <= 1'b1;
        default:    bar[sel] <= 1'b0;
      endcase
    end
  end

  // a request must stay stable until it is acknowledged
  property p_hold(int i);
    @(posedge clk) disable iff (!rst_n) (c_req[i] && !c_done[i]) |=> c_req[i];
  endproperty
  for (genvar g = 0; g < NCLIENT; g++) begin : g_hold
    a_hold: assert property (p_hold(g));
  end
endmodule
