// smpc_iu: integer unit (IU) of the SMPC, a 32-bit scalar SPARC-based
// processor with a five-stage pipeline F (fetch), D (decode and operand
// read), E (execute, store-data read), M (cache access) and W (write back).
//
// Datapath. D reads up to three registers from the windowed register file
// (rs1, rs2 and rd, the last being store data) and picks each operand from
// the register file or a forwarding path: E->D (ALU result of the
// instruction in E), M->D (result in M, or the load aligner output when M
// holds a load) and W->D. Operands are registered into stage E. Store data
// of a store that follows a load directly is forwarded from the load
// aligner into E instead. Forwarding compares physical register rows, so it
// is correct across SAVE and RESTORE.
//
// Interlocks. Load interlock: an instruction in D that needs, as a source
// for the ALU or an address, the result of a load in E waits one cycle.
// Store interlock: the store address is held on the cache for two cycles,
// so a load or store right behind a store waits one cycle in E. The third
// (register) interlock is removed by forwarding.
//
// Control. The decoder in D produces a control word that travels with the
// instruction through E, M and W. Multi-cycle instructions are split into
// internal operations (IOPs): load-update (SMIS) issues the load and then,
// from D again, an IOP that writes the effective address into rs1; the
// string accesses use an IOP for their second word. Branches
// (Bicc, CALL, JMPL) are resolved in D with one delay slot, Bicc using the
// condition codes forwarded from E; the branch target comes from a separate
// 30-bit word-address adder. The annul bit drops the delay slot as in
// SPARC. Y and the condition codes are updated at the end of E; the window
// pointer at the end of D.
//
// Extensions. SMIS: load/store-update (the address written back to rs1),
// load/store-string and compare-string; the null-byte detector lives in
// the ALU. A string load reads the word at an unaligned address: it reads
// the aligned word holding the first byte, then an IOP reads the next word
// (address + 4), and the load aligner merges the two into rd. A string
// store writes rd to an unaligned address as two partial-word stores, the
// second one an IOP. The exact behaviour of the string instructions is
// this design's own choice. MCIS: lock
// set/clear and barrier set/clear wait in M until the bus unit acknowledges.
// Step multiply (MULScc) and a divide step replace multiply and divide.
//
// Not built: traps and precise exceptions, window overflow/underflow,
// floating point, alternate address spaces, WRPSR and
// UMUL/SMUL/UDIV/SDIV; such instructions execute as no-ops. A Ticc
// instruction halts the IU once everything before it has been written back
// (halted). The extension opcodes are listed in smpc_pkg and are this
// design's own choice, as is the halt.
//
// Interfaces: fetch (if_req/if_va, answered by if_ready/if_instr in the
// same or a later cycle), data (dm_*; loads return in the cycle dm_ready is
// high), MCIS (mc_*), instruction-cache flush, and event counts.
module smpc_iu
  import smpc_pkg::*;
#(
  parameter int unsigned NWIN     = 8,
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction fetch
  output logic        if_req,
  output logic [31:0] if_va,
  input  logic        if_ready,
  input  logic [31:0] if_instr,
  // data access
  output logic        dm_req,
  output logic [31:0] dm_va,
  output logic        dm_we,
  output logic [3:0]  dm_be,
  output logic [31:0] dm_wdata,
  input  logic        dm_ready,
  input  logic [31:0] dm_rdata,
  // multiprocessor control
  output logic        mc_req,
  output mc_op_e      mc_op,
  output logic [31:0] mc_addr,
  input  logic        mc_ack,
  // others
  output logic        ic_flush,
  output logic        halted,
  output iu_perf_t    perf
);
  localparam int unsigned CW = $clog2(NWIN);
  localparam int unsigned PW = $clog2(8 + NWIN*16);

  typedef enum logic [1:0] { RES_ALU, RES_RDY, RES_RDPSR } res_sel_e;

  typedef struct packed {
    logic          v;
    alu_op_e       alu;
    logic          wr;          // writes a register
    logic [4:0]    rd;
    logic [CW-1:0] wcwp;
    logic [PW-1:0] wphys;       // physical row written
    logic          set_icc;
    logic          wr_y;
    logic          ld;
    logic          st;
    logic [1:0]    size;        // 0 byte, 1 half, 2 word, 3 string word
    logic          part2;       // second access of a string load/store
    logic          sgn;
    logic          mc;
    mc_op_e        mcop;
    logic          halt;
    logic          flush;
    res_sel_e      res;
  } ctrl_t;

  // ---------------- state ----------------
  logic [31:0] pc_f;
  logic        pend_v, pend_annul;
  logic [31:0] pend_tgt;
  logic        d_v;
  logic [31:0] d_ir, d_pc;
  logic        d_iop;                 // D is issuing the IOP of a load-update or string access
  logic [31:0] str_q;                 // first word read by a string load
  logic        stopping;
  logic [CW-1:0] cwp;
  icc_t        icc_q;
  logic [31:0] y_q;
  ctrl_t       e_c, m_c, w_c;
  logic [31:0] e_a, e_b, e_sd;
  logic        e_sd_fwd;              // store data comes from the load aligner in E
  logic [31:0] m_res, m_sd, w_res;
  icc_t        icc_out_e;             // condition codes produced in E

  // ---------------- register file ----------------
  logic [4:0]  rs1, rs2, rdf;
  logic [31:0] rf_a, rf_b, rf_c;
  smpc_regfile #(.NWIN(NWIN)) u_rf (
    .clk, .cwp, .ra_addr(rs1), .rb_addr(rs2), .rc_addr(rdf),
    .ra_data(rf_a), .rb_data(rf_b), .rc_data(rf_c),
    .we(w_c.v && w_c.wr), .wcwp(w_c.wcwp), .waddr(w_c.rd), .wdata(w_res));

  // ---------------- decode (D) ----------------
  logic [1:0]  op;
  logic [5:0]  op3;
  logic [2:0]  op2;
  logic        imm_f;
  logic [31:0] simm13;
  ctrl_t       dc;
  logic        use_rs1, use_rs2, use_rd;
  logic        is_bicc, is_call, is_jmpl, is_save, is_restore, is_ldupd, is_str;
  logic        link;

  assign op   = d_ir[31:30];
  assign op3  = d_ir[24:19];
  assign op2  = d_ir[24:22];
  assign imm_f = d_ir[13];
  assign simm13 = {{19{d_ir[12]}}, d_ir[12:0]};
  assign rs1  = d_ir[18:14];
  assign rs2  = d_ir[4:0];
  assign rdf  = d_ir[29:25];

  always_comb begin
    dc = '0;
    dc.alu = ALU_ADD; dc.rd = rdf; dc.wcwp = cwp; dc.res = RES_ALU; dc.mcop = MC_LOCKSET;
    use_rs1 = 1'b0; use_rs2 = 1'b0; use_rd = 1'b0;
    is_bicc = 1'b0; is_call = 1'b0; is_jmpl = 1'b0; is_save = 1'b0; is_restore = 1'b0; is_ldupd = 1'b0; is_str = 1'b0;
    link = 1'b0;
    if (d_v) begin
      dc.v = 1'b1;
      unique case (op)
        2'b00: begin
          if (op2 == 3'b100) begin                  // SETHI
            dc.alu = ALU_PASSB; dc.wr = 1'b1;
          end else if (op2 == 3'b010) is_bicc = 1'b1;
        end
        2'b01: begin                                // CALL
          is_call = 1'b1; link = 1'b1; dc.alu = ALU_PASSB; dc.wr = 1'b1; dc.rd = 5'd15;
        end
        2'b10: begin
          use_rs1 = 1'b1; use_rs2 = !imm_f;
          dc.wr = 1'b1;
          unique case (op3)
            6'h00, 6'h10: dc.alu = ALU_ADD;
            6'h01, 6'h11: dc.alu = ALU_AND;
            6'h02, 6'h12: dc.alu = ALU_OR;
            6'h03, 6'h13: dc.alu = ALU_XOR;
            6'h04, 6'h14: dc.alu = ALU_SUB;
            6'h05, 6'h15: dc.alu = ALU_ANDN;
            6'h06, 6'h16: dc.alu = ALU_ORN;
            6'h07, 6'h17: dc.alu = ALU_XNOR;
            6'h08, 6'h18: dc.alu = ALU_ADDX;
            6'h0C, 6'h1C: dc.alu = ALU_SUBX;
            6'h24: begin dc.alu = ALU_MULS; dc.set_icc = 1'b1; dc.wr_y = 1'b1; end
            6'h25: dc.alu = ALU_SLL;
            6'h26: dc.alu = ALU_SRL;
            6'h27: dc.alu = ALU_SRA;
            6'h28: begin dc.res = RES_RDY; use_rs1 = 1'b0; use_rs2 = 1'b0; end
            6'h29: begin dc.res = RES_RDPSR; use_rs1 = 1'b0; use_rs2 = 1'b0; end
            6'h30: begin dc.alu = ALU_XOR; dc.wr = 1'b0; dc.wr_y = 1'b1; end   // WRY: Y <= rs1 ^ op2
            6'h38: begin is_jmpl = 1'b1; link = 1'b1; dc.alu = ALU_PASSB; end
            6'h3A: begin dc.halt = 1'b1; dc.wr = 1'b0; end                    // Ticc: halt
            6'h3B: begin dc.flush = 1'b1; dc.wr = 1'b0; end                   // FLUSH
            6'h3C: begin is_save = 1'b1; dc.wcwp = cwp - 1'b1; end
            6'h3D: begin is_restore = 1'b1; dc.wcwp = cwp + 1'b1; end
            OP3_CMPSTR: begin dc.alu = ALU_CMPSTR; dc.set_icc = 1'b1; end
            OP3_DIVS:   begin dc.alu = ALU_DIVS; dc.set_icc = 1'b1; dc.wr_y = 1'b1; end
            OP3_LOCKSET: begin dc.mc = 1'b1; dc.mcop = MC_LOCKSET; dc.wr = 1'b0; end
            OP3_LOCKCLR: begin dc.mc = 1'b1; dc.mcop = MC_LOCKCLR; dc.wr = 1'b0; end
            OP3_BARSET:  begin dc.mc = 1'b1; dc.mcop = MC_BARSET;  dc.wr = 1'b0; end
            OP3_BARCLR:  begin dc.mc = 1'b1; dc.mcop = MC_BARCLR;  dc.wr = 1'b0; end
            default: begin dc.wr = 1'b0; use_rs1 = 1'b0; use_rs2 = 1'b0; end  // not built: no-op
          endcase
          if (op3[5:4] == 2'b01 && op3 != 6'h19 && op3 != 6'h1D) dc.set_icc = 1'b1;
        end
        default: begin                              // op = 3: memory
          use_rs1 = 1'b1; use_rs2 = !imm_f;
          dc.alu = ALU_ADD;
          unique case (op3)
            6'h00: begin dc.ld = 1'b1; dc.size = 2'd2; dc.wr = 1'b1; end
            6'h01: begin dc.ld = 1'b1; dc.size = 2'd0; dc.wr = 1'b1; end
            6'h02: begin dc.ld = 1'b1; dc.size = 2'd1; dc.wr = 1'b1; end
            6'h09: begin dc.ld = 1'b1; dc.size = 2'd0; dc.sgn = 1'b1; dc.wr = 1'b1; end
            6'h0A: begin dc.ld = 1'b1; dc.size = 2'd1; dc.sgn = 1'b1; dc.wr = 1'b1; end
            6'h04: begin dc.st = 1'b1; dc.size = 2'd2; use_rd = 1'b1; end
            6'h05: begin dc.st = 1'b1; dc.size = 2'd0; use_rd = 1'b1; end
            6'h06: begin dc.st = 1'b1; dc.size = 2'd1; use_rd = 1'b1; end
            OP3_LDUPD: begin
              is_ldupd = 1'b1;
              if (!d_iop) begin dc.ld = 1'b1; dc.size = 2'd2; dc.wr = 1'b1; end
              else begin dc.wr = 1'b1; dc.rd = rs1; end          // IOP: rs1 <- rs1 + op2
            end
            OP3_STUPD: begin dc.st = 1'b1; dc.size = 2'd2; use_rd = 1'b1; dc.wr = 1'b1; dc.rd = rs1; end
            OP3_LDSTR: begin                                     // two reads, merged in the aligner
              is_str = 1'b1; dc.ld = 1'b1; dc.size = 2'd3; dc.part2 = d_iop; dc.wr = d_iop;
            end
            OP3_STSTR: begin                                     // two partial writes
              is_str = 1'b1; dc.st = 1'b1; dc.size = 2'd3; dc.part2 = d_iop; use_rd = 1'b1;
            end
            default: begin use_rs1 = 1'b0; use_rs2 = 1'b0; end
          endcase
        end
      endcase
      if (dc.rd == 5'd0) dc.wr = 1'b0;
      dc.wphys = PW'(phys_reg(int'(dc.wcwp), int'(dc.rd), NWIN));
    end
  end

  // ---------------- forwarding (into D, and load aligner into E) ----------------
  logic [31:0] e_res;          // result of the instruction in E
  logic [31:0] ld_aligned;     // load aligner output (stage M)
  logic [31:0] m_val;          // value the instruction in M will write

  function automatic logic [PW-1:0] prow(input logic [CW-1:0] w, input logic [4:0] r);
    return PW'(phys_reg(int'(w), int'(r), NWIN));
  endfunction

  typedef enum logic [2:0] { SRC_RF, SRC_E, SRC_M, SRC_LD, SRC_W } src_e;

  function automatic src_e pick_src(input logic [4:0] r);
    logic [PW-1:0] row;
    row = prow(cwp, r);
    if (r == 5'd0) return SRC_RF;
    if (e_c.v && e_c.wr && e_c.wphys == row) return SRC_E;     // a load here is an interlock
    if (m_c.v && m_c.wr && m_c.wphys == row) return m_c.ld ? SRC_LD : SRC_M;
    if (w_c.v && w_c.wr && w_c.wphys == row) return SRC_W;
    return SRC_RF;
  endfunction

  src_e        sa, sb, sc;
  logic [31:0] fa, fb, fc;
  always_comb begin
    sa = pick_src(rs1); sb = pick_src(rs2); sc = pick_src(rdf);
    unique case (sa) SRC_E: fa = e_res; SRC_M, SRC_LD: fa = m_val; SRC_W: fa = w_res; default: fa = rf_a; endcase
    unique case (sb) SRC_E: fb = e_res; SRC_M, SRC_LD: fb = m_val; SRC_W: fb = w_res; default: fb = rf_b; endcase
    unique case (sc) SRC_E: fc = e_res; SRC_M, SRC_LD: fc = m_val; SRC_W: fc = w_res; default: fc = rf_c; endcase
  end

  // ---------------- interlocks and stalls ----------------
  logic load_ilk, store_ilk, m_stall, iop_hold, d_adv, f_ok;
  assign load_ilk  = d_v && e_c.v && e_c.ld &&
                     ((use_rs1 && sa == SRC_E) || (use_rs2 && sb == SRC_E) || is_jmpl && sa == SRC_E);
  assign m_stall   = m_c.v && (((m_c.ld || m_c.st) && !dm_ready) || (m_c.mc && !mc_ack));
  assign store_ilk = !m_stall && m_c.v && m_c.st && e_c.v && (e_c.ld || e_c.st);
  assign iop_hold  = (is_ldupd || is_str) && !d_iop;   // first cycle of a load-update or string access
  assign d_adv     = !m_stall && !store_ilk && !load_ilk;
  assign f_ok      = if_req && if_ready;

  // ---------------- branch unit (D) ----------------
  logic        cond, taken, annul_slot, is_cti;
  logic [31:0] tgt, tgt_eff;
  icc_t        icc_d;
  always_comb begin
    logic [29:0] disp;
    icc_d = (e_c.v && e_c.set_icc) ? icc_out_e : icc_q;      // forward icc from E
    unique case (d_ir[28:25])
      4'h0: cond = 1'b0;
      4'h1: cond = icc_d.z;
      4'h2: cond = icc_d.z | (icc_d.n ^ icc_d.v);
      4'h3: cond = icc_d.n ^ icc_d.v;
      4'h4: cond = icc_d.c | icc_d.z;
      4'h5: cond = icc_d.c;
      4'h6: cond = icc_d.n;
      4'h7: cond = icc_d.v;
      4'h8: cond = 1'b1;
      4'h9: cond = ~icc_d.z;
      4'hA: cond = ~(icc_d.z | (icc_d.n ^ icc_d.v));
      4'hB: cond = ~(icc_d.n ^ icc_d.v);
      4'hC: cond = ~(icc_d.c | icc_d.z);
      4'hD: cond = ~icc_d.c;
      4'hE: cond = ~icc_d.n;
      default: cond = ~icc_d.v;
    endcase
    disp = is_call ? d_ir[29:0] : {{8{d_ir[21]}}, d_ir[21:0]};
    tgt = {d_pc[31:2] + disp, 2'b00};                          // 30-bit branch adder
    if (is_jmpl) tgt = fa + (imm_f ? simm13 : fb);
    is_cti     = is_bicc || is_call || is_jmpl;
    taken      = is_call || is_jmpl || (is_bicc && cond);
    annul_slot = is_bicc && d_ir[29] && (!cond || d_ir[28:25] == 4'h8);
    tgt_eff    = taken ? tgt : d_pc + 32'd8;
  end

  // ---------------- execute (E) ----------------
  logic [31:0] alu_res, y_new;
  logic [3:0]  null_unused;
  smpc_alu u_alu (.op(e_c.alu), .a(e_a), .b(e_b), .icc_in(icc_q), .y_in(y_q),
                  .result(alu_res), .icc_out(icc_out_e), .y_out(y_new), .null_a(null_unused));
  always_comb
    unique case (e_c.res)
      RES_RDY:   e_res = y_q;
      RES_RDPSR: e_res = {8'h0, icc_q, 15'h0, 5'(cwp)};
      default:   e_res = alu_res;
    endcase

  // ---------------- memory (M) ----------------
  logic [7:0]  ld_byte;
  logic [15:0] ld_half;
  always_comb begin
    logic [1:0] off;
    off = m_res[1:0];
    unique case (m_c.size)
      2'd0: begin dm_be = 4'b1000 >> off; dm_wdata = {4{m_sd[7:0]}}; end
      2'd1: begin dm_be = off[1] ? 4'b0011 : 4'b1100; dm_wdata = {2{m_sd[15:0]}}; end
      2'd3: begin
        dm_be    = m_c.part2 ? ~(4'b1111 >> off) : (4'b1111 >> off);
        dm_wdata = m_c.part2 ? 32'({m_sd, 32'd0} >> (8*off)) : (m_sd >> (8*off));
      end
      default: begin dm_be = 4'b1111; dm_wdata = m_sd; end
    endcase
    ld_byte = dm_rdata[31 - 8*off -: 8];
    ld_half = off[1] ? dm_rdata[15:0] : dm_rdata[31:16];
    unique case (m_c.size)
      2'd0:    ld_aligned = {{24{m_c.sgn & ld_byte[7]}}, ld_byte};
      2'd1:    ld_aligned = {{16{m_c.sgn & ld_half[15]}}, ld_half};
      2'd3:    ld_aligned = 32'({str_q, dm_rdata} >> (6'd32 - {off, 3'b000}));
      default: ld_aligned = dm_rdata;
    endcase
    m_val = m_c.ld ? ld_aligned : m_res;
  end
  assign dm_req   = m_c.v && (m_c.ld || m_c.st);
  assign dm_va    = m_res;
  assign dm_we    = m_c.st;
  assign mc_req   = m_c.v && m_c.mc;
  assign mc_op    = m_c.mcop;
  assign mc_addr  = m_res;
  assign ic_flush = m_c.v && m_c.flush && !m_stall;

  // ---------------- fetch ----------------
  assign if_req = !stopping && !halted;
  assign if_va  = pc_f;

  // ---------------- pipeline registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_f <= RESET_PC; pend_v <= 1'b0; pend_annul <= 1'b0; pend_tgt <= '0;
      d_v <= 1'b0; d_ir <= '0; d_pc <= '0; d_iop <= 1'b0; str_q <= '0; stopping <= 1'b0; halted <= 1'b0;
      cwp <= '0; icc_q <= '0; y_q <= '0;
      e_c <= '0; m_c <= '0; w_c <= '0;
      e_a <= '0; e_b <= '0; e_sd <= '0; e_sd_fwd <= 1'b0; m_res <= '0; m_sd <= '0; w_res <= '0;
      perf <= '0;
    end else begin
      // first word of a string load
      if (!m_stall && m_c.v && m_c.ld && m_c.size == 2'd3 && !m_c.part2) str_q <= dm_rdata;
      // W
      if (m_stall) w_c <= '0;
      else begin w_c <= m_c; w_res <= m_val; end
      if (w_c.v) perf.retired <= perf.retired + 1;
      if (w_c.v && w_c.halt) halted <= 1'b1;
      // M
      if (!m_stall) begin
        if (store_ilk) m_c <= '0;
        else begin
          m_c   <= e_c;
          m_res <= e_res;
          m_sd  <= e_sd_fwd ? ld_aligned : e_sd;
          if (e_sd_fwd) perf.fwd_load <= perf.fwd_load + 1;
          if (e_c.v && e_c.set_icc) icc_q <= icc_out_e;
          if (e_c.v && e_c.wr_y) y_q <= (e_c.alu == ALU_XOR) ? alu_res : y_new;
        end
      end else perf.mem_stall <= perf.mem_stall + 1;
      if (store_ilk) perf.store_interlock <= perf.store_interlock + 1;
      // E
      if (!m_stall && !store_ilk) begin
        if (load_ilk) begin
          e_c <= '0;
          perf.load_interlock <= perf.load_interlock + 1;
        end else begin
          e_c  <= dc;
          e_a  <= fa;
          e_b  <= link ? d_pc : (dc.alu == ALU_PASSB && op == 2'b00) ? {d_ir[21:0], 10'b0} :
                  (imm_f ? simm13 : fb) + ((is_str && d_iop) ? 32'd4 : 32'd0);
          e_sd <= fc;
          e_sd_fwd <= use_rd && sc == SRC_E && e_c.v && e_c.ld;
          if (d_v) begin
            if ((use_rs1 || is_jmpl) && sa == SRC_E) perf.fwd_e <= perf.fwd_e + 1;
            if (use_rs1 && sa == SRC_M) perf.fwd_m <= perf.fwd_m + 1;
            if (use_rs1 && sa == SRC_W) perf.fwd_w <= perf.fwd_w + 1;
            if (use_rs1 && sa == SRC_LD) perf.fwd_load <= perf.fwd_load + 1;
          end
        end
      end
      // D and F
      if (d_adv) begin
        if (d_v && (is_save || is_restore) && !iop_hold) cwp <= dc.wcwp;
        if (d_v && dc.halt) stopping <= 1'b1;
        if (iop_hold) begin
          d_iop <= 1'b1;                                // keep the instruction, issue its IOP next
          perf.iop <= perf.iop + 1;
        end else begin
          d_iop <= 1'b0;
          if (d_v && is_cti) begin
            if (taken) perf.taken <= perf.taken + 1;
            if (f_ok) begin
              d_v  <= !annul_slot && !stopping;
              d_ir <= if_instr; d_pc <= pc_f;
              pc_f <= tgt_eff;
              if (annul_slot) perf.annulled <= perf.annulled + 1;
            end else begin
              d_v <= 1'b0;
              pend_v <= 1'b1; pend_tgt <= tgt_eff; pend_annul <= annul_slot;
            end
          end else if (f_ok && !stopping && !(d_v && dc.halt)) begin
            d_v  <= !(pend_v && pend_annul);
            d_ir <= if_instr; d_pc <= pc_f;
            if (pend_v && pend_annul) perf.annulled <= perf.annulled + 1;
            pc_f <= pend_v ? pend_tgt : pc_f + 32'd4;
            pend_v <= 1'b0;
          end else begin
            d_v <= 1'b0;
            if (!stopping) perf.fetch_stall <= perf.fetch_stall + 1;
          end
        end
      end
    end
  end

  // an IOP is issued only from a load-update or string access held in D
  a_iop: assert property (@(posedge clk) disable iff (!rst_n) d_iop |-> (d_v && (is_ldupd || is_str)));
endmodule
