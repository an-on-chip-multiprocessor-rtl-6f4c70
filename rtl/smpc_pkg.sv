// smpc_pkg: types and constants shared by the SMPC blocks.
//
// Address widths follow the design: 32-bit virtual addresses are translated
// to 36-bit physical addresses with 4 KB pages (20-bit virtual page number,
// 24-bit physical page number). Page-table entry layout follows the SPARC
// reference MMU, on which the integer unit's architecture is based. Bus
// command codes, MCIS operation codes and the cache-line state encoding are
// this design's own choices.
package smpc_pkg;

  localparam int unsigned VA_W   = 32;
  localparam int unsigned PA_W   = 36;
  localparam int unsigned VPN_W  = 20;
  localparam int unsigned PPN_W  = 24;
  localparam int unsigned LINE_BYTES = 32;
  localparam int unsigned LINE_W = 256;
  localparam int unsigned NUM_IU = 2;

  // One translation, as held by every TLB level.
  typedef struct packed {
    logic              valid;
    logic [VPN_W-1:0]  vpn;
    logic [PPN_W-1:0]  ppn;
    logic [2:0]        acc;    // SPARC access-permission code
    logic              c;      // cacheable
  } tlb_entry_t;

  // Page-table entry types (ET field, bits 1:0).
  localparam logic [1:0] ET_INVALID = 2'd0;
  localparam logic [1:0] ET_PTD     = 2'd1;
  localparam logic [1:0] ET_PTE     = 2'd2;

  // Commands on the on-chip and external memory bus.
  typedef enum logic [2:0] {
    BUS_RD_LINE  = 3'd0,   // read a 32-byte line, shared
    BUS_RDX_LINE = 3'd1,   // read a 32-byte line for ownership
    BUS_INV      = 3'd2,   // invalidate other copies (upgrade), no data
    BUS_WB_LINE  = 3'd3,   // write back a 32-byte line
    BUS_RD_WORD  = 3'd4,   // read one 32-bit word (table walk)
    BUS_WR_WORD  = 3'd5    // write one 32-bit word
  } bus_cmd_e;

  // Cache-line coherence states (write-invalidate, five states).
  typedef enum logic [2:0] {
    ST_I = 3'd0, ST_E = 3'd1, ST_S = 3'd2, ST_O = 3'd3, ST_M = 3'd4
  } line_state_e;

  // Snoop requests seen from the external bus.
  typedef enum logic [1:0] {
    SNP_RD  = 2'd0,   // another agent reads: give up exclusivity
    SNP_RDX = 2'd1,   // another agent reads for ownership: invalidate
    SNP_INV = 2'd2    // another agent upgrades: invalidate
  } snp_cmd_e;

  // Multiprocessor control operations (lock and barrier).
  typedef enum logic [1:0] {
    MC_LOCKSET = 2'd0, MC_LOCKCLR = 2'd1, MC_BARSET = 2'd2, MC_BARCLR = 2'd3
  } mc_op_e;

  // Integer condition codes.
  typedef struct packed { logic n, z, v, c; } icc_t;

  // ALU operations.
  typedef enum logic [4:0] {
    ALU_ADD, ALU_ADDX, ALU_SUB, ALU_SUBX, ALU_AND, ALU_ANDN, ALU_OR, ALU_ORN,
    ALU_XOR, ALU_XNOR, ALU_SLL, ALU_SRL, ALU_SRA, ALU_MULS, ALU_DIVS,
    ALU_CMPSTR, ALU_PASSB, ALU_PASSA
  } alu_op_e;

  // Opcode (op3) values of the extension instructions. The string (SMIS) and
  // multiprocessor (MCIS) instructions are placed in op3 codes that SPARC V8
  // leaves unused; the choice of codes is this design's own.
  localparam logic [5:0] OP3_LDUPD  = 6'h08;  // op=3: load word, rs1 <- effective address
  localparam logic [5:0] OP3_STUPD  = 6'h0C;  // op=3: store word, rs1 <- effective address
  localparam logic [5:0] OP3_LDSTR  = 6'h0B;  // op=3: load string word from an unaligned address
  localparam logic [5:0] OP3_STSTR  = 6'h0E;  // op=3: store string word to an unaligned address
  localparam logic [5:0] OP3_CMPSTR = 6'h09;  // op=2: compare string words, sets icc
  localparam logic [5:0] OP3_DIVS   = 6'h0D;  // op=2: divide step, sets icc and Y
  localparam logic [5:0] OP3_LOCKSET = 6'h2C; // op=2: lock set at rs1+op2
  localparam logic [5:0] OP3_LOCKCLR = 6'h2D; // op=2: lock clear at rs1+op2
  localparam logic [5:0] OP3_BARSET  = 6'h2E; // op=2: barrier set
  localparam logic [5:0] OP3_BARCLR  = 6'h2F; // op=2: barrier clear

  // Event counts of one integer unit, for observation.
  typedef struct packed {
    logic [31:0] retired;          // instructions written back (bubbles excluded)
    logic [31:0] load_interlock;   // cycles lost to the load interlock
    logic [31:0] store_interlock;  // cycles lost to the store interlock
    logic [31:0] fwd_e;            // operands forwarded from stage E
    logic [31:0] fwd_m;            // operands forwarded from stage M (ALU results)
    logic [31:0] fwd_w;            // operands forwarded from stage W
    logic [31:0] fwd_load;         // operands forwarded from the load aligner
    logic [31:0] iop;              // internal operations inserted
    logic [31:0] annulled;         // delay-slot instructions annulled
    logic [31:0] taken;            // control transfers taken
    logic [31:0] mem_stall;        // cycles stage M waited for memory or MCIS
    logic [31:0] fetch_stall;      // cycles without an instruction from fetch
  } iu_perf_t;

  // Physical register-file row of register r in window w (SPARC overlap:
  // ins of window w are the outs of window w+1). Shared by the register file
  // and the forwarding logic.
  function automatic int unsigned phys_reg(input int unsigned w, input int unsigned r, input int unsigned nwin);
    if (r < 8) return r;
    return 8 + ((w * 16 + r - 8) % (nwin * 16));
  endfunction

endpackage
