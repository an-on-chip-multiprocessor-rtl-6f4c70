// smpc_asm_pkg: instruction encoders used by the testbenches to build
// SPARC-format programs for the integer unit, including the design's string
// and multiprocessor extension instructions.
package smpc_asm_pkg;
  import smpc_pkg::*;

  localparam logic [3:0] C_A = 4'h8, C_N = 4'h0, C_NE = 4'h9, C_E = 4'h1, C_NEG = 4'h6,
                         C_G = 4'hA, C_LE = 4'h2;

  function automatic logic [31:0] f3r(logic [1:0] op, logic [4:0] rd, logic [5:0] op3, logic [4:0] rs1, logic [4:0] rs2);
    return {op, rd, op3, rs1, 1'b0, 8'h00, rs2};
  endfunction
  function automatic logic [31:0] f3i(logic [1:0] op, logic [4:0] rd, logic [5:0] op3, logic [4:0] rs1, int simm);
    return {op, rd, op3, rs1, 1'b1, 13'(simm)};
  endfunction
  function automatic logic [31:0] sethi(logic [4:0] rd, logic [31:0] value);
    return {2'b00, rd, 3'b100, value[31:10]};
  endfunction
  function automatic logic [31:0] bicc(logic [3:0] cond, logic a, int disp);
    return {2'b00, a, cond, 3'b010, 22'(disp)};
  endfunction
  function automatic logic [31:0] call(int disp); return {2'b01, 30'(disp)}; endfunction
  function automatic logic [31:0] nop(); return sethi(5'd0, 32'h0); endfunction
  function automatic logic [31:0] halt(); return {2'b10, 5'b01000, 6'h3A, 5'd0, 1'b1, 13'd0}; endfunction

  // arithmetic, register/immediate forms (op = 2)
  function automatic logic [31:0] alur(logic [5:0] op3, logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return f3r(2'b10, rd, op3, rs1, rs2);
  endfunction
  function automatic logic [31:0] alui(logic [5:0] op3, logic [4:0] rd, logic [4:0] rs1, int simm);
    return f3i(2'b10, rd, op3, rs1, simm);
  endfunction
  // memory (op = 3): mem(op3, rd, rs1, simm)
  function automatic logic [31:0] mem(logic [5:0] op3, logic [4:0] rd, logic [4:0] rs1, int simm);
    return f3i(2'b11, rd, op3, rs1, simm);
  endfunction

  localparam logic [5:0] ADD = 6'h00, AND = 6'h01, OR = 6'h02, XOR = 6'h03, SUB = 6'h04,
                         ADDCC = 6'h10, ANDCC = 6'h11, SUBCC = 6'h14, MULSCC = 6'h24,
                         SLL = 6'h25, SRL = 6'h26, SRA = 6'h27, RDY = 6'h28, WRY = 6'h30,
                         JMPL = 6'h38, FLUSH = 6'h3B, SAVE = 6'h3C, RESTORE = 6'h3D;
  localparam logic [5:0] LD = 6'h00, LDUB = 6'h01, LDUH = 6'h02, ST = 6'h04, STB = 6'h05,
                         STH = 6'h06, LDSB = 6'h09;
endpackage
