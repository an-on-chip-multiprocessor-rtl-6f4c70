// tb_smpc_alu: self-checking test of the integer ALU.
// Random operands for every operation are checked against a reference
// written with plain SystemVerilog arithmetic. Then a 32-bit unsigned
// division is run as 32 divide steps and a multiplication as 32 multiply
// steps plus the final shift, feeding Y and the condition codes back as the
// pipeline would, and the products and quotients are compared.
module tb_smpc_alu;
  import smpc_pkg::*;
  alu_op_e op;
  logic [31:0] a, b, y, res, yo;
  icc_t icc, icco;
  logic [3:0] nul;
  int checks = 0, failures = 0;

  smpc_alu dut (.op, .a, .b, .icc_in(icc), .y_in(y), .result(res), .icc_out(icco), .y_out(yo), .null_a(nul));

  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s op=%s a=%h b=%h got %h exp %h", what, op.name(), a, b, got, exp); end
  endtask

  function automatic logic [31:0] pick(int sel);
    case (sel)
      0: return 32'h0; 1: return 32'hFFFFFFFF; 2: return 32'h80000000; 3: return 32'h7FFFFFFF;
      default: return $urandom;
    endcase
  endfunction

  initial begin
    logic [32:0] wide; logic [31:0] e; logic [3:0] en; icc_t ei;
    for (int i = 0; i < 20000; i++) begin
      op = alu_op_e'($urandom_range(0, 17));
      a = pick($urandom_range(0, 7)); b = pick($urandom_range(0, 7));
      if ($urandom_range(0,3) == 0) a[15:8] = 0;
      if (op == ALU_CMPSTR && $urandom_range(0,1)) begin b = a; if ($urandom_range(0,1)) b[7:0] ^= 8'h5; end
      icc = icc_t'($urandom); y = $urandom;
      #1;
      for (int k = 0; k < 4; k++) en[k] = (a[31-8*k -: 8] == 0);
      chk(32'(nul), 32'(en), "null");
      case (op)
        ALU_ADD:  begin wide = {1'b0,a} + {1'b0,b}; chk(res, wide[31:0], "add");
                  chk(32'(icco.c), 32'(wide[32]), "add.c");
                  chk(32'(icco.v), 32'((a[31]==b[31]) && (wide[31]!=a[31])), "add.v"); end
        ALU_ADDX: begin wide = {1'b0,a} + {1'b0,b} + 33'(icc.c); chk(res, wide[31:0], "addx"); chk(32'(icco.c), 32'(wide[32]), "addx.c"); end
        ALU_SUB:  begin e = a - b; chk(res, e, "sub"); chk(32'(icco.c), 32'(a < b), "sub.c");
                  chk(32'(icco.z), 32'(a == b), "sub.z");
                  chk(32'(icco.v), 32'((a[31]!=b[31]) && (e[31]!=a[31])), "sub.v"); end
        ALU_SUBX: begin wide = {1'b0,a} - {1'b0,b} - 33'(icc.c); chk(res, wide[31:0], "subx"); chk(32'(icco.c), 32'(wide[32]), "subx.c"); end
        ALU_AND:  chk(res, a & b, "and");
        ALU_ANDN: chk(res, a & ~b, "andn");
        ALU_OR:   chk(res, a | b, "or");
        ALU_ORN:  chk(res, a | ~b, "orn");
        ALU_XOR:  chk(res, a ^ b, "xor");
        ALU_XNOR: chk(res, ~(a ^ b), "xnor");
        ALU_SLL:  chk(res, a << b[4:0], "sll");
        ALU_SRL:  chk(res, a >> b[4:0], "srl");
        ALU_SRA:  chk(res, 32'($signed(a) >>> b[4:0]), "sra");
        ALU_PASSA: chk(res, a, "passa");
        ALU_PASSB: chk(res, b, "passb");
        ALU_MULS: begin
          e = {icc.n ^ icc.v, a[31:1]} + (y[0] ? b : 32'h0);
          chk(res, e, "muls"); chk(yo, {a[0], y[31:1]}, "muls.y"); end
        ALU_CMPSTR: begin
          int k; k = 0;
          while (k < 4 && a[31-8*k -: 8] == b[31-8*k -: 8] && a[31-8*k -: 8] != 0) k++;
          chk(res, 32'(k), "cmpstr");
          chk(32'(icco.z), 32'(k == 4 || a[31-8*k -: 8] == b[31-8*k -: 8]), "cmpstr.z");
          chk(32'(icco.n), 32'(k < 4 && a[31-8*k -: 8] == 0 && b[31-8*k -: 8] == 0), "cmpstr.n");
        end
        default: ;
      endcase
    end
    // full division by 32 step-divide operations
    for (int t = 0; t < 200; t++) begin
      logic [31:0] n, d, q, r;
      n = $urandom; d = $urandom >> $urandom_range(0, 31); if (d == 0) d = 7;
      q = n; r = 0; op = ALU_DIVS; b = d;
      for (int s = 0; s < 32; s++) begin a = q; y = r; #1; q = res; r = yo; end
      chk(q, n / d, "div.q"); chk(r, n % d, "div.r");
    end
    // unsigned 32x32 -> 32 low bits by 32 multiply steps (SPARC method)
    for (int t = 0; t < 200; t++) begin
      logic [31:0] m1, m2, acc; logic [63:0] p;
      m1 = $urandom; m2 = $urandom >> $urandom_range(0, 31);
      acc = 0; y = m1; icc = '0; op = ALU_MULS; b = m2;
      for (int s = 0; s < 32; s++) begin a = acc; #1; acc = res; y = yo; icc = icco; end
      a = acc; b = 0; #1; acc = res; y = yo;      // final step with zero addend
      p = {32'h0, m1} * {32'h0, m2};
      chk(y, p[31:0], "mul.lo");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
