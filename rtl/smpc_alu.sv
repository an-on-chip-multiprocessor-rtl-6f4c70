// smpc_alu: integer execution unit of the SMPC integer unit.
//
// One combinational stage (pipeline stage E). Additions and subtractions use
// a 32-bit conditional-sum adder, as in the design. Next to the adder sit the
// logic operations, a barrel shifter and the string and multiprocessor
// extensions:
//   * null-byte detection of operand A, computed in parallel with the adder
//     (null_a, one flag per byte, byte 0 = bits 31:24, big-endian like SPARC);
//   * compare string (ALU_CMPSTR): compares A and B byte by byte from the most
//     significant byte and stops at the first byte that differs or is a null
//     in A. Result = index of that byte (4 if none). icc.z = no difference
//     found, icc.n = stopped on a null, icc.c = A's byte below B's there.
//     The encoding of this result is this design's own choice;
//   * step multiply (ALU_MULS) with SPARC MULScc semantics: adds B to
//     {N^V, A[31:1]} if Y[0] is set, and shifts A[0] into Y from the top;
//   * step divide (ALU_DIVS), one restoring-division step whose exact form
//     is this design's choice: the partial remainder {Y, A[31]} is compared
//     with B; if not below, B is subtracted and a 1 enters the quotient at
//     A's bottom. After 32 steps with Y=0 at the start, A holds the quotient
//     and Y the remainder (B must be non-zero).
// Condition codes are produced for every operation; the pipeline decides
// whether to keep them.
module smpc_alu
  import smpc_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  icc_t        icc_in,
  input  logic [31:0] y_in,
  output logic [31:0] result,
  output icc_t        icc_out,
  output logic [31:0] y_out,      // new Y, meaningful for MULS and DIVS
  output logic [3:0]  null_a      // byte k of A (k=0 is bits 31:24) is zero
);
  logic [31:0] add_a, add_b, sum;
  logic        add_cin, cout;
  logic        is_sub;

  smpc_csum_adder #(.W(32)) u_add (.a(add_a), .b(add_b), .cin(add_cin), .sum(sum), .cout(cout));

  // null detection, independent of the adder path
  always_comb
    for (int k = 0; k < 4; k++) null_a[k] = (a[31-8*k -: 8] == 8'h00);

  // adder operand selection
  always_comb begin
    add_a = a; add_b = b; add_cin = 1'b0; is_sub = 1'b0;
    unique case (op)
      ALU_ADDX: add_cin = icc_in.c;
      ALU_SUB:  begin add_b = ~b; add_cin = 1'b1; is_sub = 1'b1; end
      ALU_SUBX: begin add_b = ~b; add_cin = ~icc_in.c; is_sub = 1'b1; end
      ALU_MULS: begin
        add_a = {icc_in.n ^ icc_in.v, a[31:1]};
        add_b = y_in[0] ? b : 32'h0;
      end
      default: ;
    endcase
  end

  always_comb begin
    logic [2:0] idx;
    logic       stop, is_null, diff, lt;
    logic [32:0] rem, trial;
    result  = sum;
    icc_out = '{n: sum[31], z: (sum == 32'h0),
                v: (add_a[31] == add_b[31]) && (sum[31] != add_a[31]),
                c: is_sub ? ~cout : cout};
    y_out   = y_in;
    idx = 3'd4; stop = 1'b0; is_null = 1'b0; diff = 1'b0; lt = 1'b0;
    rem = '0; trial = '0;
    unique case (op)
      ALU_ADD, ALU_ADDX, ALU_SUB, ALU_SUBX: ;
      ALU_MULS: y_out = {a[0], y_in[31:1]};
      ALU_DIVS: begin
        rem   = {y_in, a[31]};
        trial = rem - {1'b0, b};
        if (!trial[32]) begin y_out = trial[31:0]; result = {a[30:0], 1'b1}; end
        else            begin y_out = rem[31:0];   result = {a[30:0], 1'b0}; end
        icc_out = '{n: result[31], z: (result == 32'h0), v: 1'b0, c: ~trial[32]};
      end
      ALU_CMPSTR: begin
        for (int k = 0; k < 4; k++) begin
          if (!stop && (a[31-8*k -: 8] != b[31-8*k -: 8] || null_a[k])) begin
            stop = 1'b1; idx = 3'(k);
            is_null = null_a[k] && (a[31-8*k -: 8] == b[31-8*k -: 8]);
            diff = (a[31-8*k -: 8] != b[31-8*k -: 8]);
            lt   = (a[31-8*k -: 8] <  b[31-8*k -: 8]);
          end
        end
        result = {29'h0, idx};
        icc_out = '{n: is_null, z: !diff, v: 1'b0,
                    c: lt};
      end
      default: begin
        unique case (op)
          ALU_AND:   result = a & b;
          ALU_ANDN:  result = a & ~b;
          ALU_OR:    result = a | b;
          ALU_ORN:   result = a | ~b;
          ALU_XOR:   result = a ^ b;
          ALU_XNOR:  result = ~(a ^ b);
          ALU_SLL:   result = a << b[4:0];
          ALU_SRL:   result = a >> b[4:0];
          ALU_SRA:   result = $signed(a) >>> b[4:0];
          ALU_PASSA: result = a;
          default:   result = b;     // ALU_PASSB
        endcase
        icc_out = '{n: result[31], z: (result == 32'h0), v: 1'b0, c: 1'b0};
      end
    endcase
  end
endmodule
