// smpc_csum_adder: 32-bit conditional-sum adder used by the integer ALU.
//
// Each bit first forms its sum and carry for both possible carry-ins. Then,
// in log2(W) merge levels, pairs of neighbouring blocks are joined: the
// carry-out of the low block (for each assumed carry-in of the joined block)
// selects which of the two precomputed versions of the high block's sums and
// carry-out is kept. The real carry-in picks the final result. Purely
// combinational. W must be a power of two.
module smpc_csum_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned L = $clog2(W);

  always_comb begin
    logic [W-1:0] s0, s1;        // sum bit assuming block carry-in 0 / 1
    logic [W-1:0] c0, c1;        // carry-out of the block ending at bit i (valid at block tops)
    logic [W-1:0] ns0, ns1, nc0, nc1;
    for (int i = 0; i < W; i++) begin
      s0[i] = a[i] ^ b[i];
      s1[i] = ~(a[i] ^ b[i]);
      c0[i] = a[i] & b[i];
      c1[i] = a[i] | b[i];
    end
    for (int k = 0; k < L; k++) begin
      ns0 = s0; ns1 = s1; nc0 = c0; nc1 = c1;
      for (int i = 0; i < W; i++) begin
        // block size after the merge is 2^(k+1); bit i belongs to the high half
        // if bit k of i is set. The low half's carry is read at its top bit.
        int lo_top;
        lo_top = ((i >> (k+1)) << (k+1)) + (1 << k) - 1;
        if (((i >> k) & 1) == 1) begin
          ns0[i] = c0[lo_top] ? s1[i] : s0[i];
          ns1[i] = c1[lo_top] ? s1[i] : s0[i];
          nc0[i] = c0[lo_top] ? c1[i] : c0[i];
          nc1[i] = c1[lo_top] ? c1[i] : c0[i];
        end
      end
      s0 = ns0; s1 = ns1; c0 = nc0; c1 = nc1;
    end
    sum  = cin ? s1 : s0;
    cout = cin ? c1[W-1] : c0[W-1];
  end
endmodule
