// smpc_regfile: windowed integer register file, 136 x 32 bits, three read
// ports and one write port.
//
// The 136 registers are 8 globals plus NWIN overlapping windows of 16
// registers each (8 windows, so 8 + 8*16 = 136, the size the design gives).
// Each window sees 24 windowed registers: outs (r8-r15), locals (r16-r23)
// and ins (r24-r31); the ins of window w are the outs of window w+1, as in
// SPARC, where SAVE decrements the window pointer. The CWP logic maps a
// 5-bit register number and a window pointer onto a physical row:
//   r0-r7  -> row r (r0 always reads 0, writes to it are dropped)
//   r8-r31 -> row 8 + ((cwp*16 + r - 8) mod (NWIN*16))
// Three read ports (rs1, rs2 and rd, the last for store data) let a store
// read all its operands in one cycle. Reads are combinational; the write
// happens at the rising clock edge. The write port carries its own window
// pointer because the writing instruction may have been issued under a
// different window than the one now being read. No read-during-write
// bypass is built in: the pipeline forwards the write-back value itself.
// The transistor-level cell, predecoder and sense amplifiers of the custom
// layout are modelled only by their logic function.
module smpc_regfile #(
  parameter int unsigned NWIN = 8
) (
  input  logic        clk,
  input  logic [$clog2(NWIN)-1:0] cwp,
  input  logic [4:0]  ra_addr,
  input  logic [4:0]  rb_addr,
  input  logic [4:0]  rc_addr,
  output logic [31:0] ra_data,
  output logic [31:0] rb_data,
  output logic [31:0] rc_data,
  input  logic        we,
  input  logic [$clog2(NWIN)-1:0] wcwp,
  input  logic [4:0]  waddr,
  input  logic [31:0] wdata
);
  localparam int unsigned NREG = 8 + NWIN*16;
  localparam int unsigned RW   = $clog2(NREG);
  localparam int unsigned CW   = $clog2(NWIN);

  logic [31:0] regs [NREG];

  // CWP logic: register number + window pointer -> physical row.
  function automatic logic [RW-1:0] phys(input logic [CW-1:0] w, input logic [4:0] r);
    return RW'(smpc_pkg::phys_reg(int'(w), int'(r), NWIN));
  endfunction

  always_comb begin
    ra_data = (ra_addr == 5'd0) ? 32'h0 : regs[phys(cwp, ra_addr)];
    rb_data = (rb_addr == 5'd0) ? 32'h0 : regs[phys(cwp, rb_addr)];
    rc_data = (rc_addr == 5'd0) ? 32'h0 : regs[phys(cwp, rc_addr)];
  end

  always_ff @(posedge clk) begin
    if (we && waddr != 5'd0) regs[phys(wcwp, waddr)] <= wdata;
  end
endmodule
