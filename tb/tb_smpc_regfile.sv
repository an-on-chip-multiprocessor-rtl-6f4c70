// tb_smpc_regfile: self-checking test of the windowed register file.
// Writes every register of every window through the write port and checks
// reads on all three ports against a reference model that stores values by
// (window, register) and applies the SPARC overlap rule independently:
// ins of window w equal the outs of window w+1, globals are shared, r0 is 0.
module tb_smpc_regfile;
  localparam int NWIN = 8;
  logic clk = 0;
  logic [2:0] cwp, wcwp;
  logic [4:0] ra, rb, rc, wa;
  logic [31:0] da, db, dc, wd;
  logic we;
  int checks = 0, failures = 0;

  smpc_regfile #(.NWIN(NWIN)) dut (.clk, .cwp, .ra_addr(ra), .rb_addr(rb), .rc_addr(rc),
    .ra_data(da), .rb_data(db), .rc_data(dc), .we, .wcwp, .waddr(wa), .wdata(wd));

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // reference storage: globals, and per window its outs and locals; ins alias outs of w+1
  logic [31:0] g [8];
  logic [31:0] outs [NWIN][8];
  logic [31:0] locs [NWIN][8];

  function automatic logic [31:0] ref_rd(int w, int r);
    if (r == 0) return 0;
    if (r < 8) return g[r];
    if (r < 16) return outs[w][r-8];
    if (r < 24) return locs[w][r-16];
    return outs[(w+1) % NWIN][r-24];
  endfunction
  task automatic ref_wr(int w, int r, logic [31:0] v);
    if (r == 0) return;
    if (r < 8) g[r] = v;
    else if (r < 16) outs[w][r-8] = v;
    else if (r < 24) locs[w][r-16] = v;
    else outs[(w+1) % NWIN][r-24] = v;
  endtask

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    we = 0; cwp = 0; wcwp = 0; ra = 0; rb = 0; rc = 0; wa = 0; wd = 0;
    // fill every register in window order
    for (int w = 0; w < NWIN; w++)
      for (int r = 0; r < 32; r++) begin
        @(negedge clk); we = 1; wcwp = 3'(w); wa = 5'(r); wd = $urandom; ref_wr(w, r, wd);
      end
    @(negedge clk); we = 0;
    // random writes and reads, three ports at once
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = $urandom_range(0,1); wcwp = 3'($urandom); wa = 5'($urandom); wd = $urandom;
      cwp = 3'($urandom); ra = 5'($urandom); rb = 5'($urandom); rc = 5'($urandom);
      #1;
      chk(da, ref_rd(cwp, ra), "ra"); chk(db, ref_rd(cwp, rb), "rb"); chk(dc, ref_rd(cwp, rc), "rc");
      @(posedge clk); if (we) ref_wr(wcwp, wa, wd);
    end
    // explicit overlap check: out r8 of window 3 is in r24 of window 2
    @(negedge clk); we = 1; wcwp = 3; wa = 8; wd = 32'hCAFE0008;
    @(negedge clk); we = 0; cwp = 2; ra = 24; #1 chk(da, 32'hCAFE0008, "overlap");
    // wrap: outs of window 0 are the ins of window NWIN-1
    @(negedge clk); we = 1; wcwp = 0; wa = 9; wd = 32'h12340009;
    @(negedge clk); we = 0; cwp = 3'(NWIN-1); rb = 25; #1 chk(db, 32'h12340009, "wrap");
    @(negedge clk); cwp = 0; rc = 0; #1 chk(dc, 0, "r0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
