// tb_smpc_bus_unit: self-checking test of the bus unit.
// Memory side: client models issue line reads, word reads, write-backs and
// invalidates, alone and all at once, against the behavioural external
// memory; the data returned, the write-back contents, the shared flag and
// the service order (walker, D-cache, I-cache 0, I-cache 1) are checked.
// MCIS side: lock set/clear contention between the two IUs, a full lock
// array, and a barrier that releases both IUs only once both have arrived.
module tb_smpc_bus_unit;
  import smpc_pkg::*;
  localparam int NC = 4;
  logic clk = 0, rst_n_in = 0, rst_n;
  logic [NC-1:0] c_req = '0, c_done;
  bus_cmd_e c_cmd [NC];
  logic [35:0] c_addr [NC];
  logic [255:0] c_wdata [NC];
  logic [255:0] c_rdata;
  logic c_shared;
  logic ext_req, ext_gnt, ext_shared, ext_rvalid, ext_wready;
  bus_cmd_e ext_cmd; logic [35:0] ext_addr; logic [63:0] ext_rdata, ext_wdata;
  logic [1:0] mc_req = '0, mc_ack, bst;
  mc_op_e mc_op [2]; logic [31:0] mc_addr [2];
  logic shared_in = 0;
  int nlr, nwr, nwb, ninv;
  int checks = 0, failures = 0;

  smpc_bus_unit dut (.clk, .rst_n_in, .rst_n_out(rst_n), .c_req, .c_cmd, .c_addr, .c_wdata, .c_done, .c_rdata,
    .c_shared, .ext_req, .ext_cmd, .ext_addr, .ext_gnt, .ext_shared, .ext_rvalid, .ext_rdata, .ext_wdata,
    .ext_wready, .mc_req, .mc_op, .mc_addr, .mc_ack, .barrier_state(bst));
  smpc_ext_mem mem (.clk, .ext_req, .ext_cmd, .ext_addr, .ext_gnt, .ext_shared, .ext_rvalid, .ext_rdata,
    .ext_wdata, .ext_wready, .shared_in, .n_line_reads(nlr), .n_word_reads(nwr), .n_writebacks(nwb), .n_invalidates(ninv));

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(logic [255:0] got, logic [255:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  function automatic logic [255:0] line_of(logic [35:0] a);
    logic [255:0] l;
    for (int w = 0; w < 8; w++) l[32*w +: 32] = mem.peek({a[35:5], 3'(w), 2'b00});
    return l;
  endfunction

  // issue one transaction from client c and wait for done
  task automatic xact(int c, bus_cmd_e cmd, logic [35:0] a, logic [255:0] wd, output logic [255:0] rd, output logic sh);
    @(negedge clk); c_req[c] = 1; c_cmd[c] = cmd; c_addr[c] = a; c_wdata[c] = wd;
    do @(posedge clk); while (!c_done[c]);
    #1 rd = c_rdata; sh = c_shared;
    @(negedge clk); c_req[c] = 0;
  endtask

  int order [$];
  always @(posedge clk) for (int c = 0; c < NC; c++) if (c_done[c]) order.push_back(c);

  initial begin
    logic [255:0] rd, wl; logic sh;
    for (int c = 0; c < NC; c++) begin c_cmd[c] = BUS_RD_LINE; c_addr[c] = 0; c_wdata[c] = 0; end
    for (int i = 0; i < 2; i++) begin mc_op[i] = MC_LOCKSET; mc_addr[i] = 0; end
    repeat (3) @(negedge clk); rst_n_in = 1; repeat (3) @(negedge clk);
    chk(rst_n, 1, "reset released");
    // line read
    xact(2, BUS_RD_LINE, 36'h1_0000_0040, '0, rd, sh);
    chk(rd, line_of(36'h1_0000_0040), "line read"); chk(sh, 0, "not shared");
    // word read
    mem.poke(36'h0_0020_0008, 32'hDEADBEEF);
    xact(0, BUS_RD_WORD, 36'h0_0020_0008, '0, rd, sh);
    chk(rd[31:0], 32'hDEADBEEF, "word read");
    // write-back then read back
    for (int w = 0; w < 8; w++) wl[32*w +: 32] = 32'hA0000000 + w;
    xact(1, BUS_WB_LINE, 36'h0_0000_1000, wl, rd, sh);
    chk(line_of(36'h0_0000_1000), wl, "write-back");
    xact(3, BUS_RD_LINE, 36'h0_0000_1000, '0, rd, sh);
    chk(rd, wl, "read after write-back");
    // shared answer and invalidate
    shared_in = 1;
    xact(1, BUS_RDX_LINE, 36'h0_0000_2000, '0, rd, sh); chk(sh, 1, "shared seen");
    shared_in = 0;
    xact(1, BUS_INV, 36'h0_0000_2000, '0, rd, sh); chk(ninv, 1, "invalidate issued");
    // all four at once: served walker, D-cache, I-cache 0, I-cache 1
    order.delete();
    @(negedge clk);
    for (int c = 0; c < NC; c++) begin c_req[c] = 1; c_cmd[c] = (c == 0) ? BUS_RD_WORD : BUS_RD_LINE; c_addr[c] = 36'h300 + 36'(c*32); end
    fork
      for (int c = 0; c < NC; c++) fork automatic int cc = c; begin
        do @(posedge clk); while (!c_done[cc]);
        #1 if (cc != 0) chk(c_rdata, line_of(c_addr[cc]), "concurrent line");
        @(negedge clk) c_req[cc] = 0;
      end join_none
    join_none
    repeat (80) @(negedge clk);
    chk(order.size(), 4, "all served");
    for (int i = 0; i < 4 && i < order.size(); i++) chk(order[i], i, "priority order");

    // ---------------- MCIS ----------------
    // IU0 takes lock A
    @(negedge clk); mc_req = 2'b01; mc_op[0] = MC_LOCKSET; mc_addr[0] = 32'h100; #1 chk(mc_ack, 2'b01, "iu0 gets lock");
    @(negedge clk); mc_req = 2'b10; mc_op[1] = MC_LOCKSET; mc_addr[1] = 32'h100; #1 chk(mc_ack, 2'b00, "iu1 blocked");
    @(negedge clk); #1 chk(mc_ack, 2'b00, "iu1 still blocked");
    // IU1 may take another lock
    @(negedge clk); mc_addr[1] = 32'h200; #1 chk(mc_ack, 2'b10, "iu1 other lock");
    // IU1 cannot clear IU0's lock
    @(negedge clk); mc_op[1] = MC_LOCKCLR; mc_addr[1] = 32'h100;
    @(negedge clk); mc_op[1] = MC_LOCKSET; #1 chk(mc_ack, 2'b00, "foreign clear ignored");
    // IU0 releases, IU1 gets it
    @(negedge clk); mc_req = 2'b01; mc_op[0] = MC_LOCKCLR; #1 chk(mc_ack, 2'b01, "iu0 clear");
    @(negedge clk); mc_req = 2'b10; mc_op[1] = MC_LOCKSET; mc_addr[1] = 32'h100; #1 chk(mc_ack, 2'b10, "iu1 gets released lock");
    // both ask for the same new lock: only one wins
    @(negedge clk); mc_req = 2'b11; mc_op[0] = MC_LOCKSET; mc_op[1] = MC_LOCKSET; mc_addr[0] = 32'h300; mc_addr[1] = 32'h300;
    #1 chk(32'($countones(mc_ack)), 1, "one winner");
    @(negedge clk); #1;
    @(negedge clk); mc_req = 0;
    // fill the array (8 entries; 3 used) with IU0 and check it then refuses
    for (int l = 0; l < 5; l++) begin @(negedge clk); mc_req = 2'b01; mc_op[0] = MC_LOCKSET; mc_addr[0] = 32'h1000 + l*4; #1 chk(mc_ack, 2'b01, "fill"); end
    @(negedge clk); mc_addr[0] = 32'h2000; #1 chk(mc_ack, 2'b00, "array full");
    @(negedge clk); mc_req = 0;
    // barrier: IU0 waits until IU1 arrives
    @(negedge clk); mc_req = 2'b01; mc_op[0] = MC_BARSET; #1 chk(mc_ack, 2'b00, "iu0 waits at barrier");
    repeat (3) begin @(negedge clk); #1 chk(mc_ack, 2'b00, "iu0 still waits"); end
    chk(bst, 2'b01, "barrier state");
    @(negedge clk); mc_req = 2'b11; mc_op[1] = MC_BARSET;
    #1 chk(32'($countones(mc_ack)), 1, "one released this cycle");
    @(negedge clk); #1 chk(32'($countones(mc_ack)), 1, "other released next cycle");
    @(negedge clk); mc_op[0] = MC_BARCLR; mc_op[1] = MC_BARCLR;
    @(negedge clk); @(negedge clk); mc_req = 0; #1 chk(bst, 2'b00, "barrier cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
