// tb_smpc_iu: self-checking test of the integer unit on its own.
// Behavioural instruction and data memories answer the IU, in a first run
// at once and in a second run with random wait states, so fetch stalls and
// branch targets pending behind a stalled fetch are exercised. A
// behavioural MCIS responder acknowledges lock and barrier operations after
// a delay. The program runs a counted loop (forwarding, icc forwarding to a
// branch, delay slot), store/load pairs (store and load interlocks), a
// store of freshly loaded data (load aligner to E), annulled delay slots,
// CALL/SAVE/JMPL/RESTORE, a 32-step multiplication and a 32-step division,
// load/store-update, load/store-string at unaligned addresses, compare-string, byte and halfword accesses, MCIS and
// FLUSH. The values it leaves in memory are compared with values worked out
// by hand, and the event counters must show each mechanism.
module tb_smpc_iu;
  import smpc_pkg::*;
  import smpc_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic if_req, if_ready, dm_req, dm_we, dm_ready, mc_req, mc_ack, ic_flush, halted;
  logic [31:0] if_va, if_instr, dm_va, dm_wdata, dm_rdata, mc_addr;
  logic [3:0] dm_be;
  mc_op_e mc_op;
  iu_perf_t perf;
  int checks = 0, failures = 0;
  bit rand_wait = 0;

  smpc_iu dut (.*);

  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic [31:0] imem [1024];
  logic [31:0] dmem [1024];      // data at 0x1000-0x1FFF
  logic rb_i, rb_d;
  always @(posedge clk) begin rb_i <= rand_wait ? 1'($urandom) : 1'b1; rb_d <= rand_wait ? 1'($urandom) : 1'b1; end
  assign if_ready = if_req && rb_i;
  assign if_instr = imem[if_va[11:2]];
  assign dm_ready = dm_req && rb_d;
  assign dm_rdata = dmem[dm_va[11:2]];
  always @(posedge clk)
    if (dm_req && dm_ready && dm_we)
      for (int b = 0; b < 4; b++) if (dm_be[b]) dmem[dm_va[11:2]][8*b +: 8] <= dm_wdata[8*b +: 8];

  // MCIS responder: ack after 3 cycles, record the order
  int mc_wait = 0; mc_op_e mc_log [$]; int flushes = 0;
  assign mc_ack = mc_req && (mc_wait == 3);
  always @(posedge clk) begin
    if (mc_req && !mc_ack) mc_wait <= mc_wait + 1;
    if (mc_ack) begin mc_wait <= 0; mc_log.push_back(mc_op); end
    if (ic_flush) flushes++;
  end

  int n;
  task automatic emit(logic [31:0] w); imem[n] = w; n++; endtask

  task automatic build();
    int loop, l1, l2, fn, callsite, bpos;
    n = 0;
    for (int i = 0; i < 1024; i++) imem[i] = nop();
    emit(alui(OR, 1, 0, 10));             // r1 = 10
    emit(alui(OR, 2, 0, 0));              // r2 = 0
    emit(alui(OR, 3, 0, 0));              // r3 = 0
    loop = n;
    emit(alur(ADD, 2, 2, 1));             // r2 += r1
    emit(alui(SUBCC, 1, 1, 1));           // r1 -= 1, icc
    emit(bicc(C_NE, 0, loop - n));        // bne loop
    emit(alui(ADD, 3, 3, 1));             // delay slot: r3++
    emit(sethi(4, 32'h1000));             // r4 = 0x1000
    emit(mem(ST, 2, 4, 0));               // [0] = 55
    emit(mem(LD, 5, 4, 0));               // store interlock
    emit(alui(ADD, 6, 5, 1));             // load interlock: r6 = 56
    emit(mem(ST, 6, 4, 4));               // [4] = 56
    emit(alur(ADD, 7, 6, 6));             // 112
    emit(alur(ADD, 7, 7, 7));             // 224
    emit(mem(ST, 7, 4, 8));               // [8] = 224
    emit(mem(LD, 5, 4, 4));
    emit(mem(ST, 5, 4, 12));              // [12] = 56 via load aligner -> E
    l1 = n;
    emit(bicc(C_A, 1, 4));                // ba,a +4 : delay slot annulled
    emit(alui(ADD, 2, 2, 100));           // annulled
    emit(alui(ADD, 2, 2, 1000));          // skipped
    emit(alui(ADD, 2, 2, 1000));          // skipped
    emit(mem(ST, 2, 4, 16));              // [16] = 55
    emit(alur(SUBCC, 0, 0, 0));           // z = 1
    emit(bicc(C_NE, 1, 3));               // bne,a not taken: slot annulled
    emit(alui(ADD, 2, 2, 7));             // annulled
    emit(alui(ADD, 2, 2, 3));             // r2 = 58
    emit(mem(ST, 2, 4, 20));              // [20] = 58
    emit(alui(OR, 8, 0, 21));             // %o0 = 21
    callsite = n;
    emit(32'h0);                          // call FUNC (patched)
    emit(nop());
    emit(mem(ST, 8, 4, 24));              // [24] = 42
    // multiply 123 * 45 by 32 multiply steps
    emit(alui(WRY, 0, 0, 123));
    emit(alui(OR, 9, 0, 0));
    emit(alui(OR, 10, 0, 45));
    emit(alur(ANDCC, 0, 0, 0));
    for (int i = 0; i < 32; i++) emit(alur(MULSCC, 9, 9, 10));
    emit(alur(MULSCC, 9, 9, 0));
    emit(alur(RDY, 11, 0, 0));
    emit(mem(ST, 11, 4, 28));             // [28] = 5535
    // divide 1000 / 7 by 32 divide steps
    emit(alui(WRY, 0, 0, 0));
    emit(alui(OR, 12, 0, 1000));
    emit(alui(OR, 13, 0, 7));
    for (int i = 0; i < 32; i++) emit(alur(OP3_DIVS, 12, 12, 13));
    emit(mem(ST, 12, 4, 32));             // [32] = 142
    emit(alur(RDY, 11, 0, 0));
    emit(mem(ST, 11, 4, 36));             // [36] = 6
    // load/store update
    emit(alui(OR, 16, 4, 12'h040));       // r16 = 0x1040
    emit(alui(OR, 18, 0, 77));
    emit(mem(ST, 18, 4, 12'h048));        // [0x48] = 77
    emit(mem(OP3_STUPD, 2, 16, 4));       // [0x44] = 58, r16 = 0x1044
    emit(mem(OP3_LDUPD, 17, 16, 4));      // r17 = [0x48] = 77, r16 = 0x1048
    emit(mem(ST, 16, 4, 40));             // [40] = 0x1048
    emit(mem(ST, 17, 4, 44));             // [44] = 77
    // compare string
    emit(sethi(18, 32'h61620000)); emit(alui(OR, 18, 18, 12'h078));
    emit(sethi(19, 32'h61620000)); emit(alui(OR, 19, 19, 12'h079));
    emit(alur(OP3_CMPSTR, 20, 18, 19));   // r20 = 2, icc.n = 1
    bpos = n;
    emit(bicc(C_NEG, 0, 3));              // taken (string ended)
    emit(nop());
    emit(alui(OR, 20, 0, 99));            // skipped
    emit(mem(ST, 20, 4, 48));             // [48] = 2
    // byte and halfword
    emit(alui(OR, 21, 0, 12'h0F0));
    emit(mem(STB, 21, 4, 53));
    emit(mem(LDSB, 22, 4, 53));
    emit(mem(ST, 22, 4, 56));             // [56] = 0xFFFFFFF0
    emit(mem(LDUB, 23, 4, 53));
    emit(mem(ST, 23, 4, 60));             // [60] = 0xF0
    emit(mem(STH, 21, 4, 66));
    emit(mem(LDUH, 23, 4, 66));
    emit(mem(ST, 23, 4, 72));             // [72] = 0xF0; [64] = 0x000000F0
    // string load/store from and to unaligned addresses
    emit(sethi(26, 32'h11223344)); emit(alui(OR, 26, 26, 12'h344));
    emit(sethi(27, 32'h55667788)); emit(alui(OR, 27, 27, 12'h388));
    emit(mem(ST, 26, 4, 80));             // [80] = 0x11223344
    emit(mem(ST, 27, 4, 84));             // [84] = 0x55667788
    emit(mem(OP3_LDSTR, 25, 4, 81));      // r25 = 0x22334455
    emit(mem(ST, 25, 4, 76));             // [76] = 0x22334455 (load aligner to E)
    emit(mem(OP3_LDSTR, 28, 4, 83));      // r28 = 0x44556677
    emit(alur(ADD, 28, 28, 0));           // waits for the merged word (load interlock)
    emit(mem(ST, 28, 4, 96));             // [96] = 0x44556677
    emit(mem(OP3_STSTR, 25, 4, 90));      // [88] = 0x00002233, [92] = 0x44550000
    // MCIS and flush
    emit(alui(OP3_LOCKSET, 0, 4, 12'h100));
    emit(alui(OP3_BARSET, 0, 0, 0));
    emit(alui(OP3_BARCLR, 0, 0, 0));
    emit(alui(OP3_LOCKCLR, 0, 4, 12'h100));
    emit(alui(FLUSH, 0, 0, 0));
    emit(halt());
    emit(alui(OR, 2, 0, 12'h7FF));        // must not execute
    emit(mem(ST, 2, 4, 16));
    fn = n;
    emit(alui(SAVE, 14, 14, -96));
    emit(alur(ADD, 24, 24, 24));          // %i0 = 42
    emit(alui(JMPL, 0, 31, 8));           // ret
    emit(alur(RESTORE, 0, 0, 0));
    imem[callsite] = call(fn - callsite);
  endtask

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  task automatic run(bit rw);
    int cyc;
    rand_wait = rw;
    for (int i = 0; i < 1024; i++) dmem[i] = 0;
    mc_log.delete(); flushes = 0;
    rst_n = 0; repeat (3) @(negedge clk); rst_n = 1;
    cyc = 0;
    while (!halted && cyc < 5000) begin @(negedge clk); cyc++; end
    repeat (5) @(negedge clk);
    chk(halted, 1, "halted");
    chk(dmem[0], 55, "loop sum"); chk(dmem[1], 56, "load interlock add"); chk(dmem[2], 224, "forward chain");
    chk(dmem[3], 56, "load->store data"); chk(dmem[4], 55, "ba,a annul"); chk(dmem[5], 58, "bne,a annul");
    chk(dmem[6], 42, "call/save/jmpl/restore"); chk(dmem[7], 5535, "multiply steps");
    chk(dmem[8], 142, "divide quotient"); chk(dmem[9], 6, "divide remainder");
    chk(dmem[10], 32'h1048, "ldupd/stupd base"); chk(dmem[11], 77, "ldupd data"); chk(dmem[17], 58, "stupd data");
    chk(dmem[12], 2, "cmpstr"); chk(dmem[14], 32'hFFFFFFF0, "ldsb"); chk(dmem[15], 32'hF0, "ldub");
    chk(dmem[13], 32'h00F00000, "stb lane"); chk(dmem[16], 32'h000000F0, "sth lane"); chk(dmem[18], 32'hF0, "sth/lduh");
    chk(mc_log.size(), 4, "mcis count");
    if (mc_log.size() == 4) begin
      chk(32'(mc_log[0]), 32'(MC_LOCKSET), "mc0"); chk(32'(mc_log[1]), 32'(MC_BARSET), "mc1");
      chk(32'(mc_log[2]), 32'(MC_BARCLR), "mc2"); chk(32'(mc_log[3]), 32'(MC_LOCKCLR), "mc3");
    end
    chk(dmem[19], 32'h22334455, "ldstr offset 1"); chk(dmem[24], 32'h44556677, "ldstr offset 3");
    chk(dmem[22], 32'h00002233, "ststr first word"); chk(dmem[23], 32'h44550000, "ststr second word");
    chk(flushes, 1, "flush");
    if (!rw) chk(perf.load_interlock > 0, 1, "load interlock seen");
    chk(perf.store_interlock > 0, 1, "store interlock seen");
    chk(perf.fwd_e > 0, 1, "E forward seen"); chk(perf.fwd_m > 0, 1, "M forward seen");
    chk(perf.fwd_w > 0, 1, "W forward seen"); chk(perf.fwd_load > 0, 1, "load aligner forward seen");
    chk(perf.iop, 4, "four IOPs"); chk(perf.annulled, 2, "two annulled slots");
    chk(perf.taken, 13, "taken transfers");
    if (rw) chk(perf.fetch_stall > 0 && perf.mem_stall > 0, 1, "wait states seen");
    $display("run rand_wait=%0d: %0d cycles, %0d retired", rw, cyc, perf.retired);
  endtask

  initial begin
    build();
    run(0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
