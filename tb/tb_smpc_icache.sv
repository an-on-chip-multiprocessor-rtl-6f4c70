// tb_smpc_icache: self-checking test of the instruction cache.
// A behavioural line source returns, after a few cycles, a line whose words
// are a function of their physical address. The physical page is a fixed
// function of the virtual page (as a TLB would give). Checks: returned
// words, same-cycle hits, one line fill per miss, LRU victim choice in a
// set, flush, and a random fetch stream compared with the address function.
module tb_smpc_icache;
  import smpc_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0, req = 0, pa_valid = 0, ready, l_req, l_done = 0;
  logic [31:0] va, rdata, miss_count;
  logic [35:0] pa, l_addr;
  bus_cmd_e l_cmd;
  logic [255:0] l_rdata;
  int checks = 0, failures = 0, fills = 0;

  smpc_icache dut (.clk, .rst_n, .flush, .req, .va, .pa_valid, .pa, .ready, .rdata, .l_req, .l_cmd, .l_addr,
    .l_done, .l_rdata, .miss_count);

  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [31:0] word_at(logic [35:0] a); return a[33:2] ^ 32'h13579BDF; endfunction
  function automatic logic [35:0] v2p(logic [31:0] v); return {4'h2, v[31:12] ^ 20'h00F00, v[11:0]}; endfunction

  // line source: 3-cycle latency
  int lat = 0;
  always @(posedge clk) begin
    l_done <= 0;
    if (l_req && !l_done) begin
      if (lat == 3) begin
        lat <= 0; l_done <= 1; fills++;
        for (int w = 0; w < 8; w++) l_rdata[32*w +: 32] <= word_at({l_addr[35:5], 3'(w), 2'b00});
      end else lat <= lat + 1;
    end
  end

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  task automatic fetch(logic [31:0] a, output int cyc);
    @(negedge clk); req = 1; pa_valid = 1; va = a; pa = v2p(a); cyc = 0;
    #1 while (!ready) begin @(negedge clk); #1; cyc++; if (cyc > 50) break; end
    chk(rdata, word_at(v2p(a)), "word");
    @(posedge clk); #1 req = 0;
  endtask

  initial begin
    int c, f0;
    repeat (2) @(negedge clk); rst_n = 1;
    fetch(32'h0000_1000, c); chk(c > 0, 1, "cold miss");
    fetch(32'h0000_1004, c); chk(c, 0, "hit same line");
    fetch(32'h0000_101C, c); chk(c, 0, "hit line end");
    // three lines in the same set (VA[11:5] equal, different pages)
    fetch(32'h0001_1000, c); chk(c > 0, 1, "B miss");      // set full: A, B
    fetch(32'h0000_1008, c); chk(c, 0, "A hit");           // A most recent
    fetch(32'h0002_1000, c); chk(c > 0, 1, "C miss");      // evicts B (LRU)
    fetch(32'h0000_1000, c); chk(c, 0, "A still present");
    f0 = fills;
    fetch(32'h0001_1000, c); chk(c > 0, 1, "B was evicted");
    chk(fills - f0, 1, "one fill per miss");
    // flush
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    fetch(32'h0000_1000, c); chk(c > 0, 1, "miss after flush");
    // random stream over 16 KB of code (twice the cache)
    for (int i = 0; i < 3000; i++) fetch(32'($urandom_range(0, 4095)) << 2, c);
    chk(miss_count > 0, 1, "misses counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
