// smpc_icache: private instruction cache of one IU: 8 KB, 2-way set
// associative, 32-byte lines, LRU replacement, virtually indexed and
// physically tagged.
//
// With 4 KB pages each 4 KB way is indexed by VA[11:5], bits the MMU leaves
// untranslated, so the set is read in parallel with the level-1 instruction
// TLB and the tag compare uses the physical page number from the TLB
// (pa_valid/pa). A hit returns the instruction word in the same cycle
// (ready). On a miss the cache reads the 32-byte line through the bus unit,
// fills the least recently used way (an invalid way first) and then hits.
// The cache does not snoop; flush (the FLUSH instruction) invalidates every
// line in one cycle. Lookup, array organisation and the single outstanding
// miss are this design's choices; size, associativity, line size, LRU and
// VIPT follow the design.
module smpc_icache
  import smpc_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 8192
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  input  logic              req,
  input  logic [VA_W-1:0]   va,
  input  logic              pa_valid,
  input  logic [PA_W-1:0]   pa,
  output logic              ready,
  output logic [31:0]       rdata,
  // line fill through the bus unit
  output logic              l_req,
  output bus_cmd_e          l_cmd,
  output logic [PA_W-1:0]   l_addr,
  input  logic              l_done,
  input  logic [LINE_W-1:0] l_rdata,
  output logic [31:0]       miss_count
);
  localparam int unsigned WAYS = 2;                     // replacement logic is 2-way LRU
  localparam int unsigned SETS = SIZE_BYTES / (WAYS * LINE_BYTES);
  localparam int unsigned SW   = $clog2(SETS);
  localparam int unsigned TW   = PA_W - 5 - SW;        // tag above set index and line offset

  logic [LINE_W-1:0] data  [WAYS][SETS];
  logic [TW-1:0]     tag   [WAYS][SETS];
  logic              valid [WAYS][SETS];
  logic [SETS-1:0]   lru;                  // 2-way: way to replace next

  logic [SW-1:0]     set;
  logic [2:0]        word;
  logic              hit;
  logic              hway;
  logic              filling;
  logic [PA_W-1:0]   fill_addr;

  assign set  = va[5 +: SW];
  assign word = va[4:2];

  always_comb begin
    hit = 1'b0; hway = 1'b0;
    for (int w = 0; w < WAYS; w++)
      if (valid[w][set] && tag[w][set] == pa[PA_W-1 -: TW]) begin hit = 1'b1; hway = w[0]; end
  end

  assign ready  = req && pa_valid && hit && !flush;
  assign rdata  = data[hway][set][32*word +: 32];
  assign l_req  = filling;
  assign l_cmd  = BUS_RD_LINE;
  assign l_addr = fill_addr;

  // refill victim: an invalid way first, else the least recently used one
  logic          v;
  logic [SW-1:0] fs;
  assign fs = fill_addr[5 +: SW];
  assign v  = !valid[0][fs] ? 1'b0 : (!valid[1][fs] ? 1'b1 : lru[fs]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < WAYS; w++) for (int s = 0; s < SETS; s++) begin valid[w][s] <= 1'b0; tag[w][s] <= '0; end
      lru <= '0; filling <= 1'b0; fill_addr <= '0; miss_count <= '0;
    end else begin
      if (flush) begin
        for (int w = 0; w < WAYS; w++) for (int s = 0; s < SETS; s++) valid[w][s] <= 1'b0;
      end else if (ready) begin
        lru[set] <= ~hway;
      end
      if (!filling && req && pa_valid && !hit && !flush) begin
        filling    <= 1'b1;
        fill_addr  <= {pa[PA_W-1:5], 5'b0};
        miss_count <= miss_count + 1;
      end else if (filling && l_done) begin
        data[v][fs]  <= l_rdata;
        tag[v][fs]   <= fill_addr[PA_W-1 -: TW];
        valid[v][fs] <= 1'b1;
        lru[fs]      <= ~v;
        filling      <= 1'b0;
      end
    end
  end
endmodule
