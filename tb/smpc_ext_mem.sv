// smpc_ext_mem: behavioural model of the memory system on the SMPC external
// bus, for testbenches only. It grants each address phase after a short
// delay, answers line reads with four 64-bit beats (beat i carries words
// 2i+1 and 2i of the line in its upper and lower halves), word reads with one
// beat, and takes four beats of write-back data. Words are stored in a
// sparse array indexed by word address; unwritten words read as a value
// derived from their address so that fills can be checked. ext_shared is
// driven from the shared_in input (the snoop answer of other caches).
module smpc_ext_mem
  import smpc_pkg::*;
(
  input  logic            clk,
  input  logic            ext_req,
  input  bus_cmd_e        ext_cmd,
  input  logic [PA_W-1:0] ext_addr,
  output logic            ext_gnt,
  output logic            ext_shared,
  output logic            ext_rvalid,
  output logic [63:0]     ext_rdata,
  input  logic [63:0]     ext_wdata,
  output logic            ext_wready,
  input  logic            shared_in,
  output int              n_line_reads,
  output int              n_word_reads,
  output int              n_writebacks,
  output int              n_invalidates
);
  logic [31:0] mem [logic [33:0]];
  bus_cmd_e cmd; logic [PA_W-1:0] addr;
  int beat, wait_c;
  typedef enum { M_IDLE, M_GNT, M_RD, M_WR } mst_e;
  mst_e st = M_IDLE;

  function automatic logic [31:0] rd(logic [33:0] wa);
    return mem.exists(wa) ? mem[wa] : {wa[15:0], ~wa[15:0]};
  endfunction
  function automatic logic [31:0] peek(logic [PA_W-1:0] a); return rd(a[35:2]); endfunction
  task automatic poke(logic [PA_W-1:0] a, logic [31:0] d); mem[a[35:2]] = d; endtask

  initial begin
    ext_gnt = 0; ext_shared = 0; ext_rvalid = 0; ext_rdata = 0; ext_wready = 0;
    n_line_reads = 0; n_word_reads = 0; n_writebacks = 0; n_invalidates = 0;
  end

  always @(posedge clk) begin
    ext_gnt <= 0; ext_rvalid <= 0; ext_wready <= 0;
    case (st)
      M_IDLE: if (ext_req && !ext_gnt) begin st <= M_GNT; wait_c <= 1; end
      M_GNT: if (wait_c > 0) wait_c <= wait_c - 1;
             else begin
               ext_gnt <= 1; ext_shared <= shared_in; cmd <= ext_cmd; addr <= ext_addr; beat <= 0;
               case (ext_cmd)
                 BUS_INV: begin st <= M_IDLE; n_invalidates++; end
                 BUS_WB_LINE, BUS_WR_WORD: st <= M_WR;
                 default: st <= M_RD;
               endcase
             end
      M_RD: begin
        ext_rvalid <= 1;
        if (cmd == BUS_RD_WORD) begin
          ext_rdata <= {32'h0, rd(addr[35:2])}; st <= M_IDLE; n_word_reads++;
        end else begin
          ext_rdata <= {rd({addr[35:5], 3'(2*beat+1)}), rd({addr[35:5], 3'(2*beat)})};
          beat <= beat + 1;
          if (beat == 3) begin st <= M_IDLE; n_line_reads++; end
        end
      end
      M_WR: begin
        if (!ext_wready) ext_wready <= 1;
        else begin
          if (cmd == BUS_WR_WORD) begin mem[addr[35:2]] = ext_wdata[31:0]; st <= M_IDLE; end
          else begin
            mem[{addr[35:5], 3'(2*beat)}] = ext_wdata[31:0];
            mem[{addr[35:5], 3'(2*beat+1)}] = ext_wdata[63:32];
            beat <= beat + 1;
            if (beat == 3) begin st <= M_IDLE; n_writebacks++; end
            else ext_wready <= 1;
          end
          if (cmd == BUS_WR_WORD || beat == 3) ext_wready <= 0;
        end
      end
    endcase
  end
endmodule
