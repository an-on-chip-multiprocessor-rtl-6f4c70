# SMPC: two SPARC integer units sharing one MMU and one data cache

On a single-chip multiprocessor, the simplest approach copies the whole uniprocessor
twice. The SMPC does something else. Two 32-bit SPARC-style integer units
(IUs) each keep a small private instruction cache and small private level-1 TLBs. Everything
larger is built once and shared: a 128-entry level-2 TLB with its table walker, and a
write-back data cache that both IUs access in the same cycle. A shared data cache means
the two processors never need to keep copies coherent with each other. The snooping
protocol is only needed toward other chips on the external bus. The level-1 TLBs keep address
translation off the critical path. The shared level-2 TLB gives both processors the
capacity of one large TLB.

This repository is a SystemVerilog model of that organisation. It follows the SMPC
microprocessor described by Yonsei University in 1997. Some parts are this design's own:
the instruction encodings of the extensions, the external bus protocol, several table
sizes and all replacement details. Each file's opening comment says which parts follow
the original chip and which are own choices. "Departures and omissions" below collects the
differences.

```
             IU0                                  IU1
   fetch |         | data               fetch |         | data
     ITLB(2)    DTLB(8)                   ITLB(2)    DTLB(8)
        |   \      |   \                     |   /      |   /
        |    +-----|----+--- level-2 MMU ---+---|-----/
        |          |        128-entry TLB, walker, PTPC
   I-cache 8K      |                         |         I-cache 8K
        |          +------ D-cache 8K 4-way, two IU ports, snoop port
        |                    |         |
        +------------- bus unit (lock array, barriers, reset) ---- external bus
```

## Files

| file | contents |
|---|---|
| `rtl/smpc_pkg.sv` | widths, TLB entry and bus command types, ALU operations, extension op3 codes, event counter struct, window-to-row mapping |
| `rtl/smpc_iu.sv` | five-stage integer unit |
| `rtl/smpc_regfile.sv` | 136 x 32 windowed register file, three read ports and one write port |
| `rtl/smpc_alu.sv`, `rtl/smpc_csum_adder.sv` | ALU with conditional-sum adder, null-byte detection, step multiply/divide, string compare |
| `rtl/smpc_l1_tlb.sv` | level-1 TLB (2 entries per instruction side, 8 per data side) |
| `rtl/smpc_l2_mmu.sv` | shared level-2 TLB, four-way request arbiter, table walker, page table pointer cache |
| `rtl/smpc_icache.sv` | private instruction cache |
| `rtl/smpc_dcache.sv` | shared data cache with MOESI snooping |
| `rtl/smpc_bus_unit.sv` | external bus master, MCIS lock array and barriers, reset synchroniser |
| `rtl/smpc_top.sv` | the chip |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/smpc_asm_pkg.sv` | small SPARC assembler (functions that return encoded instructions) used by the IU and chip testbenches |
| `tb/smpc_ext_mem.sv` | behavioural memory on the external bus |

## The integer unit pipeline

The IU has five stages. The stage roles are those of the original chip:

* **F** fetches from the instruction cache at the translated PC.
* **D** decodes, reads the register file, resolves branches and computes JMPL targets.
  It also computes the new CWP for SAVE/RESTORE.
* **E** runs the ALU and computes addresses. It reads the store data and updates icc and Y.
* **M** accesses the data cache and runs MCIS operations.
* **W** aligns load data and writes the register file.

One decode happens in D. Its control word travels down the pipe with the instruction, so each
stage acts on its own copy. This has the same effect as the original chip's per-stage
instruction registers.

**Register windows.** There are eight windows of 16 registers plus 8 globals, 136
registers in all. Register *r* of window *w* (r >= 8) is stored in physical row
`8 + ((16*w + r - 8) mod 128)`. With this mapping the ins of window *w* are the outs of window
*w+1*, and SAVE decrements CWP as in SPARC. The file has three combinational read ports:
rs1, rs2 and the store data rd. It has one synchronous write port, and r0 always reads 0.

**Forwarding.** Every operand in D is chosen from one of these sources:
* the register file
* the ALU result in E
* the result in M, or the aligned load data when M holds a load
* the value being written in W

The comparison uses physical register rows, not register numbers. An instruction after a
SAVE therefore forwards correctly from one before it when the two name the same
physical register through different windows.

**Interlocks.**
* **Load interlock:** an instruction that needs a load result in E waits one cycle.
  The exception is store data: a store right behind a load takes the data straight from
  the load aligner into E.
* **Store interlock:** a store holds the cache for two cycles, one to check the tag and one to
  write. A load or store directly behind a store therefore waits one cycle in E.
* **Memory and fetch stalls:** these freeze the whole pipe.

**Branches.** Branches are SPARC delayed branches with one delay slot and the annul bit.
They resolve in D from forwarded icc, and a separate 30-bit adder computes the target.
CALL and JMPL write the return address in the usual way.

**IOP.** A load-update (`LDUPD`) or store-update (`STUPD`) instruction first
does its memory access. D then inserts an internal operation into E that writes the
effective address back to rs1. While it is inserted, fetch is held.

**String load and store.** These also use an IOP.
* A string load (`LDSTR`) first reads the aligned word that holds the first byte and keeps it in a
  register. Its IOP then reads the next word (address + 4). The load aligner shifts the two
  words together, so the result reaches rd and the forwarding paths like any load.
* A string store (`STSTR`) writes the bytes of rd in two partial-word stores. The first store covers
  the bytes up to the word boundary, and the IOP stores the rest into the next word.

The two accesses may fall into different lines or pages; each is translated and cached on its
own.

**Special instructions.**
* `MULScc` is the SPARC step multiply. There is no hardware multiplier or divider.
* `DIVS` is one restoring division step on the 33-bit remainder `{Y, rs1[31]}`.
  Y takes the new remainder, and the result is the quotient shifted left one place plus the new quotient bit.
* `CMPSTR` compares two words byte by byte from the most significant byte.
  * The result is the index (0 to 3) of the first byte that differs or is zero in both; it is 4 if there is none.
  * `icc.z` is set when no byte differed.
  * `icc.n` is set when the comparison stopped on a common null byte.
  * `icc.c` is set when the first word's byte is lower at the point where they differ.
* The null-byte detector works on operand A in parallel with the adder.

**Extension encodings.** These are own choices, in op3 codes that SPARC V8 leaves unused:

| instruction | op | op3 | meaning |
|---|---|---|---|
| LDUPD | 3 | 0x08 | `rd <- [rs1+op2]`, then `rs1 <- rs1+op2` |
| STUPD | 3 | 0x0C | `[rs1+op2] <- rd`, then `rs1 <- rs1+op2` |
| LDSTR | 3 | 0x0B | `rd <-` the four bytes starting at the unaligned address `rs1+op2` |
| STSTR | 3 | 0x0E | the four bytes of `rd` written starting at the unaligned address `rs1+op2` |
| CMPSTR | 2 | 0x09 | string compare, result in rd, sets icc |
| DIVS | 2 | 0x0D | divide step, sets Y and icc |
| LOCKSET | 2 | 0x2C | lock the global variable at `rs1+op2`; completes once the lock is granted |
| LOCKCLR | 2 | 0x2D | release it |
| BARSET | 2 | 0x2E | arrive at the barrier; completes only when both IUs have arrived |
| BARCLR | 2 | 0x2F | leave the barrier (resets this IU's arrival flag) |

A `Ticc` instruction stops the IU: `halted` goes high and stays high. There is no trap
model. The IU has no window overflow or underflow traps, alignment traps, MMU fault traps or
interrupts. Instructions that are not listed as built (see below) execute as no-ops.

## Address translation

Virtual addresses are 32 bits and physical addresses are 36 bits. Pages are 4 KB.

* **Level-1 TLBs.** Each IU has a 2-entry instruction TLB and an 8-entry data TLB. They are fully
  associative and translate combinationally in the cycle of the access. On a miss they ask the
  level-2 MMU. Its answer goes straight to the output in the cycle it arrives and is written
  into the level-1 TLB at the same time. A level-2 hit therefore costs exactly one cycle. Replacement
  is round-robin.
* **Level-2 TLB.** One 128-entry fully associative TLB serves all four level-1 TLBs. A
  round-robin arbiter takes one request per cycle. When all four miss at once, the last waits
  three extra cycles.
* **Table walk.** A level-2 miss starts a walk through four tables in the SPARC
  reference-MMU format:
  * the context table at `ctp`, indexed by the context
  * the level-1 table, indexed by VA[31:24]
  * the level-2 table, indexed by VA[23:18]
  * the level-3 table, indexed by VA[17:12]

  A page table descriptor (ET=1) carries PA[35:6] of the next table in its bits 31:2. A page
  table entry (ET=2) carries the 24-bit physical page number in bits 31:8. It also carries C (bit 7)
  and ACC (bits 4:2). The walker reads words through the bus unit at the highest bus priority.
* **Page table pointer cache (PTPC).** This 4-entry cache keeps the level-3 table pointers of recent
  walks, tagged by VA[31:18]. A PTPC hit lets the walk skip three memory reads and go straight
  to the last one. While a walk runs, arbitration pauses and other level-1 misses wait.
* **MMU control.** The context-table pointer, the context and a flush line are chip pins
  (`mmu_ctp`, `mmu_ctx`, `mmu_flush`). An invalid entry found by the walk is reported on
  `mmu_fault` for the requester, and that requester's access stays stalled.

## Caches and coherence

**Instruction caches.** Each IU has one: 8 KB, 2-way, 32-byte lines, one LRU bit per set. They
are virtually indexed (VA[11:5] picks one of 128 sets) and physically tagged (PA[35:12]). The
index bits lie inside the page offset, so the TLB and the cache work in parallel. A hit
returns the word in the same cycle. A miss fetches the line through the bus unit. The FLUSH
instruction invalidates the whole cache. The instruction caches do not snoop.

**Data cache.** The data cache is 8 KB, 4-way and write-back, with 32-byte lines and 64 sets.
It is virtually indexed and physically tagged (tag PA[35:11]). It has two IU ports and a snoop
port, and the tags are looked up three times per cycle. Loads complete in the cycle they
arrive on a hit. A store checks the tag in its first cycle and writes the bytes in the second
from a pending-store register. When both ports use one set in the same cycle and either
stores, port 1 waits a cycle. Replacement uses 2-bit LRU ages.

**MOESI states.** Each line is in one of five states:

| state | meaning |
|---|---|
| I | invalid |
| E | exclusive, clean |
| S | shared, clean |
| O | owned: dirty, possibly shared, this cache answers for it |
| M | modified: dirty, only copy |

Both IUs use this one cache, so the states describe the line's relation to other chips on
the bus, not to the other IU.

| event | action |
|---|---|
| load miss | read line; E if no other cache asserts `ext_shared`, else S |
| store miss | read line for ownership (RDX), then M |
| store hit on S or O | invalidate on the bus (upgrade), then M |
| store hit on E | M silently |
| snooped read | M or E become O or S; M and O supply the line |
| snooped read-for-ownership or invalidate | line becomes I; M and O supply the line |
| victim in M or O | written back before the refill |

The cache handles one miss at a time. The whole miss sequence (write-back, fill or
upgrade) runs as a small state machine.

## Bus unit and the multiprocessor instructions

The bus unit serves four clients at fixed priority: the table walker, the data cache,
instruction cache 0 and instruction cache 1. It puts one transaction at a time on the
external bus.

The external protocol is this design's own:
* **Address phase.** `ext_req`, `ext_cmd` and `ext_addr` are held until `ext_gnt`.
  `ext_shared` is sampled with the grant.
* **Line transfer.** A line takes four 64-bit beats, with beat *i* carrying words 2i+1 (high half) and 2i
  (low half). Line reads come back on `ext_rvalid`/`ext_rdata`; write-backs go out on
  `ext_wdata` paced by `ext_wready`.
* **Word transfer.** Word reads use one beat, with the word in the low half.
* **Invalidate.** An invalidate has only an address phase.

The MCIS lock array has 8 entries, each holding an owner IU and a lock address. A LOCKSET is
granted when no entry holds the address for the other IU. Until then it is not acknowledged,
and the IU waits in M. Software therefore needs no spin loop. Each IU has a barrier flag. BARSET sets the IU's flag and completes once both flags are set;
BARCLR clears it. The two IUs take turns when both issue MCIS operations in the same cycle.

The bus unit also synchronises the external reset with two flip-flops; `rst_n_out` drives the
rest of the chip.

## Departures and omissions

Built differently from the original chip, or where it gives no detail:
* Instruction encodings of all extensions, the result format of CMPSTR and the form of the
  divide step are own choices.
* The string load and store each take two issue cycles. The original chip ran them as single-cycle
  instructions, but its datapath for doing so is not known. Step multiply has no early-out.
* The external bus protocol, client priority, lock array size (8) and PTPC size and contents
  (4 level-3 pointers) are own choices.
* The data cache line size (32 bytes) and the LRU replacement of both caches follow the
  instruction cache's description. The level-1 TLB organisation and all TLB replacement are
  assumed, and the MOESI transitions are the conventional ones.
* The page-table format, the page size and the window overlap rule are SPARC's.
* The MMU registers are pins rather than registers software can write.
* The lock array grants and releases locks. It does not watch ordinary loads and stores to locked addresses.

Not built:
* precise exceptions and all traps, including window overflow/underflow
* interrupts and interrupt distribution
* floating point, LDD/STD, SWAP/LDSTUB, alternate space, PSR/WIM/TBR access
* referenced/modified bit updates and access-permission checks in the MMU
* the reduced four- and three-state coherence options
* the clock network; the register cell, its sense amplifiers and decoder circuits are modelled by their function only

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. Examples with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_smpc_top \
  rtl/smpc_pkg.sv tb/smpc_asm_pkg.sv rtl/*.sv tb/smpc_ext_mem.sv tb/tb_smpc_top.sv
./obj_dir/Vtb_smpc_top

verilator --binary --timing --assert --top-module tb_smpc_dcache \
  rtl/smpc_pkg.sv rtl/smpc_dcache.sv tb/tb_smpc_dcache.sv
./obj_dir/Vtb_smpc_dcache
```

What the testbenches cover:
* `tb_smpc_regfile` compares against a model across all windows.
* `tb_smpc_alu` runs random and corner operands for every operation against a reference.
* The TLB, MMU, cache and bus unit testbenches drive their handshakes directly. Each has a small reference model: page tables, line memory, other-chip snoops.
* `tb_smpc_iu` runs assembled programs against an ideal memory, with and without random wait
  states. The programs include string loads and stores at unaligned addresses. It checks results and that each forwarding path, interlock, the IOP, annulled slots and
  taken branches occurred.

`tb_smpc_top` runs the whole chip at its default sizes. Both IUs run from virtual addresses through
real page tables in the external memory model. The program does the following:
* Each IU increments a shared counter 20 times under a lock.
* Each stores across twelve pages that map to one data-cache set. This forces level-1 TLB misses, PTPC hits and dirty write-backs.
* The IUs meet at a barrier and read each other's data.

The testbench also snoops the counter line as a foreign chip would, which forces O states and
upgrades. It checks the results and requires every counted event to have occurred at least once:
* table walks and PTPC hits
* TLB miss cycles
* instruction and data cache misses
* write-backs, upgrades and snoop hits
* port conflicts
* lock and barrier waits
* all forwarding paths and interlocks
* IOPs and annulled instructions

The run takes about 800 clock cycles.

`tb_smpc_dtlb_sweep` runs one synthetic data-reference trace through level-1 TLBs of
2, 4, 8 and 16 entries. The trace has 4000 references over 14 pages: a stack page, three arrays
walked in step and a small table. The testbench prints the miss rate of each size. With this trace
the 8-entry size of the chip is the smallest that holds the loop's working set most of the time:
* 2 entries: 97 %
* 4 entries: 20 %
* 8 entries: 0.75 %
* 16 entries: 0.35 %, which is compulsory misses only

To change a size, override the parameters: `ENTRIES` of `smpc_l1_tlb` (the chip uses 2 and 8),
`ENTRIES` and `PTPC_ENT` of `smpc_l2_mmu`, `SIZE_BYTES` of the caches, `WAYS` of the data cache,
`NLOCK` of the bus unit, `NWIN` of the IU.
