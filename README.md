# SDSP — a four-wide out-of-order superscalar core in SystemVerilog

The SDSP (Superscalar Digital Signal Processor) is a 32-bit RISC core that
fetches four instructions per cycle and executes them out of order. Its central
idea is a single **scheduling unit (SU)**: a FIFO of four-instruction blocks in
which the reorder buffer and the instruction window sit side by side. A fetched
block enters at the top. Its instructions issue, oldest first, to nine
functional units as soon as their operands exist. The block leaves at the bottom
when all four results are in, and those results are written to the register
file together. Three design choices keep the pipeline full:

* a **multiple-branch predictor** that predicts every branch of a fetch block in
  one cycle;
* **complete result bypassing**, so dependent single-cycle operations issue in
  consecutive cycles;
* **early branch recovery**: a mispredicted branch is repaired as soon as it is
  resolved, not when it reaches the bottom of the SU.

This RTL is a synthesizable model of that organisation, with the sizes of the
configuration the SDSP was evaluated in.

## Organisation

```
             Instruction Unit: program_counter, branch_predictor, icache
                          | one block of 4 instructions / cycle
             Scheduling Unit: 4 x instruction_decoder, register_file (8 read ports),
                              reorder_buffer + instruction_window (SU_DEPTH blocks x 4)
                          | up to 8 issues / cycle          ^ up to 4 results / cycle
             Execution Unit: 4 x alu, multiplier (16 bit), load_unit + dcache,
                              store_buffer (store unit), ctu;  result_arbiter
```

| module | role |
|---|---|
| `sdsp` | top: wires the three units together; memory ports, `halted`, event strobes |
| `sdsp_pkg` | widths, instruction encoding, decoded/issue/result structs, tag-age functions |
| `program_counter` | fetch address, valid mask of the block, predicted successor per slot |
| `branch_predictor` | 64-entry block-indexed BTB, four 2-bit counters + targets per entry |
| `icache` | 8 KB direct-mapped, one fetch block per line, 6-cycle refill |
| `instruction_decoder` | one per slot; unit class, operation, registers, immediate |
| `register_file` | 32 x 32 bit; 8 combinational reads, 4 commit writes |
| `reorder_buffer` | block FIFO state, renaming, completion, commit, recovery |
| `instruction_window` | operands, wake-up, oldest-first selection under unit limits |
| `alu` | single cycle, holds its result if it loses write-back |
| `multiplier` | signed 16 x 16 -> 32, two-stage pipeline |
| `load_unit` | base + offset, store-buffer forwarding, data-cache access |
| `store_buffer` | store unit plus 8-entry buffer; drains committed stores |
| `dcache` | 8 KB direct-mapped, write-through, 6-cycle refill |
| `ctu` | branch and jump resolution, mispredict detection |
| `result_arbiter` | 4 write-back channels: load, then multiply, then ALU1..ALU4 |

## The scheduling unit

**Blocks and tags.** The SU holds `SU_DEPTH` blocks of four entries (default 8,
so 32 instructions). Entry *i* of a block holds the instruction at word *i* of
its fetch block. Slots that were not fetched hold no instruction and count as
done: slots before the entry word, slots after a predicted-taken branch, and
no-ops. The FIFO is stored as a circular queue of block slots with `head` (the
oldest block) and `tail`. This gives the same order and occupancy as a shifting
FIFO whose empty blocks close up, but nothing moves. An instruction's tag is
`{block slot, word}` and stays fixed while the instruction is in the SU. Program
order among tags is their distance from `head`; see `tag_age` and `tag_younger`
in `sdsp_pkg`.

**Entering.** In the fetch cycle the block is decoded and every source register
is renamed. The reorder buffer looks for the newest older producer of the
register:

1. an earlier slot of the same block, which gives a tag;
2. failing that, the youngest entry in the buffer, which gives its value if
   done, the value on the result bus if it is being written this cycle, or
   otherwise its tag;
3. failing that, the register file.

The block and its renamed operands are written at the end of the cycle. Fetch is
held when all `SU_DEPTH` block slots are full (`perf.su_full`).

**Issue.** Every cycle the window walks its entries from `head` upward and grants
each instruction whose operands are ready. With `DECODE_ISSUE=1` (the default)
the block being decoded in this cycle is considered as well, after all older
entries. An instruction whose operands are already available therefore issues
in the cycle it is fetched, and it enters the window already issued. Per cycle it issues at most 4 ALU
operations (only to ALUs that are free), 1 multiply, 1 load, 1 store and
1 control transfer, and at most `ISSUE_LIMIT` (8) in all. An operand is ready if
it is stored in the window or, with `BYPASS=1`, if its tag is on one of the four
result channels in this cycle. In that case the bus value goes straight to the
unit. Stores issue in program order. A load may issue only when no older store
is still unissued. It may then pass stores that have not yet reached memory,
because the store buffer supplies their data.

**Timing.** Take an ALU operation issued in cycle *t*:

| cycle | producer | dependent consumer |
|---|---|---|
| t | issued (possibly in its fetch cycle), operands latched by the ALU | waits |
| t+1 | result on a write-back channel | woken by that channel, issued with the bypassed value |
| t+2 | — | executes |

A multiply's result appears in *t+2* and a load hit's in *t+1*. A load that
misses in the data cache returns its result 6 cycles later than a hit.

**Write-back.** Up to six results can be ready in a cycle: four from the ALUs,
one multiply and one load. Only `RESULT_WRITES` (4) are accepted. The load goes
first, then the multiply, then ALU1..ALU4. An ALU that gets no channel keeps its
result and stays busy (`perf.wb_conflict`). Stores and control transfers report
completion on their own paths and use no channel.

**Commit.** The bottom block leaves when all of its entries are done. Its
results go to the register file through four write ports; when two slots write
the same register, the later slot wins. In the same cycle the branch predictor
is trained with every branch in the block, and the block's stores are released
to memory. A cycle in which the bottom block exists but is not complete is an
**SU stall** (`perf.su_stall`). Instructions keep issuing during a stall.

## Branch prediction and recovery

The predictor is indexed by the low six bits of the 28-bit block address. Each
entry stores the full block address as its tag and has four branch fields, one
per word. A field has a valid bit, a 2-bit saturating counter (taken when the
counter is 2 or more) and a target. At lookup, all fields at or after the fetch
word are examined together. The first one predicted taken sets the next fetch
address and invalidates the slots after it. If none is predicted taken, fetch
continues with the next block and there is no refetch. Each slot carries the
successor that was predicted for it.

The control transfer unit resolves a branch one cycle after it issues. If the
actual successor differs from the predicted one, recovery starts in that same
cycle:

* SU entries younger than the branch are dropped, and the tail moves back to the
  block after the branch;
* younger work in the ALUs, multiplier, load unit and store buffer is discarded;
* the program counter is loaded with the correct address.

The correct block is fetched in the next cycle. If the branch was wrongly
predicted taken and was not in the last slot, this refetches the branch's own
block from the word after the branch.

The predictor learns only at commit. A deeper SU therefore trains it later.

## Memory side

Both caches are direct mapped with 16-byte lines and take `MISS_PENALTY` (6)
extra cycles on a miss. During a refill the cache counts the penalty. In the
last cycle it reads the line from its memory port, which must answer a line
address combinationally.

The data cache is write-through with no allocation on a write miss. It receives
stores only from the store buffer, which drains committed stores one per cycle,
oldest first. No store reaches memory before every earlier branch is resolved.
Stores write their address and data into the buffer at the end of their issue
cycle and report completion one cycle later. The buffer has 8 entries, and a
full buffer holds back store issue. A load checks the buffer and the cache at
the same time. Data from the youngest older store to the same word takes
precedence.

## Instruction encoding

The encoding is specific to this implementation:

| field | bits |
|---|---|
| opcode | [31:26] |
| rd (source for SW and branches) | [25:21] |
| rs1 | [20:16] |
| rs2 | [15:11] |
| imm16 | [15:0] |

| opcode | meaning |
|---|---|
| `01` ALU | funct [3:0]: ADD SUB AND OR XOR SLL SRL SRA SLT SLTU |
| `02..07` | ADDI ANDI ORI XORI SLTI LUI |
| `08` MUL | signed 16 x 16 of the low halves |
| `09` LW, `0A` SW | word access, address rs1 + sext(imm16) |
| `0B..0E` | BEQ BNE BLT BGE rs1 against r[rd]; target pc + sext(imm16) words |
| `0F` J | pc + sext(imm26) words |
| `3F` HALT | stops the core when it commits |
| `00000000` | no-op |

Register 0 reads as zero. The PC is a word address; byte addresses are
`{block[27:0], word[1:0], byte[1:0]}`.

## Parameters of `sdsp`

| parameter | default | meaning |
|---|---|---|
| `SU_DEPTH` | 8 | blocks in the SU, 2 to 16 (any value; tags are sized for 16) |
| `ISSUE_LIMIT` | 8 | instructions issued per cycle |
| `RESULT_WRITES` | 4 | result-bus channels (1 to 4) |
| `BYPASS` | 1 | operands usable in the cycle they are written back |
| `DECODE_ISSUE` | 1 | instructions may issue in the cycle they are decoded |
| `BTB_ENTRIES` | 64 | predictor entries |
| `SB_DEPTH` | 8 | store-buffer entries |
| `ICACHE_BYTES`, `DCACHE_BYTES` | 8192 | cache sizes |
| `MISS_PENALTY` | 6 | extra cycles per cache miss (at least 2) |

Top ports:

* `imem_addr`/`imem_line`: the instruction-cache line read.
* `dmem_raddr`/`dmem_rline`: the data-cache line read.
* `dmem_we`/`dmem_waddr`/`dmem_wdata`: one word written per cycle.
* `halted`: high once a HALT has committed.
* `perf` (`perf_t`): event strobes for each cycle.

## Simulation

Each testbench in `tb/` checks itself and ends with a
`TB_RESULT checks=N failures=M` line. Build one with Verilator 5, for example
the whole core:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sdsp_pkg.sv tb/sdsp_asm_pkg.sv \
    rtl/*.sv tb/tb_sdsp.sv --top-module tb_sdsp -o sim && obj_dir/sim
```

`tb_sdsp` runs the core at its default parameters. The program is an
array-processing loop over random data, with loads, squares, accumulation,
independent ALU work, a store followed by a reload of the same word,
data-dependent branches and a jump. `sdsp_asm_pkg` provides the assembler
helpers and a reference instruction-set model that runs the same program. After
HALT, the register file, the data memory and the number of committed
instructions must match the model. The testbench also requires that every
mechanism above occurred at least once:

* SU stall and SU full
* mispredict recovery and predicted-taken fetch
* instruction- and data-cache misses
* bypassed issue and write-back conflict
* store-buffer forwarding
* more than four issues in one cycle

Each unit has its own testbench, `tb/tb_<module>.sv`. Those testbenches check
the latencies: ALU 1 cycle, multiplier 2, cache miss +6. They also check the
issue limits and write-back priority.

Results of the `tb_sdsp` program (1229 instructions):

| configuration | cycles | IPC |
|---|---|---|
| default (SU depth 8, bypass, 4 writes, decode-cycle issue) | 534 | 2.30 |
| SU depth 2 / 4 / 16 | 1025 / 659 / 518 | 1.20 / 1.86 / 2.37 |
| no bypassing | 619 | 1.99 |
| 2 result writes | 765 | 1.61 |
| issue limit 4 | 559 | 2.20 |
| no issue in the decode cycle | 587 | 2.09 |

The average number of valid instructions per fetched block is about 3.5. In the
reduced configurations some mechanisms cannot occur, for example bypassing when
`BYPASS=0`, and `tb_sdsp` reports those as failures. The results themselves
were correct in every configuration.

`tb_sdsp_workloads` runs three longer kernels on the default core and checks
every result against arithmetic done in the testbench. Build it with the
command above, using `tb/tb_sdsp_workloads.sv` and `--top-module tb_sdsp_workloads`.
It runs in a few seconds.

* **bubble**: bubble sort of 500 random words.
* **intmm**: a 40 x 40 integer matrix product. Its 19.2 KB of data does not fit
  in the data cache.
* **dct**: a two-dimensional 8 x 8 integer DCT and its inverse, 100 times. Each
  transform is two matrix products with a rounding shift. The output must match
  the testbench exactly, and the round trip must come back within 16 of the input.

| workload | instructions | cycles | IPC | IPC at SU depth 2 / 4 / 16 | IPC without bypassing |
|---|---|---|---|---|---|
| bubble | 750012 | 467613 | 1.60 | 0.96 / 1.54 / 1.60 | 1.37 |
| intmm | 526648 | 219059 | 2.40 | 1.09 / 1.83 / 2.58 | 2.32 |
| dct | 1941402 | 769678 | 2.52 | 1.19 / 2.02 / 2.52 | 2.36 |

SU stalls, as a share of cycles in `tb_sdsp`, show how bypassing trades
against depth. With bypassing, a 3-block SU stalls 50 % of the time (371 of
741 cycles). Without bypassing, a 7-block SU still stalls 43 % of the time
(277 of 639 cycles).

The trends match the SDSP's published results. Most of the gain from SU depth
comes by depth 8. Bypassing helps most in the loops with short dependence
chains. bubble is limited by its data-dependent branches.

## What this model does not cover

* **Subroutine calls and indirect jumps.** The instruction set has none. That
  rules out recursive and call-heavy programs.
* **Traps.** There are no traps for floating-point emulation or operating-system
  calls.
* **Perfect caches.** Both caches are always real caches. The SDSP's base
  evaluation assumed perfect caches.
* **Memory.** The main memory behind the caches is not part of the design. The
  testbenches model it as an array that answers at once.
* **Partial-word access.** Loads and stores move whole words only.
