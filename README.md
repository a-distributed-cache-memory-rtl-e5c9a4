# Distributed vector cache memory system

A deep arithmetic pipeline on an FPGA can consume several operands per clock
cycle, but the data usually lives in one external DRAM whose reads take tens
of cycles. This design puts a small, independent cache in front of each
operand input of such a datapath. All caches share the one DRAM. Each cache
has its own address generator, which walks one or more 1-, 2- or 3-dimensional
vectors. The generator is driven by compact 4-bit *iteration commands* such
as "next element along i" or "first element of this row". It is not given
absolute indexes. A microcode sequencer sends one command to every cache per
cycle. When all caches hit, the datapath receives one full set of operands
per cycle, each word one cycle after its cache was addressed.

The RTL follows a published architecture for Xilinx Virtex-4 class devices: a
200 MHz prototype with four caches of 32 lines × 16 Kbit (2 Mbit in all), LRU
replacement, and a 512 MB DDR2 module. Those numbers are the defaults here.
The code itself is generic SystemVerilog and has no vendor primitives.

```
             +-----------------+        mem_cmd_* / mem_rd_*   (DDR2 controller, external)
             |   vcs_arbiter   |<------------------------------>
             +-----------------+
              ^   ^   ^   ^    line requests / 128-bit beats
   +----------+---+---+---+-----------------------------------+
   |  lane c (NC = 4):                                         |
   |   vcs_addr_gen  --address-->  vcs_cache --word-->  operand collector --> op_*
   |        ^                                                  |
   +--------|--------------------------------------------------+
            | vector id + iteration command per lane
       vcs_useq (microcode) ---- datapath configuration ------> op_cfg
```

## Iteration commands and the address generator

A vector `A` is fixed at synthesis time by its start address `START` and its
sizes `NI`, `NJ` and `NK`. It is stored row by row: `i` varies fastest, then
`j`, then `k`. Element `(i,j,k)` is at `START + i + NI*j + NI*NJ*k`. All
addresses in the system are 32-bit-word addresses (27 bits for 512 MB).

For every vector it serves, `vcs_addr_gen` keeps four registers:

| register  | holds the address of |
|-----------|----------------------|
| `ADDR`    | the element read last |
| `START_I` | `A[0, j, k]`, the start of the current row along i |
| `START_J` | `A[i, 0, k]` |
| `START_K` | `A[i, j, 0]` |

The 14 commands (`vcs_pkg::cmd_e`) each move at most one index:

| code | command          | new `ADDR` |
|------|------------------|------------|
| 0    | `A[i,j,k]` (same) | `ADDR` |
| 1/2  | `A[i±1,j,k]`     | `ADDR ± 1` |
| 3/4  | `A[i,j±1,k]`     | `ADDR ± NI` |
| 5/6  | `A[i,j,k±1]`     | `ADDR ± NI*NJ` |
| 7    | `A[0,0,0]`       | `START` (all four registers reset) |
| 8    | `A[0,j,k]`       | `START_I` |
| 9    | `A[i,0,k]`       | `START_J` |
| 10   | `A[i,j,0]`       | `START_K` |
| 11   | `A[NI-1,j,k]`    | `START_I + NI-1` |
| 12   | `A[i,NJ-1,k]`    | `START_J + NI*(NJ-1)` |
| 13   | `A[i,j,NK-1]`    | `START_K + NI*NJ*(NK-1)` |

All the constants are known at synthesis time, so each command is one adder
with a constant or register operand. The row-start registers need one more
rule, which keeps the other registers consistent. Let `delta` be the change of
`ADDR` caused by a command that moves index `x`. `delta` is added to the
row-start registers of the two other dimensions, and `START_x` does not
change. For example, `i++` adds 1 to `START_J` and `START_K`, because both rows
now start one element further on. After reset every vector points at
`A[0,0,0]`.

An address generator serves `NVEC` vectors (default 2), selected by the
vector id that comes with each command. Each vector has its own set of the
four registers. Out-of-range indexes are not detected: the address simply
continues linearly and wraps modulo 2^27.

## A cache block

`vcs_cache` holds `NLINES` lines of `LINE_WORDS` words. The defaults are 32
lines of 512 words (16 Kbit), or 64 KB per cache. Any line can hold any
memory line. The tags are kept in registers (`vcs_assoc_mem`) and compared
all at once, so hit or miss is known in the cycle of the request. The words
are kept in a block RAM (`vcs_line_ram`). Its write port is 128 bits wide, the
width of a DRAM beat. Its read port is 32 bits wide with a registered output.

* **Hit:** the request is taken in cycle t and the word is on `rd_data` in
  t+1. The cache can take a new request in every cycle.
* **Miss:** the cache takes the request and then drops `ready`. It starts the
  victim search and raises `mem_req` with the line number. The arbiter
  streams the whole line as `LINE_WORDS/4` beats (128 at the defaults), which
  are written into the victim line as they arrive. The new tag is stored only
  after the last beat. One cycle later the missed word is read from the new
  line and `ready` rises again. With a memory that answers L cycles after
  the request, the word appears `L + beats + 2` cycles after the miss.

The cache does not serve hits while a refill is in progress. It only reads:
see *Departures* below.

## Choosing the line to replace

`vcs_repl` implements three policies, chosen by the `POLICY` parameter. The
default is LRU.

* **FIFO** (`POL_FIFO`): replaces the line written longest ago. A pointer
  steps through the lines on every refill. On a miss its value is copied
  into a victim register, so the line being filled stays fixed while the
  pointer moves on.
* **LRU** (`POL_LRU`, `vcs_hr_lru`): every line has an 8-bit history
  register HR. A hit on line i, or a refill of line i, sets HR_i to 0xFF and
  decrements every other register by one, stopping at 0. This is done only if
  HR_i is not already 0xFF. So a run of reads from the same line does not age
  the other lines, and the rule then gives exactly least-recently-used order.
* **LFU** (`POL_LFU`, `vcs_hr_lfu`): HR counts reads. A hit increments HR_i.
  A hit while HR_i is at 0xFF halves every register instead, and gives HR_i
  the value 0x80 (its halved count plus this read). A refilled line starts
  from 0.

For LRU and LFU the victim is the line with the smallest key `{valid, HR}`:
an empty line always wins, and ties go to the lowest index. The victim is
needed only when the first refill beat arrives, at least 23 cycles after the
miss with the 22-cycle DRAM. So `vcs_min_search` finds the minimum
sequentially, comparing `PAR` keys per cycle. At the defaults (32 lines,
PAR = 2) this takes 16 cycles. An assertion in `vcs_cache` checks that the
victim is known before the first beat. If you grow `NLINES` or shorten the
memory latency, keep `NLINES/PAR` below the latency.

## Sharing the DRAM

`vcs_arbiter` serves one cache at a time. When it is free, it grants the
requesting cache with the highest priority and keeps that grant for the
whole line. Each cache has a fixed 4-bit priority level in the `PRIO`
parameter (higher wins); equal levels go to the lower cache index. With the
default, all levels equal, cache 0 comes first. It issues the line as `LINE_WORDS/8` read commands for
32-byte blocks, in address order, as fast as `mem_cmd_ready` allows. Each
command returns two consecutive 128-bit beats on `mem_rd_*`. All beats are
routed to the granted cache. Other caches that miss meanwhile wait with their
request raised. `ev_conflict` marks a grant made while more than one cache was
waiting.

The memory-side handshake is this design's own. The command is a 24-bit block
address (word address / 8), taken when `mem_cmd_valid && mem_cmd_ready`. The
beats must come back in command order, two per command. The DDR2 controller
itself is not part of the RTL.

## Microcode, stalls and operand sets

`vcs_useq` runs a program of up to `UC_DEPTH` (64) microinstructions. A
program is loaded through `uc_ld_*` and started with `start`. Each
instruction is 64 bits at the defaults, most significant field first:

| field | bits | meaning |
|-------|------|---------|
| `lane[3..0]` | 4 × 8 | per cache: `en`, `vid[2:0]`, `cmd[3:0]` |
| `dp_cfg` | 8 | configuration word passed to the datapath with this operand set |
| `rep` | 8 | issue the instruction `rep+1` times (an inner loop) |
| `br` | 1 | after the last repetition, jump to `br_tgt`... |
| `br_tgt` | 6 | ...while the loop counter is below `br_cnt`, else fall through |
| `br_cnt` | 8 | number of extra passes (one outer loop level) |
| `halt` | 1 | end of program after this instruction |

Without misses, the pipeline takes one instruction per cycle. An instruction
issued at t gives addresses at t+1, words at t+2, and an operand set on
`op_valid/op_cfg/op_mask/op_data` at t+3. If any cache misses, `stall` rises
and everything upstream holds: the sequencer, the address generators, the
configuration pipeline, and further requests. Words that other lanes have
already read wait in the operand collector in `vcs_top`. Operand sets
therefore always leave complete and in program order, with `op_mask` showing
which lanes were read.

## Parameters

| parameter (top) | default | meaning |
|-----------------|---------|---------|
| `NC` | 4 | caches (lanes) |
| `NLINES` | 32 | lines per cache |
| `LINE_WORDS` | 512 | 32-bit words per line (a multiple of 8) |
| `POLICY` | `POL_LRU` | replacement policy |
| `HR_W` | 8 | history register width |
| `PAR` | 2 | keys compared per cycle in the victim search |
| `NVEC` | 2 | vectors per address generator (≤ 8) |
| `UC_DEPTH`, `DPC_W`, `REP_W` | 64, 8, 8 | microcode depth and field widths |
| `PRIO` | all 0 | 4-bit memory priority level per cache (higher wins, ties to lower index) |
| `VEC_CFG` | `default_sys_tab()` | vector table, `[cache][vector]` of `{start, ni, nj, nk}` |

The example vector table gives vector v of cache c the size 32×32×16 at word
address `(8c + v) · 2^16`. Replace it with the application's vectors by
building a `sys_vec_tab_t` with `vcs_pkg::mk_vec()`.

## Departures and own choices

Taken from the original architecture: the command set; the four
address registers per vector; one tag memory in registers per cache, giving
one-cycle hits; 32-byte DRAM reads in two 128-bit beats; the tag written
when the refill data arrives; the three policies and their history-register
rules; the sequential victim search within the DRAM latency; the
fixed-priority shared memory controller; and the default sizes. The
priority values themselves are not given and are a parameter here.

Choices made here, where the original is silent or unclear:

* **Placement.** Any line can hold any memory line (fully associative). This
  follows the tag memory and replacement policies of the original. Its
  summary also calls the caches direct-mapped, which would leave nothing for
  a replacement policy to decide.
* **Last-element commands.** These use the offsets `NI*(NJ-1)` and
  `NI*NJ*(NK-1)`, which do land on the last element of the row.
* **LRU and LFU details.** The LRU decrement stops at 0. For LFU, the value
  0x80 given on the halving hit, and clearing the register on refill, are
  this design's reading.
* **Victim key.** The valid bit in the key, the tie rule, and `PAR` are own
  choices.
* **Miss handling.** The whole line is refilled on a miss, and the cache
  serves no hits during a refill.
* **Own additions.** The global stall, the operand collector, the microcode
  format, and every handshake and encoding are this design's own.
* **Writes are not implemented.** The original mentions a write-allocate
  path from the datapath back to memory, but does not describe it. The
  caches only read and the arbiter only issues reads.
* **Not included.** The DDR2 controller/PHY and the arithmetic datapath are
  outside the RTL, behind the `mem_*` and `op_*` ports.

## Files

| file | contents |
|------|----------|
| `rtl/vcs_pkg.sv` | types, command encoding, vector descriptors and address arithmetic |
| `rtl/vcs_addr_gen.sv` | address generator |
| `rtl/vcs_assoc_mem.sv` | tag memory |
| `rtl/vcs_line_ram.sv` | cache data RAM |
| `rtl/vcs_hr_lru.sv`, `rtl/vcs_hr_lfu.sv` | history registers |
| `rtl/vcs_min_search.sv` | sequential minimum search |
| `rtl/vcs_repl.sv` | replacement policy unit |
| `rtl/vcs_cache.sv` | one cache |
| `rtl/vcs_arbiter.sv` | shared-memory arbiter |
| `rtl/vcs_useq.sv` | microcode sequencer |
| `rtl/vcs_top.sv` | whole system |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/vcs_sys_bench.sv`, `tb/tb_vcs_policies.sv` | a small system run once per replacement policy |
| `tb/vcs_ddr_model.sv` | behavioural DRAM behind its controller (22-cycle latency) |
| `tb/vcs_tb_pkg.sv` | memory contents used by the testbenches (a scramble of each word's address) |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends. For example,
the full system at its default size:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_vcs_top rtl/vcs_pkg.sv tb/vcs_tb_pkg.sv tb/tb_vcs_top.sv
./obj_dir/Vtb_vcs_top
```

Substitute any other `tb_*` name to test one module. The testbenches use
`$urandom` only, and variables are reset before use, so they run with
two-state simulation and random initial values.

`tb_vcs_top` runs the default configuration (4 × 32 × 512 words, LRU)
end to end, in a few seconds. A microprogram first sweeps both vectors of
every cache along k and j. This touches more lines than a cache holds, so
lines get evicted. Then it runs a block of random commands three times
through the loop branch. Every operand set is checked against a reference
model of the indexes and the memory contents. The testbench also requires
each mechanism to occur at least once: hits, misses, evictions, stalls,
contended arbitration, repeats, a taken branch, and all 14 commands. It also
checks one instruction per unstalled cycle.

`tb_vcs_policies` runs a smaller system (8 lines of 32 words per cache)
three times side by side, with FIFO, LRU and LFU, using the same program.
The LFU copy has 4-bit history registers so that the halving step is
reached. Every operand set is checked in all three. The unit testbenches check the
timing they depend on: one-cycle hits, a miss latency of `L + beats + 2`, a
16-cycle victim search, and the address appearing one cycle after its
command.
