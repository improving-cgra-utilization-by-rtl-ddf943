# Paged CGRA: one coarse-grained array shared by several threads

A coarse-grained reconfigurable array (CGRA) is a grid of simple processing
elements (PEs). Every cycle, each PE runs one instruction from a local
instruction memory. A compiler software-pipelines a loop kernel onto the grid
in space and time. The result is fast and power-efficient, but one kernel rarely
keeps the whole grid busy. A normal CGRA still runs only one thread at a time,
so the idle PEs are wasted.

This design makes the array shareable. The grid is cut into identical
**pages** of 4 PEs. Each kernel is compiled for a ring of pages, and at run time
the host CPU moves that schedule onto however many pages are free. Several
threads then run side by side on disjoint sets of pages. In hardware terms, each
page has its own instruction counter, instruction memory and load/store bus.
Pages started in the same cycle run in lock-step as one schedule. Pages started
separately run independently.

The architecture follows J. Pager, *Improving CGRA Utilization by Enabling
Multi-threading for Power-efficient Embedded Systems* (M.S. thesis, Arizona
State University, 2011). That work is mostly about software: a GCC-based
compiler flow, a page-constrained mapper, and a run-time transform it calls
Pagemaster. It describes the target hardware only at block level, as an
ADRES-like array. The RTL here builds that target hardware. Every encoding,
width and interface is this design's own; they are marked as such below.

## Array and pages

```
 column:   0     1     2    ...    7
 row 0   [PE]--[PE]--[PE]- ... -[PE]    pages 0..7   (rows 0-3, one per column)
 row 1   [PE]--[PE]--[PE]- ... -[PE]
 row 2   [PE]--[PE]--[PE]- ... -[PE]
 row 3   [PE]--[PE]--[PE]- ... -[PE]
 row 4   [PE]--[PE]--[PE]- ... -[PE]    pages 8..15  (rows 4-7)
  ...
```

* The default is 8×8 PEs with 4 PEs per page, which gives 16 pages. This is
  the configuration of the thesis's optimized system.
* A page is `PAGE_PES` vertically adjacent PEs of one column. This is the
  single-PE-wide division the thesis uses. With it, schedules can be moved
  between pages by plain translation, with no mirroring. PE (r, c) is slot
  `r % PAGE_PES` of page `(r / PAGE_PES) * COLS + c`.
* Every PE reads the output registers of its N, S, E and W neighbours. The mesh
  is uniform and symmetric, so any page looks the same as any other. This is
  what makes schedules relocatable.
* There is **no wrap-around link**. The compiler may assume a ring of pages
  (last page feeding the first). The run-time transform always removes that
  assumption, so the hardware does not need the link. A link that would leave
  the array reads zero.
* Nothing isolates one thread's pages from another's. A PE can read a
  neighbour on a page that belongs to a different thread. Keeping schedules
  inside their own pages is the job of the compiler and the transform.

## Processing element (`cgra_pe`)

```
 N S E W self RF imm MEM 0          N S E W self RF imm MEM 0
        \  mux A  /                        \  mux B  /
             \________________  _______________/
                              FU ------------------------> bus request (LD / ST_ADDR / ST_DATA)
                               |
                 +-------------+-------------+
                 v                           v
          output register            rotating RF (8 x 32)
       (to neighbours, to self)
```

* **Operand multiplexers.** Each of the two selects one of: a neighbour, the
  PE's own output register, the register file, a sign-extended 12-bit
  immediate, this page's load data, or zero.
* **Functional unit (`cgra_fu`).** It combines an integer ALU (`ADD SUB AND OR
  XOR SLL SRL SRA SLT SLTU PASS`) with a complex ALU (`MUL DIV REM`). All
  operations take one cycle. Division by zero gives all ones and the remainder
  by zero gives the dividend. Arithmetic is unsigned except `SRA` and `SLT`.
* **Output register.** It is written by every computing operation. It holds
  its value on `NOP`, on memory operations, and while the page is idle, so it
  also serves as a one-cycle (or longer) buffer for the PE itself.
* **Rotating register file (`cgra_rotating_rf`)** (8 entries). See the next
  section.

## Rotating register file

The register file is indexed through a rotating base:
`physical = (logical + base) mod 8`. The base steps down by one at the end of
every kernel iteration, in the cycle the page executes `loop_end`. As a result,
a value written as `r[k]` in iteration *i* is read as `r[k+1]` in iteration
*i + 1*, and as `r[k+2]` one iteration after that.

This is how a software-pipelined loop keeps values of overlapping iterations
apart. It is also how a transformed schedule holds a value that the original
schedule passed to a neighbouring page "next cycle", when that page now runs
later. The thesis reserves these registers for that purpose and keeps the
mapper from using them.

* A write lands at the clock edge.
* A read in the same cycle sees the old value.
* The base is cleared only by reset. A kernel that needs an initial value in a
  register writes it in its prologue.

## Instruction word (`cgra_pkg::pe_instr_t`, 32 bits)

| field      | bits | meaning                                        |
|------------|------|------------------------------------------------|
| `op`       | 5    | operation, `op_e`                              |
| `src_a`    | 4    | operand A source, `src_e`                      |
| `src_b`    | 4    | operand B source                               |
| `rf_we`    | 1    | also write the FU result to `r[rf_waddr]`      |
| `rf_waddr` | 3    | logical RF write index                         |
| `rf_raddr` | 3    | logical RF read index (the RF operand source)  |
| `imm`      | 12   | signed immediate                               |

The encodings are listed in `rtl/cgra_pkg.sv`. An instruction memory word
holds one such instruction per PE of the page.

## Page sequencer (`cgra_page_seq`)

Each page has a program window, `page_cfg_t`:

```
base .. loop_start-1        prologue, once
loop_start .. loop_end      kernel, iters times   (iters = 0 counts as 1)
loop_end+1 .. last          epilogue, once
```

* `start_mask` is a one-cycle pulse that starts every marked page in the same
  cycle.
* A page runs one instruction per cycle, with no stalls. The schedule is
  entirely static, so each page is busy for exactly
  `(last - base + 1) + (iters - 1) * (loop_end - loop_start + 1)` cycles.
* When a page finishes, `busy` falls and the sticky `done` rises. `done` is
  cleared by the next start.
* The window must not be rewritten while the page runs.

A schedule spread over several pages has the same window written to each of
them, and they are started with one `start_mask`. They then stay in lock-step,
which the top-level testbench checks.

## Memory

### Page buses and two-PE stores

Each page has one load/store bus, and one memory access per bus per cycle.
Inside a page:

* **Load.** One PE issues `LD` with address `A + B`. The word arrives on the
  page's load data one cycle later. In that cycle, any PE of the page can take
  it with source `MEM`. The loading PE's own output register is not written.
* **Store.** This takes two PEs of the page in the same cycle. One issues
  `ST_ADDR` (address `A + B`), the other `ST_DATA` (data `A`). This mirrors the
  target architecture of the thesis, where a store needs the address and the
  data from two PEs of the same column.
* **Rule breaks.** These are: two address drivers, two data drivers, or one
  half of a store without the other. A rule break raises that page's sticky
  `bus_error` and a simulation warning. The lowest-numbered PE wins, and an
  incomplete store is dropped.

Addresses are word addresses, truncated to the memory's 14 bits.

### Data memory (`cgra_dmem`)

* Size: 16384 × 32-bit words, which is 64 KB. This is the memory size of the
  thesis's system study.
* Ports: one port per page bus, plus a last port for the host or DMA engine.
* Reads are synchronous: data is available the next cycle.
* If several ports write the same address in one cycle, the highest port wins.

### Instruction memories (`cgra_imem`)

There are 64 words per page, written one PE slot at a time from the host, and
read combinationally by the page's counter.

## A worked kernel

This is the `pair sum` kernel of `tb/tb_cgra_top.sv`, on one page, with II = 5.
It computes `C[i] = s[i] + s[i-1]`, where `s[i] = A[i] + B[i]`. The slots are
rows of one column, so slot *k* is north of slot *k+1*.

| word | slot 0 (i)     | slot 1 (addresses)   | slot 2 (compute)                   | slot 3          |
|------|----------------|----------------------|------------------------------------|-----------------|
| 0    | `i = 0`        |                      | `r1 = 0`                           |                 |
| 1    |                | `LD N + A`           |                                    |                 |
| 2    |                | `LD N + B`           | `out = MEM` (A[i])                 |                 |
| 3    |                |                      | `out = self + MEM`, `r0 = out` (s) |                 |
| 4    |                |                      | `out = self + r1` (s[i-1])         |                 |
| 5    | `i = i + 1`    | `ST_ADDR N + C`      |                                    | `ST_DATA N`     |
| 6    |                | `ST_DATA N` (i)      | `ST_ADDR 0 + mark`                 |                 |

Word 0 is the prologue, words 1–5 are the kernel, and word 6 is the epilogue.

* The value `s` written as `r0` in word 3 is read back as `r1` one iteration
  later, because the RF rotates.
* In word 5, slot 1 reads `i` from slot 0 in the same cycle in which slot 0
  increments it. Registers update at the clock edge, so slot 1 still sees the
  old `i`.

## What stays in software

Splitting a kernel into page-constrained schedules is software. So is the
Pagemaster transform that re-places an N-page schedule onto M ≤ N pages,
where the kernel then takes at least II × ⌊N/M⌋ cycles per iteration. That
transform also redirects links to the same page, and inserts register-file
hops where a dependence now spans more than one cycle. It is done on the host
CPU, in time linear in the schedule length, before the instructions are
loaded. The hardware only has to provide what that transform relies on:

* identical pages and a symmetric mesh;
* registers the mapper leaves free;
* per-page program control.

The host processor, main memory and the DMA channels are also outside this
RTL. Their access is the `imem_*`, `cfg_*`, `start_mask`, `busy`/`done` and
`host_*` ports of `cgra_top`.

## Parameters

| parameter    | default | origin                                         |
|--------------|---------|------------------------------------------------|
| `ROWS`, `COLS` | 8, 8  | thesis (8×8 optimized system)                  |
| `PAGE_PES`   | 4       | thesis (preferred page size); must divide `ROWS` |
| `IMEM_DEPTH` | 64      | own choice                                     |
| `DMEM_WORDS` | 16384   | thesis (64 KB)                                 |
| `DATA_W`, `RF_DEPTH`, `IMM_W` (package) | 32, 8, 12 | own choice    |

## Departures and limitations

* **Per-page instruction memory, counter and bus.** The thesis draws one
  instruction memory and one counter, and a load bus per column. Splitting
  them per page is this design's way of letting unrelated schedules run at
  once. It also keeps two pages that share a column (in the 8×8, 4-PE
  configuration) from competing for one bus.
* **Page geometry.** Only column-segment pages are supported. The thesis also
  evaluates a 6×6 array with 4-PE pages without saying how it is divided. That
  configuration cannot be built here, because `PAGE_PES` must divide `ROWS`.
* **Data memory.** It is modelled as a multi-ported word array, which is
  functional but not a realistic SRAM macro. A banked memory with arbitration
  would be the next step.
* **Single-cycle operations.** Single-cycle multiply and divide are
  assumptions. A real implementation would pipeline them, and the schedules
  would have to follow.
* **Not included:** predication (mentioned in the thesis only as future work),
  thread isolation between pages, and any hardware version of the transform.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench             | what it shows                                                        |
|-----------------------|----------------------------------------------------------------------|
| `tb_cgra_fu`          | every operation against a 64-bit reference, corners and random       |
| `tb_cgra_rotating_rf` | random traffic against a model, plus `r[k]` → `r[k+1]` after rotate  |
| `tb_cgra_pe`          | each operand source, hold behaviour, RF rotation, bus requests       |
| `tb_cgra_page_seq`    | pc sequence and run length for four window shapes, rotate pulses     |
| `tb_cgra_imem`        | slot-wise writes, full read-back                                     |
| `tb_cgra_page_bus`    | load, two-PE store, each rule break, sticky error                    |
| `tb_cgra_dmem`        | random multi-port traffic against a shadow array                     |
| `tb_cgra_array`       | mesh links, zero edges, page numbering, per-page enable and load data |
| `tb_cgra_top`         | full-size end-to-end run (see below)                                 |
| `tb_cgra_workloads`   | three benchmark kernels sharing the full-size array (see below)      |
| `tb_cgra_threads`     | 32 queued threads placed on free pages, full size (see below)        |

**`tb_cgra_top`** runs four threads at once at the default size:

* two single-page kernels;
* one lock-step two-page kernel that passes data over the mesh;
* one deliberately broken store.

It checks every result word, each page's cycle count, and the `done` and
`bus_error` flags. It also counts every mechanism: loads, stores, loop-backs
and rotations, overlapping threads, lock-step cycles, cross-page transfers,
and bus-error detection.

**`tb_cgra_workloads`** runs three kernels from the thesis's benchmark set at
the same time:

* First Difference, on one page;
* Tri-Diagonal Elimination, on one page;
* the matrix-matrix product, on two pages.

The matrix-product statement comes from the thesis. The first two loop bodies
are the standard Livermore-loop forms.

**`tb_cgra_threads`** models a paging system on the host side. 32 threads
queue for the 16 pages. Half of them are one-page kernels and half are
two-page kernels that need neighbouring pages in one page row. A thread is
placed on the first free pages, its image is written there, and the pages are
released when `done` rises. Threads wait when no pages fit. The same image
runs on whichever pages it gets. The test checks every result word and counts
the peak number of threads at once (about 11), the cycles threads waited, and
how many different pages each kernel ran on. It also measures useful
utilization: PE-cycles with a real operation on a running page, divided by all
PE-cycles of the running pages. The measured count must match the count
worked out from the two schedules exactly. It comes to about 29% for these
small hand schedules.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/cgra_pkg.sv tb/tb_cgra_top.sv \
          --top-module tb_cgra_top -Mdir obj_top && obj_top/Vtb_cgra_top
```

The full-size testbenches finish in well under a second.
