# A small CGRA accelerator for microcontrollers

This is a coarse-grained reconfigurable array (CGRA). It is a memory-mapped
accelerator that sits on a microcontroller's system bus. It runs loop kernels
on a 4x4 mesh of 32-bit processing cells. Each cell has its own small
instruction memory, and every column of cells has its own program counter.
Kernels are not tied to fixed columns at compile time. A hardware
*synchronizer* places each requested kernel on whatever columns are free,
copies its instructions into those columns and starts them. Several kernels
can therefore share the array, and a request that does not fit waits in
hardware until columns are free.

The architecture follows a published open-hardware CGRA for edge computing.
That description gives:

- the 4x4 torus of cells and what each cell contains;
- the instruction word layout;
- the per-column program counters and the per-column DMA master ports;
- the auto-incrementing direct and the indirect loads/stores;
- the 3-cycle multiply;
- the 2 KiB context memory and the 15-entry kernel table;
- the 32-register synchronizer with performance counters.

It does not give the operation codes, the bus protocol, the register map, the
descriptor format, the scheduling policy or the stall rules. Those are this
design's own choices. Every such choice is listed in
[Design choices](#design-choices-not-fixed-by-the-original-description).

## Block structure

```
                 system bus (not part of this design)
   |  slave: sync regs   |  slave: kernel table  |  slave: context memory
   v                     v                       v
 cgra_sync  <------  cgra_kmem              cgra_ctx_mem (512 x 32)
   |  copy: one word/cycle  <------------------------'
   |  start / group / pointers
   v
 cgra_controller (one PC per column) <--> cgra_array (4x4 cgra_rc, torus)
                                              | per-cell load/store requests
                                              v
                                   cgra_dma x4 (one master port per column)
```

| File | Block |
|---|---|
| `rtl/cgra_pkg.sv` | Instruction fields, operation and select codes, bus structs, descriptor, register indices |
| `rtl/cgra_top.sv` | The accelerator. It wires everything below together. |
| `rtl/cgra_array.sv` | The N_ROWS x N_COLS cells with their torus links. It merges each column's busy, jump and exit requests. |
| `rtl/cgra_rc.sv` | One reconfigurable cell: operand muxes, ALU, multiplier, output register, 4-entry register file, load/store request |
| `rtl/cgra_alu.sv` | Single-cycle operations and jump conditions |
| `rtl/cgra_mul.sv` | 3-cycle multiplier |
| `rtl/cgra_prog_mem.sv` | 32-word private program memory, built from flip-flops |
| `rtl/cgra_controller.sv` | Per-column PCs: start, step, jump, exit, lock-step stalls |
| `rtl/cgra_dma.sv` | One column's master port: read and write pointers, arbitration among the column's 4 cells |
| `rtl/cgra_ctx_mem.sv` | Context memory: all kernels' instructions |
| `rtl/cgra_kmem.sv` | Kernel configuration table: 15 descriptors |
| `rtl/cgra_sync.sv` | Synchronizer: request queue, column allocation, copy, launch, retirement, registers, counters |

## The cell and its instruction word

Every cell executes one 32-bit instruction per cycle, taken from its own
program memory at its column's PC. The word has fixed fields, so there is no
decoder:

| Field | muxAsel | muxBsel | aluOp | rfSel | rfWe | muxFsel | imm |
|---|---|---|---|---|---|---|---|
| Bits | 31:28 | 27:24 | 23:18 | 17:16 | 15 | 14:12 | 11:0 |

**Operand sources** (muxAsel, muxBsel):

| Code | Source |
|---|---|
| 0 | zero |
| 1 | the cell's own output register |
| 2..5 | register-file entries 0..3 |
| 6 | top neighbour's output |
| 7 | left neighbour's output |
| 8 | bottom neighbour's output |
| 9 | right neighbour's output |
| 10 | `imm`, sign-extended |

Codes 11 to 15 give zero.

**muxFsel** picks whose output value the flag jumps test:

| Code | Output tested |
|---|---|
| 0 | the cell itself |
| 1 | top neighbour |
| 2 | left neighbour |
| 3 | bottom neighbour |
| 4 | right neighbour |

This lets a cell in one column branch on a value computed in the next
column. A kernel that spans several columns can then take the same jump in
every column.

**Operations** (aluOp):

| Code | Name | Effect |
|---|---|---|
| 0 | NOP | nothing |
| 1 | SADD | out = A + B |
| 2 | SSUB | out = A - B |
| 3 | SMUL | out = A * B, low 32 bits, 3 cycles |
| 4 | SLL | out = A << B[4:0] |
| 5 | SRL | out = A >> B[4:0], logical |
| 6 | SRA | out = A >>> B[4:0], arithmetic |
| 7 | LAND | out = A & B |
| 8 | LOR | out = A \| B |
| 9 | LXOR | out = A ^ B |
| 16 | BEQ | jump to imm if A == B |
| 17 | BNE | jump to imm if A != B |
| 18 | BLT | jump to imm if A < B, signed |
| 19 | BGE | jump to imm if A >= B, signed |
| 20 | BZF | jump to imm if the muxFsel value is zero |
| 21 | BSF | jump to imm if the muxFsel value is negative |
| 22 | JUMP | jump to imm |
| 32 | LWD | out = load from the column read pointer, which then advances 4 bytes |
| 33 | SWD | store A at the column write pointer, which then advances 4 bytes |
| 34 | LWI | out = load from address A |
| 35 | SWI | store B at address A |
| 63 | EXIT | the column stops |

An operation that produces a result writes the output register. If rfWe is
set, it also writes register-file entry rfSel. NOP, jumps, stores and EXIT
leave the output register unchanged.

An indirect access takes its address from operand A. The address can
therefore come from a register, a neighbour or the immediate. The cell keeps
that address in a dedicated address register for the whole transfer.

A neighbour operand is the neighbour's output register as it was at the start
of the cycle. All cells commit at the same clock edge, so a value moves one
cell per cycle.

## Execution model: columns, stalls and lock-step

This section matters most for anyone writing kernels or changing the
control logic.

- **One PC per column.** The controller keeps a PC and a running flag for
  each column. On a start pulse the PC goes to 0. On each *advance* the PC
  moves to PC+1, or to the jump target if a cell of the column jumps. If more
  than one cell jumps, the lowest row's target wins. EXIT from any cell stops
  the column.
- **Commit only on advance.** Cells write their results only in a cycle in
  which the column advances. A single-cycle instruction such as
  `out = out + x` is therefore never applied twice while the column waits.
- **Busy cells.** A cell is busy in two cases. A multiply is busy in its
  first two cycles and commits in the third. A load or store is busy until
  the column DMA answers it; it can commit in the same cycle as the answer.
- **Lock-step groups.** At launch the synchronizer gives every column of a
  kernel the same group tag: the physical number of its first column. A
  column stalls whenever any running column with the same tag has a busy
  cell. The columns of one kernel thus keep equal PCs, which
  modulo-scheduled code spread over several columns relies on. Kernels in
  other groups keep running.
- **Jumps in multi-column kernels.** Every column executes its own copy of
  the jump instruction. If the condition lives in another column, use
  BZF/BSF with muxFsel pointing at that neighbour (see the two-column kernel
  in `tb/tb_cgra_top.sv`).

Cycle costs at the cell:

| Instruction | Cycles |
|---|---|
| simple operation or jump | 1 |
| SMUL | 3 |
| load or store | 1 + bus wait + response latency |

Several loads or stores of one column in the same cycle are served one after
another, lowest row first. Direct accesses issued together therefore get
consecutive addresses in row order.

## Memory access: the column DMA

Each column has one bus master port. Its DMA holds a read pointer and a
write pointer, which the synchronizer loads when the kernel starts. Direct
accesses (LWD/SWD) use the read or write pointer and advance it by 4 bytes.
Indirect accesses (LWI/SWI) use the cell's address. There is one transfer in
flight per column. The four columns' ports are independent, so they can
transfer in parallel if the system bus allows it.

**Bus protocol** (all ports; structs `bus_req_t` / `bus_rsp_t`):

- The master raises `req` with `addr`, `we`, `be` and `wdata`, and holds
  them until `gnt`. An assertion in `cgra_dma` checks this.
- The slave answers every granted transfer, read or write, with a one-cycle
  `rvalid`. For reads, `rdata` comes with it.
- The CGRA's own slave ports grant at once and answer in the next cycle.
- The REQ register is the one exception: a write to it is not granted while
  an earlier request is still waiting for columns.

## Kernel life cycle

1. **Write the instructions into the context memory.** It holds 512 words
   (2 KiB). A kernel of *n* columns and *k* instructions per cell takes
   `n*k*4` consecutive words, starting at word *s*. Word
   `s + (c*k + i)*4 + r` is instruction *i* of the cell in row *r* of the
   kernel's *c*-th column. All kernels together can therefore use
   `sum(n*k) <= 128`.
2. **Write the descriptor** into the kernel table at byte address `4*ID`
   (ID 1..15). Fields: bits [2:0] = *n*, [12:4] = *s*, [21:16] = *k*. An
   entry with *n* = 0 is empty. ID 0 always reads as zero.
3. **Write the pointers** (synchronizer registers RD_PTR0..3 and
   WR_PTR0..3). They are indexed by the kernel's own columns, because the
   physical columns are not known yet.
4. **Write the ID to REQ.** The pointer values are captured with the
   request, so the CPU may prepare the next request at once.
5. **Placement.** The synchronizer looks for *n* adjacent free columns,
   counted modulo 4 because the torus wraps. It tries start columns
   0, 1, 2, 3 in that order. If none fit, the request waits and the WAIT
   counter runs.
6. **Copy and launch.** Once placed, the kernel is copied at one word per
   cycle. Its columns start `n*k*4 + 2` cycles after the request is
   accepted, all in the same cycle, with PC 0. Their DMA pointers are loaded
   at the same time.
7. **Completion.** When every column of the kernel has executed EXIT, the
   columns are freed, DONE bit *ID* is set and KCOUNT is incremented.

A request for an empty or malformed descriptor is dropped and sets STATUS
bit 1. A malformed descriptor has zero columns, more than 4 columns, zero
instructions or more than 32 instructions, or its words (start + columns x
instructions x 4) run past the end of the context memory.

### Synchronizer registers (byte address = 4 x index)

| Index | Name | Access |
|---|---|---|
| 0 | REQ | write: kernel ID to run; read: waiting ID, or 0 |
| 1 | STATUS | [0] request waiting; [1] bad request dropped (write 0 to clear); [7:4] allocated columns; [11:8] running columns |
| 2 | DONE | bit *k*: kernel *k* finished; write 1 to clear |
| 3 | PERF_CTRL | write bit 0 = 1 to clear all counters |
| 4..7 | RD_PTR0..3 | read address of the kernel's column 0..3 |
| 8..11 | WR_PTR0..3 | write address of the kernel's column 0..3 |
| 12 | CYCLES | cycles with any column running |
| 13 | KCOUNT | kernels completed |
| 14 | WAIT | cycles a request waited for columns |
| 16..19 | COL_ACT0..3 | cycles each physical column was running |
| 20..23 | COL_STALL0..3 | cycles each physical column was stalled |

The other indices read as zero.

## Parameters

`cgra_top` has these parameters. The defaults are the original design's
sizes.

| Parameter | Default | Meaning |
|---|---|---|
| N_ROWS | 4 | cells per column |
| N_COLS | 4 | columns, and DMA ports. The register map has room for 4. |
| PM_DEPTH | 32 | instructions per cell |
| CTX_WORDS | 512 | context memory words (2 KiB) |
| N_KERNELS | 15 | kernel table entries |

The descriptor's field widths limit how far these can grow: 3 bits of column
count, 9 bits of start word and 6 bits of instruction count.
`tb_cgra_resized` runs the whole accelerator at 2 rows x 3 columns with
16-instruction program memories and a 128-word context memory.

## Design choices not fixed by the original description

- The operation set and its codes, the select codes, the flag tests BZF/BSF
  and the meaning of muxFsel. Only the field positions are given. muxFsel is
  read here as the flag-source multiplexer.
- Zero and the immediate as operand sources. Which operand a store writes.
  The indirect address taken from operand A.
- A multiply keeps the low 32 bits of the product. Its three cycles are
  split into an operand register, a product register and the commit.
- The commit-on-advance rule and the lock-step stall of a kernel's columns.
- The bus protocol. The CGRA's slave ports are separate; the system bus
  decodes addresses between them.
- The context memory has one bus port and one read port for the
  synchronizer. The original builds it from SRAM macros; here it is an
  inferred memory array.
- Run-time placement uses adjacent columns with wrap-around, first fit.
  There is one waiting request. Pointers are captured per request. The
  descriptor layout and the context-memory layout are this design's own.
- The register map, and which performance counters exist.
- Reset is active-low and asynchronous. It clears all control state, the
  program memories and the kernel table, but not the context memory.

Not included: the host microcontroller, its bus and memory, and the software
tools that build kernels (assembler, mapping compiler, C library). A kernel
written for the original tool flow will not run here unchanged, because the
operation codes differ.

## Verification

Every block has a self-checking testbench in `tb/`. Each one ends with
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_cgra_top` | Full default-size system, end to end. It runs: vector add with two direct loads per cycle and a BNE loop; two concurrent copies of a dot product using indirect loads, the multiplier and an indirect store; a two-column kernel that must wait for columns and lands on columns 3 and 0 across the wrap. It also checks the copy latency, all performance counters, the error bit, transfers on several column master ports in the same cycle, and that every mechanism occurred. |
| `tb_cgra_capacity` | The context memory filled to its limit: one 4-column kernel of 32 instructions per cell (512 words), checked against a cycle-level model of the array. |
| `tb_cgra_branch` | If/else kernels at the default size, on two columns at once: absolute value (BSF on the cell's own value, JUMP) and a clamp to 100 (BLT against a register, JUMP), each in a BNE loop. Checks results and the number of taken jumps per column. |
| `tb_cgra_resized` | The same kind of kernel on a 2 x 3 torus with smaller memories, to check that the sizes really are parameters. It is the only testbench that overrides `cgra_top` parameters. |
| `tb_cgra_rc` | Every operand source, register-file writes, multiply timing, all four memory operations, taken and not-taken flag jumps, EXIT. |
| `tb_cgra_array` | Every cell's four neighbours, including the wrap links. Jump merging and multiply stall per column. |
| `tb_cgra_controller` | Random stimulus against a reference model: groups, stalls, jumps, exits. |
| `tb_cgra_dma` | Arbitration order, pointer stepping, indirect addresses, data, with a random-wait-state memory. |
| `tb_cgra_sync` | Placement (including wrap and waiting), copied words, latency, pointers, registers, counters. |
| `tb_cgra_alu`, `tb_cgra_mul`, `tb_cgra_prog_mem`, `tb_cgra_ctx_mem`, `tb_cgra_kmem` | Unit checks against reference values. |

`tb/tb_bus_mem.sv` is a behavioural main memory with random wait states,
shared by the testbenches.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cgra_pkg.sv tb/tb_cgra_top.sv \
          --top-module tb_cgra_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Substitute any testbench name. Verilator finds the other files through `-I`.
The full system test runs at the default sizes in well under a second.

## Known limits

- The design has been simulated only. It has not been synthesized to a
  technology library or timed. The original design reports 250 MHz and
  about 0.4 mm² in 65 nm; no such figure has been established for this RTL.
- The program memories are flip-flops with reset (16 x 32 x 32 bits), so
  the array dominates the flip-flop count, as in the original.
- A column's DMA has one transfer in flight. Back-to-back accesses cost at
  least two cycles each, plus bus wait states.
