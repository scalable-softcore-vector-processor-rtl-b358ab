# SVP — a softcore SIMD vector processor for biosequence streams

Sequence-comparison work such as Smith-Waterman alignment comes down to
filling large dynamic-programming matrices, cell by cell, under a few
max/add rules. Fixed-function accelerators do this fast but cannot be
reprogrammed for the next algorithm. The SVP (Softcore Vector Processor) keeps
the speed of a linear systolic array and is still programmable:

* one **instruction controller (IC)** fetches a program and broadcasts one
  instruction per cycle to a **linear array of 16-bit processing elements
  (PEs)** (SIMD);
* **register files sit between neighbouring PEs** and are shared by both of
  them. A value one PE writes is read by its neighbour on the next
  instruction, so the array works as a systolic pipeline without a separate
  interconnect;
* conditional code runs on a subset of PEs through an **8-bit block-mask
  register** in each PE (`bmsset` / `bmend`);
* constants and table base addresses live in **IC registers** and reach the
  PEs as broadcast immediates, which saves PE registers;
* a **memory controller** gives every PE and the IC access to a shared local
  memory made of replicated block RAM, and maps the **Stream In / Stream Out
  FIFOs** into the same address space, so a stream is read and written with
  ordinary `LD` / `ST`;
* several **Functional Units** can be chained, each applying one
  transformation to the stream.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). The default
configuration is one Functional Unit of 128 PEs.

## Block diagram

```
              +------------------------------------------------------------+
 prog_*  ---->| Instruction Controller  [instr_mem]   IC registers, loops  |
 start   ---->|                                                            |
              +----+--------------- broadcast (pe_bcast_t) ----------------+
                   |            |              |              |
              +----v---+   +----v---+     +----v---+     +----v---+
              | RF 0   |<->| PE 0   |<--->| RF 1   |<--->| PE 1   |<-> ... RF N_PE
              +--------+   +----+---+     +--------+     +----+---+
                                | LD/ST          (IC LD/ST)   |
              +-----------------v-----------------------------v--------------+
              |                   Memory Controller                          |
              +------+------------------------+----------------------+------+
                     |                        |                      |
              Stream In FIFO        Shared local memory       Stream Out FIFO
              (sin_*)               (replicated block RAM)    (sout_*)
```

`svp_system` chains `NUM_FU` such units: Stream Out of unit k feeds Stream In
of unit k+1.

## Files

| file | content |
|---|---|
| `rtl/svp_pkg.sv` | widths, opcodes, instruction structs, encoder functions |
| `rtl/svp_system.sv` | top: chain of Functional Units |
| `rtl/svp_functional_unit.sv` | one unit: IC, PE array, register files, memory controller, memories, FIFOs |
| `rtl/instruction_controller.sv` | fetch, IC-class execution, hardware loops, broadcast |
| `rtl/instr_mem.sv` | programmable instruction memory |
| `rtl/processing_element.sv` | ALU, block mask, memory request |
| `rtl/reg_file.sv` | register file shared by two neighbouring PEs |
| `rtl/memory_controller.sv` | parallel loads, serialised stores and stream accesses, IC stall |
| `rtl/shared_local_memory.sv`, `rtl/bram_1w2r.sv` | local memory as replicated dual-read block RAMs |
| `rtl/stream_fifo.sv` | Stream In / Stream Out FIFO |
| `tb/*.sv` | self-checking testbenches; `tb/svp_sw_pkg.sv` holds the Smith-Waterman and reduction programs and a reference model |

## Registers and neighbour communication

This is the part that makes the array systolic, and the one to understand
first.

There are `N_PE + 1` register files of 8 x 16-bit registers. File `k` sits
between PE `k-1` and PE `k`:

| PE `i` names | physical register |
|---|---|
| `r0` .. `r7`  | file `i`,   registers 0..7 (its left file) |
| `r8` .. `r15` | file `i+1`, registers 0..7 (its right file) |

So PE `i`'s `r8+k` is PE `i+1`'s `rk`. Because every PE executes the same
instruction, a write to `r9` moves a value one PE to the right in one
instruction, for the whole array at once, and no file ever gets two writes
in one cycle (a write to `r0..r7` only touches the left file, a write to
`r8..r15` only the right). Reads see the values from before the edge, so
`MOV r8, r0` is a clean shift of a whole row. File 0 is reached only by PE 0
and file `N_PE` only by the last PE; registers of file 0 that nobody writes
stay at their reset value 0, which programs use as the array's left boundary
and to tell PE 0 from the others.

Registers are 16 bits; all arithmetic compares are signed.

## Instruction set

32-bit words, bit 31 selects the class.

**PE class** (`bit 31 = 0`): `[30:26] op, [25:22] rd, [21:18] ra, [17:14] rb,
[13] b_imm, [12] imm_icreg, [11:0] imm`. Operand B is register `rb`, or, with
`b_imm`, the 12-bit literal sign-extended, or, with `imm_icreg` as well, the
IC register `imm[3:0]` broadcast by the IC.

| op | effect (only in active PEs unless noted) |
|---|---|
| `ADD SUB AND OR XOR` | `rd = ra op B` |
| `MAX MIN` | signed maximum / minimum |
| `SHL SHR` | shift left / arithmetic right by `B[3:0]` |
| `MOV` | `rd = B` |
| `LD` | `rd = mem[ra + B]` |
| `ST` | `mem[ra + B] = rd` |
| `BMSSET` | `mask = {mask[6:0], cond(ra, B)}`, condition code in the `rd` field: EQ NE LT GE GT LE — runs in every PE |
| `BMEND` | `mask = {1, mask[7:1]}` — runs in every PE |
| `NOP` | nothing |

**IC class** (`bit 31 = 1`): `[30:26] op, [25:22] rd, [21:18] rs, [15:0] imm`,
16 IC registers `icr0..icr15` (reset to 0).

| op | effect |
|---|---|
| `LI` | `icr[rd] = imm` |
| `ADDI` | `icr[rd] = icr[rs] + imm` |
| `JMP` | `pc = imm` |
| `BNZ` | `if (icr[rs] != 0) pc = imm` |
| `LOOP` | run the instructions `pc+1 .. imm` `icr[rs]` times (skip them if 0) |
| `LD` / `ST` | `icr[rd] = mem[icr[rs] + imm]` / `mem[icr[rs] + imm] = icr[rd]` |
| `HALT` | stop; `running` falls |

`svp_pkg` has encoder functions (`pe_rrr`, `pe_rri`, `pe_rrc`, `ic_enc`) that
the testbenches use as an assembler.

## Conditional execution with the block mask

Each PE has an 8-bit mask, all ones after reset, and is active while all
eight bits are one. `BMSSET` shifts the mask left and puts the comparison
result into bit 0; `BMEND` shifts it back, filling bit 7 with one. A block of
code between the two therefore runs only in PEs where the condition holds,
and blocks nest up to eight deep. Inactive PEs still execute `BMSSET` and
`BMEND` (their result no longer matters, since some bit is already 0), so the
nesting depth stays the same in all PEs. Inactive PEs write no register and
make no memory request.

## Memory map and the memory controller

Address `0xFFFF` is the stream port: `LD` pops a word from Stream In, `ST`
pushes one to Stream Out. Any other address selects local memory word
`addr[9:0]` (1024 words by default).

The PEs (requesters `0..N_PE-1`) and the IC (requester `N_PE`) raise their
requests in the same cycle. The controller then:

* serves **all local loads at once** — the memory is held in `ceil((N_PE+1)/2)`
  identical block-RAM copies with two read ports each, so every requester has
  its own port; data returns one cycle later;
* serves **local stores and all stream accesses one per cycle**, lowest
  requester index first (all copies share one write port; the FIFOs have one
  port). A stream load waits while Stream In is empty, a stream store while
  Stream Out is full. A stream load by all PEs therefore hands consecutive
  stream words to PE 0, PE 1, ... in order.

Addresses and store data are captured when the instruction issues. The IC
holds the instruction while `stall` is high:

| instruction | cycles |
|---|---|
| ALU, mask, IC register ops | 1 |
| `LD` from local memory (any number of PEs) | 2 |
| `ST` to local memory, or any stream access, by `k` active requesters | `1 + k` (+ cycles waiting on an empty / full stream) |
| `LD`/`ST` with no active PE | 1 |
| `LOOP`, taken `JMP` / `BNZ` | 2 |

## Instruction controller

Two stages: the instruction memory is read at `pc` (its output register is
the instruction register), and the next cycle the instruction executes in the
IC or is broadcast. The `LOOP` instruction pushes (start, end, count) on a
4-entry loop stack; the fetch stage jumps from the end address back to the
start with no lost cycle and pops the entry after the last pass. Nested loops
must end at different addresses.

Use: hold `rst_n` low, release it, write the program with `prog_we`/
`prog_addr`/`prog_data` (and `prog_fu` on `svp_system`), pulse `start`. Each
unit runs from address 0 until `HALT`. Stream words move on a valid/ready
handshake when both are high at a rising edge. `mc_stall` and `pe_active` are
status outputs.

## Example: Smith-Waterman

`tb/svp_sw_pkg.sv` contains a 39-instruction Smith-Waterman program (linear
gap penalty, match +2, mismatch -1, gap 1, scores held in IC registers). Each
PE holds one query character; the database streams through the array, and in
step `t` PE `i` scores database character `t-i`:

1. PE 0 alone (`BMSSET EQ` on its index register) pops the next character.
2. Every PE computes `H = max(0, diag + s, up - g, left - g)`, with the
   match/mismatch choice made by a `BMSSET EQ` block.
3. A nested block (`char != 0`, then `H > best`) updates the PE's best score.
4. `MOV r8, r0` and `MOV r9, r5` pass the character and `H` to the next PE.

One step is 19 instructions, 20 cycles. A query of `N` characters against a
database of `M` characters takes `M + N - 1` steps; at the end the best
scores go through local memory to Stream Out. With 128 PEs and a 96-character
database the schedule is 4997 cycles including array fill, drain and the
score write-out, plus any cycles spent waiting on the streams. For
long databases the rate approaches 7.5 million cell updates per second per
PE at 150 MHz (the clock frequency has not been checked by synthesis here).

## Parameters

| parameter | default | where |
|---|---|---|
| `NUM_FU` | 1 | `svp_system` |
| `N_PE` | 128 | `svp_system`, `svp_functional_unit` |
| `IMEM_DEPTH` | 1024 words | instruction memory |
| `MEM_WORDS` | 1024 words (per copy) | local memory |
| `FIFO_DEPTH` | 16 words | each stream FIFO |
| `LOOP_DEPTH` | 4 | hardware loop stack |
| `DATA_W` | 16 | `svp_pkg` |
| `RF_REGS` | 8 per file | `svp_pkg` |
| `MASK_W` | 8 | `svp_pkg` |
| `IC_REGS` | 16 | `svp_pkg` |

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/svp_pkg.sv tb/svp_sw_pkg.sv tb/tb_svp_system_full.sv \
  --top-module tb_svp_system_full -o sim
./obj_dir/sim
```

Replace the testbench for the others (`svp_sw_pkg.sv` is only needed by the
system-level ones).

| testbench | what it shows |
|---|---|
| `tb_svp_system_full` | default configuration (1 unit, 128 PEs): Smith-Waterman, every PE's score against a reference, exact cycle count |
| `tb_svp32_smith_waterman` | a 32-PE unit, 400-character database with free-running streams: scores, and the cycle count equal to the schedule (8773 cycles, 6.8 Mcell-updates/s per PE at 150 MHz) |
| `tb_svp_system` | two chained 16-PE units: Smith-Waterman in unit 0, maximum reduction in unit 1; counts every mechanism (stalls, empty/full streams, serialised stores, parallel loads, partial and nested masks, loop-back, fetch squash, IC memory access, unit-to-unit transfer) |
| `tb_svp_functional_unit` | one 128-PE unit, Smith-Waterman with throttled and free-running streams, exact cycle counts |
| `tb_instruction_controller` | nested/zero-count loops, branches, IC load/store, immediates, cycle count |
| `tb_processing_element` | random instructions and nested masks against a model |
| `tb_memory_controller` | serialisation order, parallel loads, stream waits, cycle counts |
| `tb_reg_file`, `tb_shared_local_memory`, `tb_stream_fifo`, `tb_instr_mem` | storage blocks against models |

## What is specified and what is chosen here

The architecture follows a published short description of the SVP: the
Functional Unit with IC, linear PE array and memory controller; instruction
memory in the IC; two instruction classes with an atomic loop; IC registers
broadcast as immediates; register files shared by adjacent PEs; `bmsset` /
`bmend` on an 8-bit mask whose AND switches the PE; MAX/MIN; 16-bit PEs;
128-PE (and 32-PE) arrays; replicated block RAM; memory-mapped stream FIFOs;
chained Functional Units.

Everything below is this design's own choice, because the description does
not go that far:

* the whole instruction encoding, the operation list beyond MAX/MIN, the
  condition codes and the IC instruction set;
* `bmsset` always shifts and writes the comparison result into bit 0 (the
  description says it "shifts and sets if the condition is satisfied"; read
  literally a false condition would not switch a PE off); `bmend` as the
  inverse shift;
* 8 registers per file, 16 IC registers, 1024-word memories, 16-word FIFOs,
  4-deep loop stack;
* the pipeline, stall handshake and cycle counts above; serialising stores
  and stream accesses (the description only says access is concurrent);
* the single stream address `0xFFFF` and the one-word-per-requester order;
* the shared (not distributed) local memory organisation, with two read
  ports per block-RAM copy;
* chaining with a direct valid/ready link and one common start.

Not covered: the published performance figures (Mcell-updates per PE)
depend on a program that is not available, so the included Smith-Waterman
program is a new one; the 150 MHz clock on a Virtex-4 LX200 was not checked;
the 8-bit, 256-PE variant is not provided as a configuration (`DATA_W` is a
package constant); host interfaces beyond the program-load port are not
modelled.
