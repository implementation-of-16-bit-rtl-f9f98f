# 16-bit four-stage pipelined RISC processor

A small load/store processor with 16-bit words, eight 16-bit registers and
fixed 16-bit instructions. Execution is split into four stages so that,
without stalls, one instruction finishes every clock:

```
        +-----------+   +-----------+   +-----------+   +--------------+
 PC --> | 1 fetch   |-->| 2 decode  |-->| 3 execute |-->| 4 memory/IO  |--+
        | PC, IF/ID |   | reg file, |   | ALU,shift,|   | load/store,  |  |
        +-----------+   | ID/EX     |   | move-imm, |   | in/out port, |  |
             ^          +-----------+   | branch,   |   | MEM/WB       |  |
             |               ^          | EX/MEM    |   +--------------+  |
   prefetch buffer           |          +-----------+                     |
   (4 words)                 +------- register file write <---------------+
             \__________ one shared external memory bus ___________/
```

The design is an RTL rendering of a published VHDL teaching processor: its
block structure (fetch, decode, execute and memory/write-back stages; control,
hazard detection, forwarding, prefetch and interrupt units), its
four-word prefetch buffer, six vectored interrupts, overflow and
undefined-instruction exceptions, JAL/RJAL subroutine linkage in a register,
and the next-PC select codes and exception vectors come from that design. The
instruction encoding, the bus timing and the exact hazard, priority and
interrupt rules were not available from it and are this design's own; the
section "What is taken from the original and what is not" lists them.

## Pipeline registers and timing

| register | written at the end of | holds |
|----------|----------------------|-------|
| PC       | fetch  | address of the next instruction to fetch |
| IF/ID    | fetch  | instruction, its address + 1 (`pc1`), valid |
| ID/EX    | decode | control word, both source register contents, immediates, `pc1`, destination |
| EX/MEM   | execute | result (or load/store address), store data, destination, memory and port controls |
| MEM/WB   | memory/IO | write-back data, register, enable; drives the register file write port |

The first instruction after reset is in MEM/WB four clocks after it was
fetched; its register is written at the following edge. The register file
returns a value being written in the same cycle, so no fifth hazard window
appears. A bubble is an IF/ID or ID/EX entry with `valid` low and the NOP
control word; a flushed IF/ID holds the instruction word 0000H, which is NOP.

## Instruction set

Fields: opcode `[15:12]`, destination `rd [11:9]`, source `rs1 [8:6]`,
source `rs2 [5:3]`, function `[2:0]`; `imm6 = [5:0]` (sign extended),
shift amount `[4:1]`, `imm8 = [8:1]`. Relative branch targets are
`pc1 + sext(imm8)`, where `pc1` is the address of the branch + 1.

| op | mnemonic | operation |
|----|----------|-----------|
| 0 | `NOP` (func 0), `ADD SUB AND OR XOR NOR NOT` (func 1..7) | `rd <- rs1 op rs2` (`NOT`: `~rs1`) |
| 1 | `ADDI rd, rs1, imm6` | `rd <- rs1 + imm6` |
| 2 | shift `rd, rs1, n` | `{bit5,bit0}`: 0 SLL, 1 SRL, 2 SLA, 3 SRA by `[4:1]` |
| 3 | `MVI rd, imm8, h` | bit 0 = 0: `rd[7:0] <- imm8`; 1: `rd[15:8] <- imm8`; the other byte is kept |
| 4 | `LOAD rd, imm6(rs1)` | `rd <- mem[rs1 + imm6]` |
| 5 | `STORE rd, imm6(rs1)` | `mem[rs1 + imm6] <- rd` (the data register sits in the `rd` field) |
| 6 | `IN rd` | `rd <- in_port` |
| 7 | `OUT rs1` | `out_port <- rs1` |
| 8 / 9 | `BZ r, imm8` / `BNZ r, imm8` | branch if `r[11:9]` is / is not zero |
| A | `BR imm8` | branch always (relative) |
| B | `JMP rs1` | `PC <- rs1` (absolute branch) |
| C | `JAL rd, imm8` | `rd <- pc1`; relative branch |
| D | `RJAL rs1` | `PC <- rs1` (return from subroutine) |
| E | `EI` (0), `DI` (1), `RETI` (2) | interrupt enable / disable / return |
| F, E with func 3..7 | undefined | undefined-instruction exception |

`ADD`, `SUB` and `ADDI` raise the overflow exception on signed overflow;
address arithmetic of `LOAD`/`STORE` does not. The encoders in
`tb/tb_isa_pkg.sv` assemble every instruction.

## Control transfers, exceptions and interrupts

All changes of flow are decided when the instruction is in the execute stage,
where its register operands are already forwarded. The control unit then
drives the fetch stage's PC select `opc` and flushes IF/ID and ID/EX, so a
taken branch, jump or return costs two cycles; a not-taken conditional branch
costs nothing. There is no branch prediction.

| `opc` | next PC |
|-------|---------|
| 0 | PC + 1 (PC holds if the prefetch buffer misses) |
| 1 | branch target (`BZ`, `BNZ`, `BR`, `JMP`, `JAL`) |
| 2 | return from subroutine (`RJAL`, register content) |
| 3 | return from interrupt (`RETI`, saved address) |
| 4 | overflow vector FFFFH |
| 5 | undefined-instruction vector FFF0H |
| 6 + k | interrupt k vector, 0008H + 2k (0008H, 000AH, ... 0012H) |

Reset (synchronous, active high) has top priority and starts at 0000H with
interrupts disabled. Then, for the instruction in execute: overflow,
undefined instruction, a pending enabled interrupt, and finally its own
branch. An exception cancels the faulting instruction and saves the address
after it, so `RETI` resumes behind it. An interrupt is accepted only when the
execute stage holds a real instruction; it cancels that instruction and saves
its own address, so it runs again after `RETI`. Because the later stages
change state only from EX/MEM on, a cancelled instruction leaves no trace.
Accepting an interrupt or an exception disables interrupts; `RETI` and `EI`
enable them, `DI` disables them. There is one return-address register, so
handlers do not nest.

Interrupt lines request on a rising edge; the request stays pending until it
is accepted. Line 0 has the highest priority. The matching `irq_ack` bit
pulses for one clock after acceptance. The vector at FFFFH is a single word,
so it must hold a branch to the real handler (the relative offset wraps
through 0000H).

## Data hazards: forwarding and the one stall

The forwarding unit feeds each execute-stage operand from EX/MEM (the previous
instruction) or MEM/WB (the one before), the nearer one first. `LOAD` and
`IN` have their value only in stage 4, so an instruction that reads their
destination right behind them is held in decode for one clock while a bubble
enters execute; after that MEM/WB forwarding covers it. That is the only
interlock: every other back-to-back dependence runs at full speed. A
redirect overrides the stall.

## Prefetch buffer and the shared bus

The processor has one external memory bus. Stage 4 owns it when it loads or
stores; in every other cycle the prefetch unit reads one instruction word. The
buffer holds four words with their addresses and is searched by address, not
read in FIFO order. Each free cycle it reads the first address of
PC .. PC+3 it does not hold, into an empty entry or one whose address has
left that window. When the word read is the one at PC it also goes straight
to the fetch stage, so straight-line code runs at one instruction per clock
from an empty buffer. The buffer runs ahead whenever the fetch stage is held
(stalls, flushes) and then covers cycles in which loads and stores take the
bus; a fetch that finds neither a buffered word nor a free bus puts a bubble
into IF/ID. A store to a buffered address invalidates that entry, so
self-modifying code stays coherent.

## Interface of `risc_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `mem_addr` | out | 16 | address lines (stage 4 if it accesses memory, else prefetch) |
| `mem_wdata` | out | 16 | store data |
| `mem_rdata` | in | 16 | read data, expected combinationally in the same cycle |
| `mem_re`, `mem_we` | out | 1 | read and write strobes; the memory writes on the rising edge |
| `in_port` | in | 16 | sampled when `IN` is in stage 4 |
| `out_port` | out | 16 | register loaded by `OUT` in stage 4; 0000H after reset |
| `irq` | in | 6 | interrupt requests (rising edge) |
| `irq_ack` | out | 6 | one-clock acknowledge |

Parameters: `PF_DEPTH` (4) and `N_IRQ` (6). The fetch stage's vectors and
reset PC are parameters of `fetch_stage`. Two assertions in `risc_top` state
the bus rules: the prefetcher never reads while stage 4 owns the bus, and a
load and a store never share a cycle.

## Files

| file | content |
|------|---------|
| `rtl/risc_pkg.sv` | widths, opcodes, ALU codes, control word and pipeline register structs |
| `rtl/risc_top.sv` | the processor |
| `rtl/fetch_stage.sv` | PC, PC incrementer, PC selector, IF/ID |
| `rtl/decode_stage.sv` | read-register select, register file, immediates, ID/EX |
| `rtl/register_file.sv` | 8 x 16 registers, two read ports, write-through |
| `rtl/execute_stage.sv` | forwarding muxes, ALU, branch unit, JAL mux, EX/MEM |
| `rtl/alu.sv` | basic ALU, shift unit, move-immediate unit, overflow |
| `rtl/branch_unit.sv` | absolute / relative branch target |
| `rtl/memwb_stage.sv` | memory access, write-back select, output port, MEM/WB |
| `rtl/control_unit.sv` | decoder and next-PC / flush / exception logic |
| `rtl/hazard_detection_unit.sv` | load/input-use stall |
| `rtl/forwarding_unit.sv` | operand forwarding selects |
| `rtl/prefetch_unit.sv` | four-word address-tagged instruction buffer |
| `rtl/interrupt_unit.sv` | pending requests, priority, enable flag, return address |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_isa_pkg.sv` | instruction encoders for the testbenches |
| `tb/tb_ref_pkg.sv` | instruction-level reference model of the processor |
| `tb/tb_risc_random.sv` | random-program test of the whole processor |

## Simulating

Every testbench ends with a line `TB_RESULT checks=N failures=M`. With
Verilator 5, from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/risc_pkg.sv tb/tb_risc_top.sv --top-module tb_risc_top -o sim
obj_dir/sim
```

Replace `tb_risc_top` by any other testbench name. `tb_risc_top` runs the
processor at its default parameters in under a second; `tb_risc_random`
takes a few seconds.

## How it is verified

- `tb_risc_top` assembles a program that uses every instruction kind, both
  exceptions and all six interrupts, and runs it on the processor with a
  64K-word memory model. An instruction-level model (`tb_ref_pkg`), which
  knows nothing of the pipeline, runs the same program. Every register write
  (except r7, which only the interrupt handler uses) and every store must
  match the model's in value and order. The final registers, memory and output
  port must match too, and r7 must count six interrupts with one acknowledge
  each. It also checks the four-clock latency of the first instruction and
  twenty back-to-back write-backs in straight-line code. It counts stalls,
  both forwarding paths, branch flushes, subroutine and interrupt returns,
  both exceptions, interrupts, prefetch hits, misses and bus conflicts, and
  port use; a mechanism that never happened is a failure.
- `tb_risc_random` builds forty random programs of 300 instructions each,
  with dense register dependences, loads and stores, port accesses, forward
  branches, `JAL`, register jumps and returns whose target register is
  written just before, overflowing arithmetic and undefined opcodes. It
  resets the processor before each program and compares every register
  write and store, in order, with the reference model, and the registers and
  output port at the end.
- Each unit testbench checks its block against an independent model, mostly
  with random stimulus (exhaustively for the forwarding and hazard units). The
  stage testbenches first replay the operand and result values of the
  original design's published stage simulations: the PC sequence
  1000H/3000H/2000H/FFFFH/FFF0H/0008H/000AH, the decode fields of 0051H and
  42CAH, the results A0E2H/5F4DH/A0B0H/8050H/2451H, and the write-back values
  of stage 4.
- Each testbench has been run against a copy of its block with one
  deliberate bug and fails there.

Not verified: timing on any FPGA or process (the original reports 26 MHz on a
Spartan-II, which says nothing about this RTL), and the behaviour of a memory
that cannot answer in the same cycle; there is no wait-state input.

## What is taken from the original and what is not

Taken from the original design: the 16-bit data path; the four stages and
their contents; the control, hazard detection, forwarding, prefetch and
interrupt units and how they connect; a prefetch buffer four words deep that
is searched like a cache; prefetching only while stage 4 leaves the bus free;
six vectored interrupts, reset first, overflow and undefined-instruction
exceptions; JAL/RJAL linking through a register; the `opc` codes 0..7 and
the vectors FFFFH, FFF0H, 0008H, 000AH; the 3-bit register codes (eight
registers); the read-register combinations 0..2; the immediate fields; the
ALU codes 5 (add) and 3 (NOR); move-immediate into the high byte; the three
stage-4 write-back sources and a registered output port; flushing on a
taken branch decided in the execute stage.

This design's own: the opcode numbering and the remaining ALU and shift
codes; the byte-select bit of `MVI`; read-register combination 3; ALU code 7
meaning the add that never traps; interrupt vectors beyond the second; the
interrupt priority, edge-triggered requests, the enable flag and its reset
value; exceptions ranking above interrupts; the return-address rules; the
single-cycle combinational memory bus split into read and write data; the
prefetch window, replacement and bypass; the write-through register file;
stalling only after `LOAD`/`IN`; synchronous reset.

One departure from the original block diagram: the branch target unit is
drawn there in the decode stage. Here it sits in the execute stage, where the
branch is decided and forwarded register values are available. Absolute
branches therefore need no interlock of their own. The control signals of
the original's control-unit simulation are named alike here (`regselect`,
`ex_select`, `alu_function`, `jal_control`, `memsel`, `output_enable`,
`ifid_flush`), but their per-instruction values follow this design's
encoding.
