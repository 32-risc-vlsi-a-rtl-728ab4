# erisc — a 32-bit embedded RISC integer unit with register windows

This is a synthesizable SystemVerilog model of a 32-bit embedded controller
core: the integer unit of a SPARC-style RISC processor, aimed at a 20 MHz
clock. It has eight overlapping register windows (136 registers), a
four-stage pipeline, delayed branches that usually cost no cycles, and
precise, restartable traps and vectored interrupts. All instruction and data
traffic goes over one shared bus: 24-bit address, 32-bit data.

Three ideas drive the design:

* **Data-stationary control.** The decoder runs once, in the decode stage.
  Its control word then travels down the pipeline with the instruction, and
  each stage uses the fields it needs. A 2-bit cycle counter splits
  multi-cycle instructions into *pseudo-instructions*, which go down the
  same pipeline one per cycle.
* **Resolving branches early.** Branch targets and conditions are computed
  in decode. Two condition evaluators run side by side: one reads the
  PSR condition codes, the other reads the codes the ALU is producing in
  the same cycle. A compare placed right before a branch therefore costs no
  stall. The prefetch queue usually already holds the delay slot, so
  fetching jumps straight to the target.
* **Precise exceptions by rollback.** An exception is only acted on when its
  instruction reaches write-back. Special registers may already have been
  changed by a younger instruction in EXE. Each of them therefore keeps a
  one-cycle-old backup copy and is restored from it when the trap is taken.

## Pipeline

| stage | work |
|-------|------|
| IF  | fetch address from the PC chain, bus read, instruction into the 2-entry prefetch queue (or straight into DEC) |
| DEC | decode; register read through the bypass; dependency check; branch condition evaluation and target addition; next-PC selection; decode-time exceptions; issue of one pseudo-instruction per cycle |
| EXE | ALU and shift/align unit side by side; effective address; condition-code, Y, PSR/WIM/TBR and window updates; alignment, tag-overflow and Ticc exceptions |
| WB  | register write; data phase of loads and stores on the bus; exceptions are taken here |

### Pseudo-instructions and the cycle counter

An instruction that needs *R* cycles sets the cycle counter `SEQ` to *R*−1
when it enters decode. `SEQ` counts down once per cycle, and `SEQ == 0`
marks the last pseudo-cycle. Decode takes a new instruction only then. The
queue keeps prefetching meanwhile.

| instruction | cycles | pseudo-instruction #1 | #2 |
|-------------|--------|-----------------------|----|
| load (LD, LDUB, LDSB, LDUH, LDSH) | 2 | effective address | bus word aligned/extended by the shift/align unit and written to rd |
| store (ST, STB, STH) | 2 | effective address | store data read from rd; goes on the bus when #2 reaches WB |
| JMPL | 2 | target address | link register write and control transfer |
| RETT | 2 | target address, window and trap-state restore | control transfer |
| SAVE, RESTORE | 2 | add and window change | empty, so the next instruction reads the new window |
| trap entry (hardware) | 2 | PC into `%l1` of the trap window | nPC into `%l2` |
| all others, including branches and CALL | 1 | | |

Loads and stores take one bus cycle away from fetching. A load reads the
bus while #1 is in WB, and #2, then in EXE, aligns the word. A store
writes while #2 is in WB. The 2-entry prefetch queue hides that cycle
whenever it is full. Load data is aligned by the load's own second
pseudo-cycle, so the result is ready for forwarding at the same time as any
ALU result. No register dependency ever stalls the pipeline. Decode holds
its instruction only while a multi-cycle instruction is still counting.

### Fetch, delayed branches and the PC chain

The PC chain has three 30-bit carry-select adders. They add 4 to the fetch
address, add 4 to the decode instruction's nPC, and add the branch or CALL
displacement to the decode PC. All the possible next addresses are computed
every cycle, and the branch result only picks one. Branches are delayed by
one instruction. The annul bit squashes the delay slot of an untaken
conditional branch, or of `BA,a`. A squashed instruction still passes down
the pipeline as an empty slot.

Each fetched word carries its address through the queue. Decode takes only
the word whose address equals the expected PC. It flushes the queue and
refetches when the two differ. In normal operation this never happens,
because fetching is always redirected together with the control transfer.
The check is there as a safety net. A transfer that is decided while its
delay slot is already in hand redirects fetching at once (the "early
redirect").

### Operand path

`regfile` stores the 8 globals and 8 × 16 windowed registers. With
*cwp* the current window and *r* ≥ 8 the architectural register number,
the physical number is `8 + ((16*cwp + r - 8) mod 128)`; globals map to
themselves. Window *cwp*'s outs are therefore window *cwp*−1's ins. The
array is split into two banks of 72 and 64 entries (globals plus windows
0–3, then windows 4–7). It has two combinational read ports and one write
port, written at the end of WB.

`dep_check` compares the physical numbers of both source operands with the
destinations in EXE and WB, giving 4 match bits. `bypass_unit` uses them to
choose for each operand between the register file, the EXE result (newest,
so it wins) and the WB result.

### Execution units

`alu` does ADD/ADDX/SUB/SUBX, AND/ANDN/OR/ORN/XOR/XNOR, tagged add and
subtract, and the MULScc multiply step (one shift-and-add using the Y
register), and sets NZVC. Its adder is a 32-bit carry-select adder built
from four 8-bit ripple blocks (`csel_adder`). `sau` is a 64-to-32 funnel
shifter. It does SLL/SRL/SRA and, for loads, picks the addressed byte or
halfword of the big-endian bus word and zero- or sign-extends it.

### Traps, interrupts and error mode

* Decode finds instruction-access faults, illegal instructions, privilege
  violations, FP-disabled, window overflow on SAVE and window underflow on
  RESTORE/RETT (checked against WIM), and interrupts. EXE adds misaligned
  addresses, tag overflow and Ticc. WB adds data-access faults.
* The exception travels with its instruction. When the instruction reaches
  WB, `exception_unit` latches it, and in the next cycle (`trap_go`) it does
  four things. It clears EXE and WB. It restores the special registers from
  their backups. It enters the trap: ET=0, PS=S, S=1, CWP−1, and the trap
  type goes into TBR. It starts fetching at `{TBA, tt, 4'b0000}`. The
  oldest instruction therefore always wins, and all younger instructions
  are restarted. The trap-entry pseudo-instruction then saves PC and nPC
  into `%l1`/`%l2` of the new window. A handler returns with
  `JMPL %l1; RETT %l2` (restart) or `JMPL %l2; RETT %l2+4` (skip).
* Interrupts: `irl` is sampled by two registers, and a level is accepted
  only when both samples agree. An accepted level that is above PIL (or is
  level 15), with ET=1, is attached to the next instruction that enters
  decode. `intack` is raised in the cycle the trap is taken. From a change
  of `irl` to `intack` this takes exactly 5 cycles. The first handler instruction reaches
  decode 2 cycles later, 7 cycles after the request. A multi-cycle
  instruction already in decode adds its remaining pseudo-cycles.
* A trap with ET=0 puts the processor in error mode. It stops fetching and
  raises `error_mode` until reset.

Trap types (SPARC numbering): reset 0, instruction access 1, illegal 2,
privileged 3, FP disabled 4, window overflow 5, window underflow 6,
misaligned 7, FP exception 8, data access 9, tag overflow 0x0A, interrupt
0x10+level, Ticc 0x80+n.

### Bus

One access per cycle. `bus_addr`, `bus_rd`, `bus_we`, `bus_be` and
`bus_inst` come combinationally from this cycle's state. The read data
(`bus_rdata`) and the fault inputs must answer within the same cycle
(zero-wait memory). Writes happen on the clock edge. Data accesses take
priority over fetching. Store data is copied onto all byte lanes and
`bus_be` selects the lanes; bit 3 is byte address 0 (big-endian). There is
no wait-state input.

### Floating-point interface

There is no FPU. FP operate instructions trap with FP disabled while
PSR.EF=0. With EF=1 they are sent out on `fpu_inst_valid`/`fpu_inst` when
they reach EXE, and a request on `fp_exc` is taken as an FP-exception
trap. FP branches are treated as FP instructions.

## Instruction set

SPARC V7 integer instructions with their standard encodings: SETHI, Bicc
(all 16 conditions, annul), CALL, JMPL, RETT, Ticc, SAVE, RESTORE, the ALU
operations with and without `cc`, tagged add/sub (with and without trap on
overflow), MULScc, SLL/SRL/SRA, RD/WR of Y, PSR, WIM and TBR, IFLUSH (as a
no-op), and loads and stores of bytes, halfwords and words. Not
implemented, and decoded as illegal: LDD/STD, LDSTUB, SWAP, alternate-space
loads and stores, and the coprocessor instructions.

## How this model relates to the design it follows

It follows the published design in its structure and its numbers:

* the four pipeline stages;
* the 136 registers in 8 windows, split into banks of 72 and 64;
* bypass paths from the two previous results;
* the 2-bit cycle counter for pseudo-instructions, with multi-cycle
  instructions taking at most 4 cycles;
* two condition evaluators selected by whether the instruction ahead
  sets the codes;
* the 30-bit incrementer and offset adder, and the 32-bit adder of four
  ripple blocks;
* the 64-to-32 funnel shifter doing load alignment;
* special registers rolled back from backup copies;
* an acknowledge exactly five cycles after the interrupt request;
* the 24-bit address bus.

What it adds or changes:

* **Instruction encoding.** The published design is SPARC-compatible, but
  it does not list its instructions. The SPARC V7 integer encodings are
  used here. The decoder accepts 53 distinct operations, against the
  published count of 46. The double-word, atomic and alternate-space
  memory instructions are left out.
* **Clocking.** One rising-edge clock replaces the original two-phase
  clock. Every phase-1/phase-2 latch pair is one flip-flop.
* **Cycle counts** for the multi-cycle instructions (table above) are this
  model's choice.
* **No interlock stall.** The original has hardware interlock logic in its
  pipeline control. In this timing, no register dependency needs a stall,
  so only the multi-cycle hold exists.
* **Load alignment.** It is done in the shift/align unit, not in separate
  data aligners. Store data is placed on the byte lanes by the bus
  interface.
* **Bus protocol and memory timing** are this model's choice: zero-wait
  memory, byte enables, and a read strobe. An interrupt-null output of the
  original is not modelled.
* **Design choices not published:** the trap mechanism details (trap
  registers, vector format, masking rule, error mode), the register-bank
  split between windows, the reset state, and the PC-tag check on fetched
  words.
* **Not included:** the FPU interface protocol, pads and power pads, the
  clock generator and layout.

## Files

| file | contents |
|------|----------|
| `rtl/erisc_pkg.sv` | shared enums, PSR struct, control word, trap numbers, window mapping function |
| `rtl/erisc_top.sv` | the integer unit: pipeline registers, issue logic, next-PC selection and the block instances |
| `rtl/decoder.sv`, `rtl/imm_gen.sv`, `rtl/cycle_counter.sv` | decode-stage control |
| `rtl/fetch_unit.sv`, `rtl/prefetch_queue.sv`, `rtl/csel_adder.sv` | PC chain and instruction queue |
| `rtl/regfile.sv`, `rtl/dep_check.sv`, `rtl/bypass_unit.sv` | operand path |
| `rtl/alu.sv`, `rtl/sau.sv`, `rtl/branch_eval.sv`, `rtl/spr.sv` | execution and state |
| `rtl/exception_unit.sv`, `rtl/bus_if.sv` | traps/interrupts and the bus |
| `tb/tb_<block>.sv` | self-checking test for each block |
| `tb/tb_erisc_top.sv` | program-level test of the whole core |
| `tb/tb_programs.sv` | Tower of Hanoi and matrix-product programs on the whole core |
| `tb/tb_asm_pkg.sv`, `tb/tb_mem.sv` | instruction encoders; 32K×32 ROM at 0 and 32K×32 RAM at 0x20000 |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. The
package must come first on the command line:

    verilator --binary --timing -Wno-fatal --top-module tb_erisc_top \
        rtl/erisc_pkg.sv $(ls rtl/*.sv | grep -v erisc_pkg) \
        tb/tb_asm_pkg.sv tb/tb_mem.sv tb/tb_erisc_top.sv
    ./obj_dir/Vtb_erisc_top

A block test is built the same way with its own files, for example
`--top-module tb_alu rtl/erisc_pkg.sv rtl/csel_adder.sv rtl/alu.sv tb/tb_alu.sv`.

`tb_erisc_top` runs the core at its default size with a program of about
700 cycles. The program covers:

* every ALU class, both bypass paths and the carry chain;
* branches that take their codes from the ALU and from the PSR, and
  annulled delay slots;
* all load and store sizes;
* a 32×32 multiply with 33 MULScc steps;
* nested calls with window overflow and underflow traps;
* illegal, FP-disabled, misaligned, software, data-access,
  instruction-access and tag-overflow traps (the last one also checks the
  rollback of the special registers);
* an interrupt;
* a bubble sort of eight signed words.

It compares the results in RAM with values computed in the testbench. It
checks the 5-cycle interrupt acknowledge, and checks that the multiply
sequence takes about 40 cycles: it measures 38, roughly 2 µs at 20 MHz. It
also counts how often each pipeline mechanism happened and fails if one
never did. The mechanisms are the bypasses, multi-cycle holds, annul,
both evaluators, early redirects, a full queue, rollback and INTACK.

The published design reports an average of about 1.3 cycles per
instruction. The Hanoi run below, which is heavy in calls, loads and
stores, comes close to that.

`tb_programs` runs two benchmark programs on the same core and memory:

* **Tower of Hanoi**, recursive, with 8 discs. That is 255 moves and a
  call depth of 9, so the 8 windows run out. The run has 7 window
  overflows and 7 underflows, handled by real spill/fill routines that
  rotate WIM. The sequence of moves is compared with a reference.
  Run time: 9775 cycles for 7645 instructions, 1.28 cycles per
  instruction.
* **4×4 matrix product** of random 32-bit words, using a MULScc multiply
  routine. Run time: 3927 cycles, 1.06 cycles per instruction; the
  multiply loop is nearly all single-cycle MULScc steps.

## Trust and limits

The block tests compare against independent reference models, and each
one is known to fail when its block is deliberately broken. The core test
is a directed program, not a random instruction-set comparison against a
reference simulator, so corner cases outside it may still hide bugs. Two
things in particular are not exercised: FP-exception traps, and error mode
beyond the block test. Synthesis with yosys gives about 900 cells and 800
flip-flops plus the 136×32 register array.
