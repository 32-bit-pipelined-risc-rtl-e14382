# A 32-bit five-stage pipelined RISC processor

This is a 32-bit RISC processor. Its instructions overlap in a five-stage pipeline:
instruction fetch (IF), instruction decode (ID), execute (EX), memory access (MEM) and
write to register (WR). Two techniques keep the pipeline busy. A two-bit branch predictor
lets fetch continue past a branch before the branch is resolved. Operand forwarding hands a
result to the next instructions before it has reached the register file. Whatever these
cannot cover is handled by stalls: fetch inserts a NOP instead of a new instruction.

The machine is built around a few fixed structures:

- 256 general registers of 32 bits, with 8-bit register numbers;
- a 7-bit condition code register (CCR);
- one memory shared by instruction fetch and data access;
- a four-state controller that makes every pipeline step three clocks long;
- an interrupt input whose bit 31 requests an interrupt and whose lower 31 bits give the
  handler's address.

The microarchitecture follows an existing description of this processor: the stages, the
inter-stage buffers, the stall rules, the branch-recovery queue, the interrupt sequence and
the fixed register addresses. That description gives no binary instruction format and no
list of ALU operations. The encoding below, the flag layout and a handful of mechanisms are
this design's own choices. Each one is marked where it comes up and collected in
[Own choices](#own-choices-and-departures).

## Pipeline steps and phases

```
 IF ──► [IF buffer] ──► ID ──► [ID buffer] ──► EX ──► [EX buffer] ──► MEM ──► [MEM buffer] ──► WR
```

All five stages move forward together, once per **step**. The four-state machine
`phase_fsm` starts in RESET after reset. It then cycles through P1, P2 and P3, so a step
lasts three clocks:

| phase | what happens |
|---|---|
| P1 | The one memory access of the step: an instruction fetch, or the LW/SW in MEM. WR writes the register file. |
| P2 | ID reads its two operands from the register file into two operand registers. IF copies the word it fetched into the instruction register. |
| P3 | All combinational stage logic has settled. Every inter-stage buffer, the PC, the CCR, the predictor and the backup queue update on the clock edge that ends P3. |

WR writes in P1 and ID reads in P2. A register written by WR can therefore be read by ID in
the same step, so WR needs no forwarding path. An instruction is in flight for five steps
(15 clocks). With no stalls the core finishes one instruction per step, that is one every
three clocks. The testbench of `risc_cpu` checks both numbers.

Three-clock stages and a four-state controller starting in a reset state come from the
original description. The assignment of work to P1, P2 and P3 is this design's choice. All
registers use the rising clock edge.

## Instruction set (this design's encoding)

Every instruction is 32 bits. Instructions use two addresses: `rd` is both the first
operand and the destination, and `rs` is the second operand. Memory is word-addressed, so
the next instruction is at PC + 1. The all-zero word is NOP, so a cleared buffer holds a
NOP.

```
[31:26] opcode   [25:18] rd   [17:10] rs   [9:0] unused
LDI  : [17:0]  immediate, sign-extended
JMP/JAL : [25:0] absolute address, sign-extended
BR   : [25:23] CCR bit   [22] value that makes it taken   [21:0] absolute address, sign-extended
SM   : [0] new interrupt-mask value      TCB : [2:0] CCR bit to test
```

| class | instructions | effect |
|---|---|---|
| ALU | ADD SUB AND OR XOR NOT SHL SHR SAR CMP | `rd <= rd op rs`, sets the flags. NOT gives `~rs`. CMP only sets the flags. Shifts use `rs[4:0]`. |
| load/store | LW, SW, MOVE, LDI | `rd <= mem[rs]`, `mem[rs] <= rd`, `rd <= rs`, `rd <= imm` |
| branch | BR | taken when `CCR[bit] == value` |
| jump | JMP, JAL, JR, RTS, RTI | JAL saves PC+1 in register E0h. JR jumps to `rs`. RTS jumps to E0h. RTI jumps to 80h and reloads the CCR from C0h. |
| condition code | SM, TCB | SM sets or clears the interrupt mask. TCB copies a CCR bit into the test bit T. |

Opcodes that are not in the table execute as NOP. The values are listed in `rtl/risc_pkg.sv`.

The registers with fixed roles are E0h (return address, written by JAL and read by RTS),
80h (return address of an interrupt) and C0h (CCR saved by an interrupt). These three
addresses come from the original description.

## Condition code register

| bit | 6 | 5 | 4 | 3 | 2 | 1 | 0 |
|---|---|---|---|---|---|---|---|
| name | IM | T | L | N | Z | V | C |

The original description fixes the width (7 bits), a single interrupt-mask bit (IM, active
high: interrupts are accepted only while IM is 0) and the test bit T. The other five bits
and the bit order are this design's choices:

- C is the carry for ADD and "no borrow" for SUB and CMP. It is the last bit shifted out for
  shifts, and 0 for logic operations.
- V is signed overflow.
- L is signed less-than, N xor V. With it, `CMP a, b` followed by `BR L=1` branches when
  a < b.

ALU instructions update C, V, Z, N and L in EX. MOVE, LDI and LW leave the flags alone.

## Control flow: prediction, the backup queue and recovery

This is the part of the design that is hardest to follow.

**Fetching a branch.** IF looks up the two-bit counter of the branch address. It follows
the predicted path at once: the PC becomes the target when the prediction is taken, and PC+1
otherwise. It pushes the address of the *other* path into `pc_queue`, a two-register FIFO.
The counters sit in a 16-entry table indexed by the low address bits. They start at 1
(weakly not taken) and saturate at 0 and 3.

**Resolving it.** The branch reads the CCR when it reaches EX. Every older instruction has
updated the CCR by then, because the CCR changes only in EX. The branch pops its queue
entry and trains its counter.

**Misprediction.** If the prediction was wrong, the PC is loaded from the head of the
queue. The instructions in the IF and ID buffers came from the wrong path and are replaced
by NOPs. That costs two bubbles. The queue is then flushed, because any younger branch
still in it was on the wrong path. Two registers are enough: at most three branches can lie
between IF and EX, and a pop and a push may happen in the same step.

**Jumps.** JMP and JAL take their sign-extended address from the instruction register and
redirect fetch at once, with no bubble. JAL still stalls fetch while it is in ID, EX and
MEM, so that the return address has reached register E0h before the next instruction reads
registers. That makes three bubbles.

JR, RTS and RTI need a register value, which is read in ID. Fetch pauses for one step while
the instruction is in ID, and the PC is loaded with the forwarded value.

RTI also has to restore the CCR. The NOP that fetch inserts during that one-step pause is
marked: in ID it reads register C0h, and in EX it writes that value into the CCR.

## Stalls

When fetch stalls it requests nothing from memory, passes a NOP to the IF buffer and holds
the PC, unless a redirect applies.

| cause | detected | bubbles |
|---|---|---|
| LW or SW in MEM (shared memory) | instruction in the EX buffer | 1 per LW/SW |
| JAL in ID, EX or MEM | opcodes in the IF, ID and EX buffers | 3 |
| JR, RTS or RTI in ID | opcode in the IF buffer | 1 (PC loaded from the register) |
| branch mispredicted in EX | ID buffer and CCR | 2 (IF and ID squashed) |
| interrupt being taken | `interrupt_ctrl` busy | 6 (see below) |
| load-use: ID needs the word a LW in EX is loading | register numbers | 1 (IF and ID hold) |

The last row is this design's addition. The result of a LW exists only once MEM has read
memory, which is one step after ID would need it.

## Operand forwarding

ID reads `rd` and `rs` from the register file in P2. `forward_unit` then chooses the newest
value of each, in this order:

1. the result that the instruction in EX is producing in this step (ALU result, MOVE or LDI
   value, or the JAL return address);
2. the result held by the instruction in MEM (for a LW, the word just read from memory);
3. the register file.

The chosen values go into the ID buffer. That forwarding happens in selectors just before
the ID buffer comes from the original description. The choice of sources and their priority
is this design's.

## Interrupts

`int_vector[31]` requests an interrupt. The request is checked after each fetch and is
accepted only if all of these hold:

- the step actually fetched (no stall);
- IM is 0;
- the fetched instruction is not a branch or jump;
- no branch is in ID.

The last two conditions are this design's. They make sure the saved return address is
never a predicted one.

On acceptance:

1. `backup1_pc` takes the address after the fetched instruction. The PC takes
   `int_vector[30:0]` sign-extended. `int_ack` pulses for one clock.
2. Fetch stalls for four steps while the fetched instruction, the last one before the
   handler, passes through ID, EX, MEM and WR.
3. In the next step `backup1_pc` is written into register 80h. In the step after that the
   CCR is written into register C0h, and IM is set.
4. Fetching resumes at the handler.

The handler ends with RTI. Because RTI reloads the saved CCR, it also restores IM. Software
that wants nested interrupts copies registers 80h and C0h elsewhere and clears IM with SM.
Setting IM on entry is this design's choice. It keeps a request that is still held from
re-entering the handler at once.

## Memory

`memory` is a single-port word memory of 2^16 words of 32 bits. On a clock edge with `en`
high it writes when `we` is high, and it always loads the word at `addr` into the read
latch `rdata` (the old word when writing). Addresses wrap modulo the depth. A host port
(`host_we`, `host_addr`, `host_wdata`, `host_rdata`) loads programs and reads results while
the processor is held in reset. The memory exists to run the processor in simulation. Its
size and the host port are this design's choices.

## Own choices and departures

Taken from the original description:

- the five stages and their four buffers;
- three clocks per stage and the four-state controller;
- 256 registers with 8-bit addresses;
- the register addresses E0h, 80h and C0h;
- the 7-bit CCR with its mask and test bits;
- the two-bit prediction with a two-register backup queue;
- forwarding selectors in front of the ID buffer;
- the LW/SW, JAL and JR/RTS/RTI stalls with NOP insertion;
- CCR restore by the NOP after RTI;
- the interrupt sequence with `backup1_pc`;
- a memory with read and write latches for simulation.

This design's own:

- the binary encoding and opcode values, the ALU operation list, and the flag layout
  (C V Z N L);
- how each branch chooses its condition: one CCR bit compared with a value;
- absolute branch targets;
- the predictor table (16 entries, indexed by address, reset to weakly not taken);
- flushing the queue on a misprediction and squashing the ID instruction;
- the load-use interlock;
- LW writing its register in WR. The original lists only MOVE, LDI and ALU instructions as
  WR work, yet a loaded word must reach a register somehow;
- the phase plan (P1, P2, P3) and rising-edge-only registers. The original mixes
  negative-edge and positive-edge registers;
- selectors built as multiplexers, not tri-state buffers;
- the interrupt acceptance conditions, the fixed drain of four steps, `int_ack`, and
  masking on entry;
- the memory size (65,536 words, the address space of the 16-bit processor this design grew
  from) and the host port;
- resetting the register file and CCR to zero.

The original reports a bubble-sort program of 100 bytes taking 880.50 execution cycles. It
does not give the array length or how cycles were counted. The bubble sort in
`tb/tb_risc_top.sv` and `tb/tb_bubble_sort.sv` is 21 instructions (84 bytes). It
executes 480 instructions in 705 steps (2116 clocks) on 10 random words. On 64 random words
it executes 20,607 instructions in 30,361 steps. On 64 words in descending order it executes
22,433 instructions in 32,647 steps. That is about 1.47 steps per instruction; the stalls
come mostly from the two loads and the LW/SW structural hazard in the inner loop. The
original figures cannot be compared directly with these.

## Modules

| file | role |
|---|---|
| `rtl/risc_pkg.sv` | widths, opcodes, CCR bit positions, buffer structs, decode helpers |
| `rtl/risc_top.sv` | `risc_cpu` plus `memory`; parameters `MEM_ADDR_W` (16) and `BP_ENTRIES` (16) |
| `rtl/risc_cpu.sv` | the pipeline: stage logic, the buffers, and the wiring of everything below |
| `rtl/phase_fsm.sv` | RESET/P1/P2/P3 controller |
| `rtl/fetch_ctrl.sv` | IF: PC, instruction register, next-PC choice, stalls; contains the next two |
| `rtl/branch_predictor.sv` | table of two-bit counters |
| `rtl/pc_queue.sv` | two-entry PC backup FIFO |
| `rtl/regfile.sv` | 256 x 32 register file, write in P1, registered reads in P2 |
| `rtl/forward_unit.sv` | ID operand selectors |
| `rtl/alu.sv` | combinational ALU with N Z V C |
| `rtl/ccr.sv` | condition code register |
| `rtl/stage_buffer.sv` | generic inter-stage buffer (type parameter, flush to NOP, hold) |
| `rtl/interrupt_ctrl.sv` | interrupt acceptance, drain, PC/CCR save |
| `rtl/memory.sv` | simulation memory with host port |

`risc_cpu` talks to memory through `mem_en`, `mem_we`, `mem_addr`, `mem_wdata` (valid in
P1) and `mem_rdata`. It expects `mem_rdata` to be a read latch loaded on the clock edge
that ends P1, which is how `memory` behaves. The core contains assertions for the memory
port (fetch and LW/SW never collide), the register-file write port and the backup queue
(no overflow, no misprediction with an empty queue).

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/risc_asm_pkg.sv` provides
instruction encoders and `iss`, a reference model that runs one instruction at a time with
no pipeline. The larger testbenches compare registers, memory and the CCR against it.

```sh
verilator --binary --timing --assert -Irtl -Itb \
  rtl/risc_pkg.sv tb/risc_asm_pkg.sv rtl/*.sv tb/tb_risc_top.sv \
  --top-module tb_risc_top -o sim
./obj_dir/sim
```

For another testbench, replace `tb_risc_top` with its name. All of them finish in seconds.

- `tb_risc_top` uses the default sizes and runs three programs:
  - a directed program that reaches every mechanism: forwarding from EX and from MEM,
    load-use, LW/SW stalls, JAL/RTS, JR, RTI with CCR reload, SM, TCB, correctly and
    wrongly predicted branches, and every ALU operation;
  - bubble sort of 10 random words, checked against a sorted copy and against bounds on the
    cycle count;
  - a loop interrupted twice, whose handler must not disturb the loop's result.

  It counts how often each mechanism happened and fails if any count is zero.
- `tb_bubble_sort` runs the bubble sort on 64 random words and on 64 words in
  descending order, checks the results and prints the clock counts.
- `tb_risc_cpu` checks the timing: the first register write comes in the fifth step, then
  one write per step. It also runs a random straight-line program of 400 instructions,
  dense with dependences and loads/stores, against the reference model.
- The unit testbenches compare each block with a model written from its rules, using
  random and directed stimulus.

The reference model shares the instruction-set definition with the RTL. It checks the
pipeline against the instruction set, not the instruction set against an outside source.
