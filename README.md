# Reduced-overhead Octavo: a barrel soft-processor with hardware addressing and branching

A processor running a small loop on an FPGA spends most of its instructions on
overhead: stepping pointers, comparing, and branching. Only a few of its
instructions do useful work. Custom hardware pays none of that overhead,
because counters and multiplexers do the same job alongside the datapath.

This design moves the overhead out of the instruction stream and into two
small per-thread units that sit beside the pipeline:

- **Address Offset Module (AOM), one per operand.** It turns an operand
  address into a real address. It does this in one of three ways:
  - adds a per-thread default offset, so that every thread runs the same
    code on its own data;
  - redirects an "indirect slot" to a programmed pointer, and then steps
    that pointer (indirect addressing with post-increment);
  - leaves shared addresses alone.
- **Branch Trigger Module (BTM).** It holds a table of branches per thread,
  each keyed by the PC at which it fires.
  - Every fetched PC is compared with all of the thread's entries in
    parallel.
  - A matching entry redirects the thread's *next* PC, while the
    instruction at that PC still does its work. The branch is folded and
    costs no cycle.
  - With prediction enabled, the instruction at the branch origin is
    cancelled when the outcome is not the predicted one. That instruction
    can then belong to one path only.
  - Several entries can share an origin, which gives a multi-way branch.

So the loop body holds only useful instructions. The addressing and
flow-control "sub-programs" run in parallel, in hardware.

The processor underneath is Octavo, a barrel processor:

- Eight hardware threads issue in strict round-robin order, one
  instruction per clock, into a 10-stage pipeline.
- A thread's next instruction enters eight cycles after its previous one,
  so it always sees that instruction's results. No forwarding and no
  interlocks are needed.
- Every instruction is a three-operand, memory-to-memory operation,
  `D <- A op B`, on 36-bit words.
- There are no registers. A and B are two data memories, and the result is
  written to whichever memory D addresses.

## Instruction set

The instruction word is `op[35:32] | D[31:20] | A[19:10] | B[9:0]`.

| op   | name | effect |
|------|------|--------|
| 0000 | XOR  | D = A ^ B |
| 0001 | AND  | D = A & B |
| 0010 | OR   | D = A \| B |
| 0011 | SUB  | D = A - B |
| 0100 | ADD  | D = A + B |
| 0101-0111 | -    | reserved, write nothing |
| 1000 | MHS  | D = high word of signed A*B |
| 1001 | MLS  | D = low word of signed A*B |
| 1010 | MHU  | D = high word of unsigned A*B |
| 1011 | JMP  | PC = D |
| 1100 | JZE  | PC = D if A == 0 |
| 1101 | JNZ  | PC = D if A != 0 |
| 1110 | JPO  | PC = D if A >= 0 |
| 1111 | JNE  | PC = D if A < 0 |

There is no shift instruction. A right shift by one is `MHU x, 2**35`. A left
shift is `MLS` by a power of two. With the BTM in use, the jump opcodes are
rarely needed. They remain for ordinary code.

## Address map

A and B are 10-bit fields that read memory A and memory B respectively. D is
12 bits wide. Its top two bits select where the result goes:

| D[11:10] | target |
|----------|--------|
| 0 | memory A |
| 1 | memory B |
| 2 | instruction memory, so programs may rewrite code |
| 3 | configuration space of the *writing thread's* AOM and BTM entries |

Inside memory A and memory B (10-bit offset, constants in `octavo_pkg`):

| offset | meaning |
|--------|---------|
| 2, 3 (`IO_BASE`, `IO_PORTS`) | memory-mapped I/O ports. A read pops an input port; a D write pushes an output port and does not touch memory. |
| 8 .. 8+POINTERS-1 (`IND_BASE`) | indirect slots, redirected by the AOM to a pointer |
| below 64 (`SHARED_WORDS`) | shared by all threads: constants, ports, mailboxes |
| 64 and above | private: the thread's default offset DO is added |

Configuration space (region 3). Each write goes to the entries of the thread
that executes it:

| offset | entry |
|--------|-------|
| o*32 + p | PO[p], pointer p of operand o (o = 0 A, 1 B, 2 D) |
| o*32 + 8 + p | PI[p], increment of pointer p |
| o*32 + 16 | DO, default offset of operand o |
| 128 + 4e + 0 | BO of BTM entry e: origin PC |
| 128 + 4e + 1 | BD of BTM entry e: destination PC |
| 128 + 4e + 2 | bits [4:0] = {BF[2:0], BPE, BP} |

A program therefore sets up its own pointers and branches with ordinary `ADD`
instructions, for example `ADD cfg.PO_A[0], ptr_init, zero`.

## Pipeline

A thread's instruction enters stage 0 in cycle c.

| stage | control (BTM, controller) | instruction / address | data |
|------:|---------------------------|-----------------------|------|
| 0 | PC read; BTM entries read | instruction memory read | |
| 1 | PC = BO compare, per entry | instruction word registered; AOM tables read | |
| 2 | condition flags from the thread's latest result | AOM selects offset; PRD0 | |
| 3 | per-entry J, BD', C; C OR-reduced | A + offset; PRD1 | |
| 4 | J/BD' dropped if IOR low | commit = valid & IOR & !C | A', B' read memories (RD0) |
| 5 | OR-reducers over entries | | RD1, operand words out |
| 6 | CTL0: next-PC choice | | ALU0 |
| 7 | CTL1: next PC written | | ALU1 |
| 8 | | | ALU2 |
| 9 | | | ALU3 |
| 10 | | result R at D'; I and config written | WR0: A/B write register |
| 11 | | | WR1: A/B block RAM written |

The data path from operand read to memory write is eight stages:
2 read, 4 compute and 2 write. That is exactly one round of the eight
threads, so the same thread's next operand read (stage 4, cycle c+12) comes
after its previous write (stage 11).

Stage 10 of one instruction is stage 2 of the same thread's next
instruction. The result R is therefore fed straight to the BTM, which
evaluates branch conditions on it. A branch entry on PC p tests the result of
the instruction *before* p, which is normally the instruction that computed
the value being branched on.

### Next-PC priority (controller)

1. The instruction was annulled for I/O (IOR low). The same PC is retried on
   the thread's next turn.
2. A BTM entry fired (J). The next PC is BD'.
3. The instruction's own jump is taken, unless the instruction was cancelled.
   The next PC is D.
4. Otherwise the next PC is PC + 1.

### Hazards that remain

- **Self-modifying code and reconfiguration.** A write to instruction memory
  lands in cycle c+10, but the thread fetches again in c+8. The change is
  seen by the instruction after next. Writes to a thread's own AOM or BTM
  entries behave the same way.
- **Cancel timing.** A cancelled instruction writes nothing, pops nothing,
  steps no pointer and makes no jump. Its slot is spent.

## Branch Trigger Module

Each of the `BTM_ENTRIES` entries of a thread holds these fields:

- **BO:** the origin PC.
- **BD:** the destination PC.
- **BF:** which condition of the latest result to test:
  - 0 always
  - 1 zero
  - 2 non-zero
  - 3 >= 0
  - 4 < 0
  - 5 even
  - 6 odd
  - 7 never
- **BP:** the predicted outcome.
- **BPE:** enables prediction and cancel.

For a fetched PC, per entry:

```
match = (PC == BO)
taken = condition BF holds for the latest result
J     = match & taken
BD'   = J ? BD : 0
C     = BPE & match & (taken != BP)
```

The J and BD' outputs of all entries are OR-reduced. Software must make the
entries that share an origin mutually exclusive. Otherwise their destinations
are ORed together.

C is ORed over the entries and cancels the instruction at the origin. With
BP = 0, an entry means: "if the condition holds, branch away and do not
execute this instruction". In that case the instruction belongs only to the
fall-through path.

A Hailstone step (the testbench program) shows a folded two-way branch with a
cancel:

```
3  MLS temp, temp, three   ; entries at PC 3: even -> 5 (BPE, BP=0),
                           ;                  < 0  -> 0 (BPE, BP=0)
4  ADD temp, temp, one     ; entry at PC 4: always -> 6
5  MHU temp, temp, 2**35   ; temp / 2
6  ADD *D[0], temp, zero
```

- For an odd value, instruction 3 runs and the thread continues at 4.
- For an even value, instruction 3 is cancelled and the thread goes straight
  to 5.
- No instruction in the loop is a branch.

If the previous instruction wrote no result, the BTM uses the last result
the thread did write. That happens when it was cancelled, annulled, or a
jump.

All entries are disabled at reset (BO = all ones, BF = never).

## Address Offset Module

There are three instances: one for A, one for B and one for D. Each holds,
per thread, a default offset DO, plus `POINTERS` pointers PO[p] with
increments PI[p]. An operand address `x` inside a memory becomes:

| x | x' |
|---|----|
| indirect slot `IND_BASE + p` | `x + PO[p]`; then PO[p] += PI[p] if the instruction commits |
| shared (< 64) | `x` |
| private (>= 64) | `x + DO` |

For D, only the A and B regions are translated. Writes to instruction memory
and to configuration pass through unchanged.

Additions are modulo 1024 within the memory. A large increment therefore acts
as a negative step.

The increment is written back in stage 4, and only when the instruction
commits. An instruction that is annulled for I/O and retried, or cancelled by
the BTM, does not step its pointer.

## I/O ports and the predictor (PRD)

Each of memories A and B has `IO_PORTS` = 2 input and 2 output ports. The
top level exposes the four ports as arrays, with A's ports first. Each port
has its own flags:

- an input port has an empty flag and data, and returns a pop pulse;
- an output port has a full flag, and gets data and a valid pulse.

In stage 2, the predictor looks at the raw A, B and D fields of each
instruction:

- IOR goes low if any input port the instruction reads is empty.
- IOR also goes low if any output port it writes is full.

An instruction with IOR low is annulled: it has no effect, and the thread
retries the same PC on its next turn. The thread stalls; the other threads
keep running.

A pop happens in stage 4, and an output write in stage 10.

**Queues on the ports need a margin.** The flags are sampled in stage 2, but
the access they allow happens later. Instructions that passed the check but
have not yet acted are not reflected in the flags.

- **Output ports.** The word appears at the port (valid pulse) in the cycle
  after stage 10. That is one cycle after the same thread's next instruction
  has already been checked. A queue written by k threads must therefore
  report full while it has fewer than k free places. For a single thread,
  that means one free place.
- **Input ports.** The pop happens in stage 4. A queue read by a single
  thread needs no margin, because that thread's previous pop has completed
  before its next check. A queue read by several threads can have two pops
  pending at a check. It must report empty while it holds fewer than three
  words.

## Benchmark kernels

`tb/tb_workloads.sv` runs four small kernels at once, two threads each. Every
kernel is in its reduced-overhead form:

- The loop body contains only the useful instructions.
- AOM pointers walk the arrays.
- Folded BTM branches do all the looping.
- A BTM entry testing for a negative sentinel leaves the loop and cancels
  the instruction at its origin.

| kernel | body | what it shows |
|--------|------|---------------|
| Increment, `out[i] = in[i] + 1` | 1 instruction | one element per thread turn |
| Reverse, `out[N-1-i] = in[i]` | 1 instruction | write pointer stepping by -1 |
| FIR, 4 taps | 12 instructions | delay line in private words, multiply-accumulate |
| FSM, falling-edge detector | 2 instructions per symbol | a three-way branch (0, 1, end) per state, folded into the state's output instruction; uses all 8 BTM entries |

The testbench checks every output against a model. It also checks that
consecutive outputs of a thread are exactly one loop body apart, in thread
turns, so no cycle goes to addressing or branching.

## Files

| file | contents |
|------|----------|
| `rtl/octavo_pkg.sv` | widths, address map, opcode/condition enums, instruction struct |
| `rtl/octavo_ro.sv` | top level: pipeline wiring, thread counter, commit logic, write-back bus |
| `rtl/btm.sv` | Branch Trigger Module |
| `rtl/aom.sv` | Address Offset Module (one instance per operand) |
| `rtl/io_predictor.sv` | I/O predictor (PRD0/PRD1) |
| `rtl/controller.sv` | per-thread PCs and next-PC choice |
| `rtl/alu.sv` | four-stage ALU with 36x36 multiplier |
| `rtl/data_mem.sv` | A/B data memory with memory-mapped ports |
| `rtl/instr_mem.sv` | instruction memory |
| `rtl/pipe_delay.sv` | register chain used for the plain pipeline stages |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_workloads` (benchmark kernels) |

### Top-level ports of `octavo_ro`

- `run_i`: threads issue while it is high.
- `ext_we_i`, `ext_tid_i`, `ext_addr_i`, `ext_data_i`: a load port used
  before `run_i` rises.
  - It writes any D address: memory A or B, instruction memory, or the
    configuration of thread `ext_tid_i`.
  - It takes the place of the ALU result on the write-back bus in that cycle.
- The I/O port arrays described above.
- `wb_*`: the write-back bus (stage 10), for observation.

Parameters: `POINTERS` (4) and `BTM_ENTRIES` (8). The thread count, word width
and memory depth are package constants.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. For example, with
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/octavo_pkg.sv tb/tb_octavo_ro.sv --top-module tb_octavo_ro
./obj_dir/Vtb_octavo_ro
```

`tb_octavo_ro` runs the whole processor at its default parameters for 40,000
cycles, in under a second:

- Seven threads run Hailstone on their own seed lists, using AOM pointers and
  BTM branches only.
- The eighth thread uses a BTM entry to enter an accumulator loop. That loop
  uses the ordinary jump instruction and reads an input port with random
  gaps.
- The output ports report full at random.

It checks:

- every output word, against a reference model;
- that each write-back comes exactly 10 cycles after its issue slot;
- that an unstalled Hailstone step takes exactly five thread turns, so the
  folded branches cost nothing.

It also counts each mechanism (stall, cancel, folded branch, multi-way
branch, own jump, post-increment, configuration write, port pop), and
requires every one of them to occur.

## Departures and own choices

These parts follow the published design:

- 8 threads;
- the stage positions of the BTM, AOM, predictor, controller and ALU;
- the BTM entry fields and its outputs (destination, cancel, jump);
- the AOM entry set and its shared/indirect tests;
- the opcode encoding;
- "up to 4 pointers and 8 branches per thread" as the default sizes.

These are this design's own choices:

- **Widths.** 36-bit words; 10-bit A, B and PC; 12-bit D with two region
  bits.
- **Memory layout.** The address map, the configuration layout and the
  memory depths (1024 words each).
- **BTM conditions.** The condition set, and the per-thread copy of the last
  result used for conditions.
- **AOM.** The pointer write-back is moved from stage 3 to stage 4 so that it
  can depend on commit. Without this change, a retried instruction would step
  its pointer twice.
- **AOM sizing.** `POINTERS` is per operand (4 each for A, B and D). A
  reading of 4 per thread in total is equally possible.
- **Retry.** The predictor's exact rule (any addressed port not ready), and
  the retry of an annulled instruction.
- **Controller.** The next-PC priority.
- **Load port and reset.** The load port, and reset behaviour: PCs 0,
  offsets 0, branches disabled.
- **Right shifts.** There is no shift instruction; a right shift is a
  multiply (`MHU`).

## How far to trust it

- Every module has a self-checking testbench against an independent model.
  Each testbench has been shown to fail on a deliberately broken copy of its
  module.
- The whole processor has been run end to end with every mechanism
  exercised.
- Nothing has been placed and routed. Clock rate and area on an FPGA are
  unknown, because all checks are cycle-level simulation and generic
  synthesis.
- The memories are written as arrays with registered reads, and should map
  to block RAM.
- The BTM and AOM tables are flip-flops, which is expensive at 8 threads ×
  8 entries.
- Hailstone, Increment, Reverse, FIR and FSM kernels have been run as
  programs, at small sizes of this design's choosing.
