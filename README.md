# nMPRA: a multi-context MIPS32-style pipeline with a hardware task scheduler

Switching tasks in a real-time operating system costs time: the kernel saves
one task's registers and restores the next task's, and the scheduler runs in
software. This design takes that work out of software. It makes the processor's
state multiple copies deep, and it adds a hardware scheduler that chooses a
task every clock cycle.

The processor, nMPRA (Multi Pipeline Register Architecture), is a five-stage
MIPS32-style pipeline. Everything in it that holds state has `NR_TASKS` copies:
the program counter, the IF/ID, ID/EX, EX/MEM and MEM/WB pipeline registers,
a bank of 32 general-purpose registers, and the divider with its HI/LO
registers. Each copy belongs to one *semiprocessor* (sCPU), and each sCPU runs
one task. Only the combinational logic is shared: the decoder, ALU, hazard and
forwarding logic, branch comparator and the memories.

The scheduler, nHSE, sits on the coprocessor-2 interface. Every cycle it drives
one signal, `nhse_task_select`, which names the sCPU that owns the shared logic
in that cycle. Changing that value *is* the context switch. No register is
saved or restored. The sCPU that was switched out keeps its half-executed
instructions in its own pipeline registers and continues from exactly that
point when it is selected again.

The default build has 8 sCPUs, with 4096-word instruction and data memories.

## Contents

- [What happens on a context switch](#what-happens-on-a-context-switch)
- [The nHSE scheduler](#the-nhse-scheduler)
- [The pipeline](#the-pipeline)
- [Module hierarchy](#module-hierarchy)
- [Parameters](#parameters)
- [Top-level interface](#top-level-interface)
- [Simulating](#simulating)
- [What the tests show](#what-the-tests-show)
- [Where this RTL departs from the original nMPRA, and what is left out](#where-this-rtl-departs-from-the-original-nmpra-and-what-is-left-out)
- [Size](#size)

## What happens on a context switch

This is the hardest part to picture, so here it is step by step.

1. Each pipeline stage is an array of registers indexed by the sCPU number:
   `ifid_r[cur]`, `idex_r[cur]`, `exmem_r[cur]` and `memwb_r[cur]`. Here `cur`
   is the registered `nhse_task_select`.
2. In a given cycle only the selected sCPU's copies are read and written. The
   other copies keep their values. Each sCPU's program counter, register bank
   and divider are selected the same way.
3. When `cur` changes, the next cycle simply works on another set of copies.
   The new task picks up with whatever was in its pipeline when it was last
   switched out. Nothing is flushed.

The scheduler's decision is combinational and is registered once (the `nhse`
block). This means a decision made in cycle *n* takes effect in cycle *n+1*.

**Preemption.** A task can be switched out because a higher-priority task
became ready. Its pipeline is then frozen as it is, including any store that
is still in flight. That store completes when the task resumes.

**Wait.** A task can give up the processor voluntarily by executing `wait`.
The handover then does not happen at once:

- The waiting sCPU stops issuing new instructions.
- It stays selected while ID/EX, EX/MEM or MEM/WB still holds an instruction
  ahead of the `wait` that writes a register (other than r0) or memory. This
  is the `cur_busy` signal.
- Only then does the next task take over.

Bubbles and nops do not count as busy; they simply stay frozen. The drain
therefore takes between zero and three cycles. From the cycle that decodes the
`wait` to the first cycle of the next task is 2 cycles when nothing needs
draining, and at most 5 cycles otherwise. The cost is a jitter of up to three
cycles on a voluntary switch. The benefit is that a task that has gone to
sleep never leaves half-finished register writes or stores behind.

The drain belongs to this implementation. The switching jitter of at most three
cycles is the figure quoted for the original design.

## The nHSE scheduler

The scheduler is two modules:

- `register_file_nhse` holds the registers and computes the decision.
- `nhse` registers the decision.

### Events

Each sCPU has seven event latches, `crEV`. The bit order is:

| bit | event |
|-----|-------|
| 0 | time event (TEv) |
| 1 | watchdog (WDEv) |
| 2 | deadline 1 (D1Ev) |
| 3 | deadline 2 (D2Ev) |
| 4 | interrupt (IntEv) |
| 5 | mutex (MutexEv) |
| 6 | synchronisation / message (SynEv) |

Event inputs:

- `ev_in[i][k]` sets latch *k* of sCPU *i* in every cycle it is high.
- `ext_int[i]` is asynchronous. It passes through a two-flop synchroniser and
  sets the IntEv latch on a rising edge. The latch is therefore set on the
  third clock edge after the pin rises, and the sCPU is selected one edge
  later.

`crTR` chooses which events may wake the sCPU; an event is *validated* when
its bit is set in both registers. Among an sCPU's validated events, a priority
encoder picks the one with the highest priority in `crEPR` and reports it in
`grINT_ID`. That lets a woken task find out why it was woken.

### Task states

An sCPU is **ready** when both of these hold:

- its stop bit in `cr0MSTOP` is clear;
- it is not waiting, or it has a validated event.

`wait Rj` is a CTC2 of register Rj to `crTR`. It does three things:

- it loads the new validation mask;
- it clears the events validated by the *old* mask, since they have now been
  handled;
- it puts the sCPU into the waiting state.

After reset every sCPU is ready, and every `crTR` is `0x1` (only the time event
is validated). Each task therefore runs its start-up code, then waits for its
first activation.

### Choosing a task

Priorities come from `mrPRI`. A larger value is more urgent. The reset value
for sCPU *i* is `NR_TASKS-1-i`, so sCPU0 ranks first.

A second priority encoder finds the ready sCPU with the highest priority. Ties
go to the lower index.

If the running sCPU stops being ready (it waits, or is stopped), the candidate
takes over after the drain described above. If the candidate is ready and has
a *strictly* higher priority, the result depends on the running task's own
preemption mode in `crPM`:

| `crPM` of the running task | behaviour |
|---|---|
| `q = 0`, NP = 0 | **fully preemptive**: switch at the next clock edge |
| `q > 0`, NP = 0 | **deferred preemption** (activation-triggered): a counter starts when the higher-priority request appears, and the switch happens exactly `q` cycles later |
| NP = 1 | **non-preemptive**: switch only when the task writes the preemption-point register (`PP`). This supports both the floating non-preemptive-region model (the task sets and clears NP around a region) and task splitting (the task runs NP and marks the boundaries between its sub-jobs with `PP`) |

### Coprocessor-2 programming interface

All scheduler registers are reached with `CTC2 rt, rd` (write) and
`CFC2 rt, rd` (read). These are the MIPS coprocessor-2 move instructions: opcode
`010010`, with rs = `00110` for CTC2 and `00010` for CFC2. The `rd` field names
the register. For the registers that address another sCPU, bits [7:0] of the
instruction name that target sCPU.

For example, `wait r1` is CTC2 r1 to register 0, which encodes as
`0x48C10000`. With `r1 = 0x11` it validates TEv and IntEv.

| rd | register | access | meaning |
|----|----------|--------|---------|
| 0 | `crTR` | R/W, own sCPU | event validation mask; a write is `wait` |
| 1 | `crEV` | R, write 1 to clear, own sCPU | event latches |
| 2 | `crEPR` | R/W, own sCPU | 3-bit priority per event, event *k* in bits [3k+2:3k] |
| 3 | `mrPRI` | R/W, target sCPU | task priority, `PRI_W` bits |
| 4 | `grINT_ID` | R, own sCPU | `{valid, 28'b0, event id}` |
| 5 | `cr0MSTOP` | R/W | one stop bit per sCPU |
| 6 | `crPM` | R/W, own sCPU | [15:0] deferral `q` in cycles, [16] non-preemptive flag |
| 7 | `PC_nHSE` | R/W, target sCPU | start address: the next time the target is selected, it fetches from here (issued once) |
| 8 | `PP` | W | preemption point |
| 9 | `grSSF` | R | ready flags of all sCPUs |

## The pipeline

The pipeline is IF, ID, EX, MEM, WB, and everything is on one clock.

**IF.** The fetch address is chosen by a chain of multiplexers. From lowest to
highest precedence:

1. the selected sCPU's PC;
2. the branch or jump target computed in ID;
3. `exception_pc`;
4. the PC loaded through the nHSE.

The fetched PC + 4 is written back into the selected sCPU's PC.

**ID.** This stage does the following:

- It decodes the instruction (`control_unit`).
- It reads the selected register bank, and forwards results from MEM and WB.
- It compares the operands in `cond_test_unit`, which produces eq, gz, lz, gez,
  lez and zero.
- It resolves branches, `j`, `jal`, `jr` and `jalr`.

The target is fetched in the same cycle, so taken branches cost nothing and
there is **no branch delay slot**. CTC2 and CFC2 also execute here: the write
data goes straight to the scheduler, and a read returns the value
combinationally.

**EX.** The ALU takes its operands from ID/EX, with a bypass from EX/MEM.
`div` and `divu` start the sCPU's own divider.

**MEM and WB.** Loads and stores are word-sized, and results are written back
to the selected register bank.

**Stalls** (`hazard_unit`) keep the instruction in ID in three cases:

- a load in EX whose result is needed (load-use);
- a branch, `jr`, CTC2 or divide whose operand is still being computed in EX;
- `mfhi`, `mflo` or a new divide while the divider is busy.

The divider is a restoring shift-subtract design and is busy for 32 cycles.

**Redirect.** A PC loaded through the nHSE, or an exception request, flushes
the selected sCPU's IF/ID and ID/EX registers.

**Instructions.** The pipeline decodes:

- register-register: add, addu, sub, subu, and, or, xor, nor, slt, sltu;
- shifts: sll, srl, sra, sllv, srlv, srav;
- immediate: addi, addiu, slti, sltiu, andi, ori, xori, lui;
- memory: lw, sw;
- branches and jumps: beq, bne, blez, bgtz, bltz, bgez, j, jal, jr, jalr;
- divide: div, divu, mfhi, mflo;
- coprocessor 2: CTC2, CFC2.

Anything else is a no-op. Overflow does not trap.

## Module hierarchy

```
nmpra                      top: the pipeline, per-sCPU state, glue
├── if_stage               per-sCPU PCs and the fetch-address multiplexer chain
├── instr_mem              instruction memory (with a load port)
├── control_unit           decoder
├── gpr_bank               NR_TASKS x 32 x 32-bit registers, 2 read / 1 write
├── forward_unit           ID and EX operand forwarding
├── cond_test_unit         branch comparisons
├── hazard_unit            stall conditions
├── alu
├── divider  (x NR_TASKS)  32-cycle divider with HI/LO
├── data_mem
├── register_file_nhse     scheduler registers, events, task states, decision
│   └── nhse_prio_enc (x NR_TASKS+1)   event and task priority encoders
└── nhse                   registered scheduler outputs
nmpra_pkg                  shared types, opcodes, scheduler register numbers
```

## Parameters

| parameter | default | notes |
|---|---|---|
| `NR_TASKS` | 8 | number of sCPUs; 4 and 16 also elaborate |
| `PRI_W` | 8 | width of `mrPRI` |
| `IMEM_WORDS`, `DMEM_WORDS` | 4096 | memory depth in 32-bit words |
| `RESET_STRIDE` | 0x400 | sCPU *i* starts at byte address *i* x `RESET_STRIDE` |

With `NR_TASKS = 16`, the reset addresses run up to 0x3C00. That is still
inside the 16 KiB instruction memory.

## Top-level interface

| port | dir | meaning |
|---|---|---|
| `clk`, `rst` | in | one clock; synchronous, active-high reset |
| `ext_int[NR_TASKS]` | in | asynchronous interrupt per sCPU (IntEv) |
| `ev_in[NR_TASKS][7]` | in | the other event lines, for timers, watchdogs, mutex and message units outside this RTL |
| `exception_req`, `exception_pc` | in | redirect the selected sCPU; intended for an exception unit |
| `imem_load_we/addr/data` | in | write the instruction memory (hold `rst` while loading) |
| `nhse_task_select` | out | sCPU that owns the pipeline this cycle |
| `nhse_en_scpu` | out | some sCPU is enabled (low when none is ready) |
| `grssf` | out | ready flags |

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing -y rtl rtl/nmpra_pkg.sv tb/tb_nmpra.sv --top-module tb_nmpra
./obj_dir/Vtb_nmpra
```

Substitute any other bench in `tb/`. Each bench prints
`TB_RESULT checks=N failures=M` and stops. Each also has a watchdog that
counts a failure if the run hangs.

## What the tests show

- **`tb_nmpra`** runs the full default design. It assembles a multitasking
  program for all eight sCPUs in the bench, loads it, runs it, and compares
  memory contents and timing with values worked out by hand. The program
  covers:
  - forwarding, load-use, branch and HI/LO stalls;
  - taken branches, jal/jr and division;
  - `wait` and wake-up by an interrupt and by time events;
  - fully preemptive, deferred (q = 20, switch checked at exactly 20 cycles)
    and non-preemptive-with-preemption-point behaviour;
  - PC loading through the scheduler, exception redirect, stop bits and
    priority changes.

  It counts each of these mechanisms and fails any that never occurred. It also
  checks that its assembler produces the reference encodings `0x20010011`
  (`addi r1, r0, 0x11`) and `0x48C10000` (`wait r1`).
- **`tb_table2_schedule`** runs a classic three-task set through the scheduler.
  The tasks are:

  | task | C | T | D |
  |---|---|---|---|
  | τ1 | 2 | 7 | 6 |
  | τ2 | 3 | 12 | 10 |
  | τ3 | 7 | 22 | 17 |

  The bench plays the processor, with one time unit equal to 64 cycles. It
  compares the running task in every time unit, and each job's completion,
  with a reference model of each policy. τ3's first job ends at these times:

  | mode | τ3 ends | deadline 17 |
  |---|---|---|
  | fully preemptive, deadline-monotonic | unit 19 | missed |
  | deferred preemption, q3 = 2 units | unit 14 | met |
  | τ3 split into non-preemptive sub-jobs of 5 and 2 | unit 14 | met |

  Each job runs 2 cycles short of its worst case, leaving room for the cycle
  or two the scheduler needs per switch.
- **One bench per module** (`tb_<module>`). These use exhaustive or random
  stimulus against independent models. Examples: the divider's quotient,
  remainder and 32-cycle latency; every decoded opcode; priority-encoder ties;
  multiplexer precedence; the deferred switch landing exactly *q* cycles after
  the request.

## Where this RTL departs from the original nMPRA, and what is left out

- **One clock.** The original runs the CPU at 33 MHz and the on-chip memory at
  twice that rate. Here both memories are combinational-read arrays on the CPU
  clock. To map them onto block RAM, add a registered read on a faster clock,
  or add a pipeline stage.
- **No delay slot.** The original feeds ID-stage targets straight into the
  fetch multiplexer, and this RTL does the same. As a result it does not run
  MIPS code that relies on a branch delay slot.
- **Scheduler register layout is this design's own.** The original gives the
  register names but no numbering or bit layout. That covers the `rd` numbers,
  `crPM`, the `PP` register, `crEPR`'s 3-bit fields, `grINT_ID`'s format and
  the use of `grSSF` as ready flags. Only `wait` = CTC2 to register 0 matches a
  published encoding.
- **Scheduler writes in ID.** CTC2 writes the scheduler registers in the
  decode stage, using the forwarded register value. The original block also
  takes write-back-stage signals, so it may commit these writes later. A
  write-back commit would add up to three cycles to every switch.
- **Select width.** `nhse_task_select` is a binary index of
  `$clog2(NR_TASKS)` bits, not a fixed 8-bit field.
- **Freezing on preemption.** A preempted task's in-flight store completes only
  when the task resumes. A `wait`, by contrast, drains first.
- **Not included:**
  - coprocessor 0 (exceptions are only a redirect port);
  - the memory controller;
  - the clock generator (a vendor clocking IP);
  - the UART and human-machine interface of the surrounding system;
  - the timer, watchdog, deadline, mutex and message units. Their event lines
    are inputs.

## Size

Generic synthesis of the default top (Yosys, memories kept as memory cells)
gives about 1,500 flip-flop bits and about 1,600 coarse cells. It also gives
about 274 kbit of memory: the two 128 kbit memories, plus the register banks and a few small per-sCPU arrays.

The flip-flops are mostly the eight copies of the pipeline registers and
dividers. That per-sCPU duplication is the price of switching in zero cycles.
