# FASTCHART: a processor with its real-time kernel in hardware

Hard real-time software needs to know, before it runs, how long every path will take. A
conventional processor makes that hard: pipelines, caches, DMA and interrupts make instruction
times vary, and a software real-time kernel takes longer the more tasks are ready or delayed.
FASTCHART removes both sources of jitter. Its CPU has no pipeline, no cache, no DMA and no
interrupts, so every instruction takes a fixed one or two CPU cycles. The whole real-time
kernel is a separate hardware unit, the **Real Time Unit (RTU)**, which runs alongside the
CPU. The RTU keeps the state of every task, schedules by static priority, counts delays and
switches tasks. The CPU loses no time on any of this: a task switch costs one CPU cycle,
because the next task's registers are already waiting in a second register file.

This repository is a synthesizable SystemVerilog model of that machine in its full
configuration: 64 tasks, 8 priority levels, ready FIFOs of depth 8, eight 16-bit general
registers and an RTU clocked ten times faster than the CPU. It follows the published FASTCHART
architecture. Where that architecture leaves details open, this design makes its own choices.
The instruction encoding, the data width and the exact order in which the control unit acts
are among them. They are listed in [Departures and own choices](#departures-and-own-choices).

## Tasks and their four states

Every task is in exactly one of four states. Each state has its own block in the RTU:

| state      | where the task id is held                                 | block (module)     |
|------------|------------------------------------------------------------|--------------------|
| executing  | register OLD (and its registers in the CPU's register file) | `rtu`              |
| ready      | the FIFO of its priority, or register NEW                  | `ready_queue`      |
| waiting    | its entry in the wait block, with a down-counter           | `wait_queue`       |
| terminated | its INAC flag in the terminate block                       | `terminate_block`  |

A task changes state only through three real-time calls, which are CPU instructions:

- **ACTIVATE id, prio, start**: moves a *terminated* task to ready, with the given priority
  and start address. ACTIVATE of a task that is not terminated has no effect.
- **DELAY n**: the executing task waits for `n` system time ticks, then becomes ready again.
- **TERMINATE**: the executing task terminates. Only another task can activate it again.

The RTU adds one more transition. When a ready task has a strictly higher priority than the
executing one, it **preempts** it, and the preempted task goes back to ready. Tasks of equal
priority never preempt each other. A task runs until it delays, terminates or is preempted;
there is no time slicing.

After reset, task 0 is executing at priority 7 (the highest) from address 0, and all other
tasks are terminated. Task 0 is the place to activate the rest.

## The task switch

This is the heart of the design, and the part most worth understanding before changing
anything.

**Two register files.** The CPU's entire programming model exists twice: R0..R7, the status
register SR, the program counter PC and the instruction latch IL (`register_files`). The CPU
works on the *active* bank. The RTU reads and writes the *shadow* bank one word per RTU clock.
A pulse on `swap` exchanges the two banks at a clock edge.

**OLD and NEW.** The RTU keeps two task registers. OLD holds the executing task. NEW holds the
task that will run next; it is always the best ready task. Its context is loaded into the
shadow bank as soon as it is chosen, so it is ready before it is needed.

**One switch, start to finish:**

1. The CPU executes DELAY or TERMINATE, or the RTU decides to preempt. For DELAY and TERMINATE,
   the RTU takes the call, records the task in the wait or terminate block, and holds every
   other action until the switch.
2. At the next CPU cycle boundary (`cpu_ce` high and the CPU's `switch_ok` high), the RTU
   pulses `swap`. In that one CPU cycle the CPU executes nothing; from the next cycle on it runs
   NEW's code. If there is no NEW (no task is ready), the CPU switches to an empty bank and
   idles until the RTU dispatches a task.
   On preemption, OLD's id goes back into its ready FIFO in that same clock.
3. **SAVE** (11 RTU clocks): the old task's context, now in the shadow bank, is written to TCB
   memory at `OLD.id * TCB_SIZE + register counter`, word by word. Then OLD := NEW and NEW is
   empty.
4. **Refill and LOAD** (1 + 12 RTU clocks): the head of the highest non-empty ready FIFO
   becomes NEW, and its context is read from TCB memory into the shadow bank.

At the default clock ratio of 10, the RTU is ready for the next switch about 2.5 CPU cycles
after a switch. If a higher-priority task becomes ready while NEW is waiting, it replaces
NEW, and the displaced task goes back into its FIFO. So NEW is always the task that should run
next.

The CPU only lets a switch happen between instructions, never in the second cycle of a
two-cycle instruction and never while a real-time call is waiting for the RTU. Because the
context includes IL (the already-fetched next instruction), a task resumes exactly where it
stopped.

**NOT-SWITCH.** Two instructions set and clear the CPU's NOT-SWITCH flag. While the flag is
set, the RTU does not preempt the executing task. The task can still leave by its own DELAY or
TERMINATE. Every task switch clears the flag. Use it to protect a short read-modify-write of
shared data.

## The RTU control unit

The control unit is one state machine (IDLE, SAVE, LOAD, INIT) inside `rtu`. In IDLE it takes
one action per RTU clock, in this order:

1. **Switch** (see above): a pending DELAY or TERMINATE, a preemption (NEW's priority above
   OLD's, NOT-SWITCH clear), or dispatch to an idle CPU.
2. **Refill**: NEW is empty or outranked by the ready queue. This starts LOAD.
3. **Real-time call** from the CPU (`rt_valid`). It is acknowledged in the clock it is taken.
   An ACTIVATE that takes effect enters INIT for 3 clocks. INIT writes SR = 0, PC = start
   address and IL = NOP into the new task's TCB. Its general registers keep whatever they held.
4. **Expiry**: a delayed task whose counter reached zero is moved to its ready FIFO. When
   several expire together, the lowest id goes first.

The **system time tick** is generated here: one tick every `TICK_DIV` CPU cycles (default 1),
so `DELAY 16` means 16 CPU cycles. A counter loaded with `n` expires on the `n`-th tick.

**Full ready FIFOs.** Each priority has 8 slots, and NEW holds one more task. An expiry, a
preemption or a NEW push-back that meets a full FIFO waits until the FIFO has room. An ACTIVATE
into a full FIFO is *refused*: the task stays terminated and the `fifo_full` event is raised.
Waiting would deadlock: the activating task would hold the CPU while waiting for a FIFO that
can only drain once it lets go. With at most 8 tasks per priority, no FIFO ever overflows.

## The CPU

A 16-bit load/store machine (`cpu`, with `alu` and `shifter`). R0 is the return-stack pointer;
any register can serve as a data-stack pointer.

**Timing.** In every CPU cycle the CPU executes the instruction in IL. In the same cycle it
fetches the next one from `mem[PC]` into IL and increments PC. An instruction with an extra
memory access (LOAD, STORE, CALL, RET, ACTIVATE) uses its first cycle for that access and
fetches in a second cycle. Every other instruction, including taken branches and jumps (which
fetch straight from the target), takes one cycle. Main memory answers within the cycle, so
these numbers hold with no exceptions.

**Instruction set** (opcode in bits 15:12; `rd`, `rs`, `ra` are 4-bit register fields, of
which the low 3 bits are used with 8 registers):

| opcode | mnemonic                 | fields                          | action                                          | cycles |
|--------|--------------------------|---------------------------------|-------------------------------------------------|--------|
| 0      | NOP / RET / TERMINATE / SETNS / CLRNS | [11:8] = 0 / 1 / 2 / 3 / 4 | RET: PC = mem[R0++]                           | 1 (RET 2) |
| 1      | ALU rd, rs, op           | rd, rs, op[3:0]                 | rd = shift(rd op rs); flags Z C N V             | 1      |
| 2      | LDI rd, imm8             | rd, imm8                        | rd = imm8 (zero-extended)                       | 1      |
| 3      | LDHI rd, imm8            | rd, imm8                        | rd[15:8] = imm8                                 | 1      |
| 4      | ADDI rd, simm8           | rd, simm8                       | rd = rd + simm8; flags                          | 1      |
| 5      | LOAD rd, (ra) / (ra)+ / -(ra) | rd, ra, mode[1:0] = 0/1/2  | rd = mem[address]                               | 2      |
| 6      | STORE rs, (ra) / (ra)+ / -(ra) | rs, ra, mode              | mem[address] = rs                               | 2      |
| 7      | Bcc offset               | cond[11:8], simm8               | if cond: PC = PC + simm8 (PC is past the branch) | 1      |
| 8      | JMP addr                 | addr12                          | PC = addr12                                     | 1      |
| 9      | CALL addr                | addr12                          | mem[--R0] = PC; PC = addr12                     | 2      |
| A      | ACTIVATE id, prio        | id[11:6], prio[5:3]; next word = start address | real-time call            | 2      |
| B      | DELAY n                  | imm12                           | real-time call                                  | 1      |

ALU operations: 0 ADD, 1 SUB, 2 AND, 3 OR, 4 XOR, 5 MOV, 6 NOT, 7 CMP (flags only). Shifter
operations 8 SHL, 9 SHR and 10 ASR shift `rs` by one place. The flags are SR bit 0 Z, bit 1 C
(carry; borrow for SUB/CMP; the bit shifted out for shifts), bit 2 N, bit 3 V. Branch
conditions: 0 always, 1 EQ, 2 NE, 3 CS, 4 CC, 5 MI, 6 PL. Reserved opcodes execute as NOP.
`tb/fastchart_asm.sv` has one encoder function per instruction.

**Real-time calls.** ACTIVATE, DELAY and TERMINATE put a request (`rt_req_t`) to the RTU, and
the CPU stalls until `rt_ack`. After DELAY or TERMINATE the task may not continue, so the CPU
waits in a blocked state until the RTU switches it out. With the RTU running ten times faster,
an idle RTU answers within the same CPU cycle.

## Task control blocks

`tcb_memory` holds one context per task: 11 words at `id * 11`. The words are R0..R7 at
offsets 0..7, then SR at 8, PC at 9 and IL at 10; the register files use the same order. With
64 tasks that is 704 words of 16 bits. `NREGS = 16` grows a context to 19 words.

## Parameters

| parameter     | default | meaning                                   | where set |
|---------------|---------|-------------------------------------------|-----------|
| `NUM_TASKS`   | 64      | task ids                                  | top, rtu, queues |
| `NUM_PRIO`    | 8       | priority levels, one ready FIFO each; 7 is the highest | top, rtu, queues |
| `FIFO_DEPTH`  | 8       | depth of each ready FIFO                  | top, rtu, ready_queue |
| `NREGS`       | 8       | general registers (8 or 16)               | top, cpu, register_files, rtu |
| `CPU_CLK_DIV` | 10      | RTU clocks per CPU cycle                  | top |
| `TICK_DIV`    | 1       | CPU cycles per system time tick           | top, rtu |
| `MEM_WORDS`   | 1024    | words of main memory                      | top |
| `TIMER_W`     | 12      | width of a delay counter                  | rtu, wait_queue |

The ACTIVATE encoding carries a 6-bit id and a 3-bit priority, so 64 tasks and 8 priorities
are the largest values the instruction set can name. Larger `NUM_TASKS` or `NUM_PRIO` would
need a wider ACTIVATE.

## Module map

| file                      | contents |
|---------------------------|----------|
| `rtl/fastchart_pkg.sv`    | widths, instruction encoding, context layout, `rt_req_t`, `rtu_events_t` |
| `rtl/fastchart_top.sv`    | CPU + register files + RTU + main memory; CPU clock enable |
| `rtl/cpu.sv`              | instruction execution, fetch, real-time call handshake, NOT-SWITCH flag |
| `rtl/alu.sv`, `rtl/shifter.sv` | datapath |
| `rtl/register_files.sv`   | the two banks and their exchange |
| `rtl/rtu.sv`              | control unit, OLD/NEW, TCB addressing, time tick |
| `rtl/ready_queue.sv`      | priority FIFOs |
| `rtl/wait_queue.sv`       | per-task delay counters |
| `rtl/terminate_block.sv`  | per-task INAC flags |
| `rtl/tcb_memory.sv`       | saved contexts |
| `rtl/main_memory.sv`      | program/data RAM with a load port |

Everything runs on one clock `clk`. The CPU, its register writes and main-memory writes take
effect only on edges where `cpu_ce` is high (one in `CPU_CLK_DIV`); the RTU works on every
edge. Reset `rst_n` is asynchronous and active low. The top's `events` output raises one flag
per RTU clock for each mechanism that acted: preempt, voluntary, dispatch, to_idle, refill,
new_pushback, expire, activate, act_ignored, fifo_full and ns_hold (a preemption held back by
NOT-SWITCH).

## Simulating

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/fastchart_pkg.sv tb/fastchart_asm.sv tb/tb_fastchart_top.sv --top-module tb_fastchart_top
./obj_dir/Vtb_fastchart_top
```

Replace the testbench name to run another one. Uninitialised state is random in a two-state
simulator. Every register that is read is reset, but TCB and main memory contents are not.

| testbench              | what it shows |
|------------------------|---------------|
| `tb_fastchart_top`     | 13 tasks for 4000 CPU cycles at full size: the counters of every task survive every switch, NOT-SWITCH sections keep a shared counter consistent, a refused ACTIVATE never runs, and every RTU mechanism occurs |
| `tb_prototype_program` | the classic four-task demo (an init task starts three tasks that loop on `DELAY 16`), run on the full machine and on one cut to 8 tasks and 2 priorities: dispatch order by priority and a constant 20-CPU-cycle period per task |
| `tb_regs16`            | the machine built with 16 registers: three tasks keep their state in R11..R15 through hundreds of switches and preemptions |
| `tb_all_tasks`         | 64 tasks on 8 priorities: all activations fit, the first round is dispatched in priority and FIFO order, and every task runs |
| `tb_rtu`               | the state diagram step by step with the CPU side driven directly: a one-CPU-cycle voluntary switch, expiry on the exact tick, preemption held by NOT-SWITCH, context restored from TCB memory, idle |
| `tb_cpu`               | a program checking every memory write's address, value and CPU cycle (1- and 2-cycle timing), the call handshake and stall, blocking after DELAY, and running on the other bank |
| `tb_alu`, `tb_shifter`, `tb_register_files`, `tb_ready_queue`, `tb_wait_queue`, `tb_terminate_block`, `tb_tcb_memory`, `tb_main_memory` | each unit against an independent model |

Test programs are built in the testbenches with the encoder functions of
`tb/fastchart_asm.sv` and loaded through the top's `ld_*` port while reset is held.

## Departures and own choices

Taken from the FASTCHART architecture: the split into a CPU without pipeline, cache or
interrupts and a concurrent RTU; the one/two-cycle instruction timing; R0 as return-stack
pointer and `(R)+` addressing; the two register files exchanged on a task switch; the four task
states and three real-time calls; 64 tasks and 8 priorities; ready FIFOs of depth 8 served
highest first; per-task delay counters on a system tick; INAC flags; the OLD/NEW registers;
TCB addressing as id × TCB size + register counter; write-back of OLD and load of the next
task after the exchange; the preempted task going back to the ready queue; an RTU clock ten
times the CPU clock; and the NOT-SWITCH flag between CPU and RTU.

Chosen here:

- A 16-bit data path and address bus. The instruction encoding, the flag layout, the branch
  conditions and one-place shifts.
- ACTIVATE as a two-word instruction, with the start address in the second word.
- The meaning of NOT-SWITCH: it holds off preemption only, and is cleared on every switch.
- Priority 7 is the highest.
- NEW preloaded before the switch, and replaced if a better task arrives.
- An idle CPU state when no task is ready.
- The action order of the control unit. Refusing ACTIVATE into a full FIFO.
- The TCB initialisation on ACTIVATE. Task 0 as the task that runs after reset.
- A context transfer of one word per RTU clock. With the default ratio it takes longer than
  one CPU cycle. This is hidden because the next context is preloaded, but two switches
  within about three CPU cycles of each other wait for the transfer.
- One clock with a CPU enable, instead of two clocks.
- The system tick equal to one CPU cycle.
- A 1024-word main memory with a program-load port.

Known limits:

- A task of the highest ready priority that never delays or terminates keeps the CPU forever,
  and lower priorities can starve. That is what static-priority scheduling does, and the
  design adds no time slicing or budget.
- A context is 22 bytes with 8 registers. Storage for larger task sets grows with the TCB
  memory.
