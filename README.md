# HW_nMPRA_RTOS: a MIPS32 pipeline with a hardware scheduler and one context per thread

A real-time operating system spends time and adds jitter every time it changes
tasks. It saves registers, picks the next task in software and restores that
task's state. This design removes both steps. Every storage element that makes
up a thread's context exists once per hardware thread:

- the program counter;
- the 32-register file;
- the four pipeline registers (IF/ID, ID/EX, EX/MEM, MEM/WB);
- HI and LO of the multiply/divide unit;
- the coprocessor 0 registers.

The combinational logic of the five-stage MIPS32 pipeline is shared. A
scheduler in hardware, the nHSE (n-thread Hardware Scheduler Engine), decides on
every clock which copy the pipeline works on. A context switch is therefore a
change of one select signal, and nothing is moved.

The scheduler is attached to the CPU as coprocessor 2 (COP2). Software drives it
with ordinary coprocessor moves: it enables events, sets their priorities,
attaches external interrupts to threads and gives up the CPU. When an
interrupt attached to a thread arrives, that thread's PC is loaded with the
interrupt's entry address (its "trap cell") and the thread owns the pipeline
three clocks after the interrupt edge.

The SystemVerilog here is synthesizable. It builds the processor, the
scheduler, a 592 KiB dual-port on-chip memory, an LED register, a switch port
and a bus for external devices. The defaults are the published configuration:
4 hardware threads and 4 external interrupt event lines.

## Names used throughout

| Term | Meaning |
|---|---|
| HW_thread_i | The i-th set of context storage (PC, registers, pipeline registers, COP0). |
| instPi, sCPUi | The thread that runs on HW_thread_i. |
| nHSE_Task_Select | The scheduler output that selects which copy every stage reads and writes. |
| nHSE_EN_sCPUi | The scheduler output that enables the pipeline. It is low when no thread is ready. |
| Trap cell | The fixed entry address for an external interrupt: `0x1000 + 0x40*j` for interrupt j. |
| "wait" | A CTC2 write to the thread's crTR that clears bit 7. It tells the scheduler the thread has nothing more to do. |

## How the multiplied context works

`mt_pipe_reg`, `pc_reg`, `register_file` and `cop0` all follow the same
pattern. They hold NTHREADS copies of their state, and they read and write only
the copy that `nHSE_Task_Select` names. Stall and flush also act on that copy
only. The other copies stay exactly as they were.

Here is what happens when the scheduler switches from thread A to thread B in
the middle of a program:

1. On the clock after the switch, IF fetches at B's PC. ID decodes what sits in
   B's IF/ID copy, EX works on B's ID/EX copy, and so on.
2. A's partly executed instructions stay in A's pipeline-register copies. They
   are neither flushed nor completed.
3. When A is selected again, its instructions continue from the stage where
   they stopped. Nothing is replayed.

This is why there is no save or restore cost. It also means the forwarding
and hazard logic only ever compares instructions of the same thread, because
all the stage contents it sees belong to the selected copy.

The pipeline is enabled only while a thread is ready (`nHSE_EN_sCPUi`). When
it is disabled, no copy is written. This includes the register file, the PC and
COP0.

A data access waiting for its Ready signal holds a switch off. The processor
drives `nHSE_inhibit_CC` while a data access waits, and the scheduler freezes
its state machine while that signal is high. A load or store therefore
completes before its thread is preempted.

The same signal makes LL/SC sequences atomic:

1. An LL that leaves MEM sets its thread's link bit.
2. While the link bit is set, `nHSE_inhibit_CC` stays high. It is also high
   while an LL is still in EX or MEM. Because the thread select is registered
   one clock behind the state machine, a switch decided as the LL leaves MEM
   would otherwise land after the load.
3. The SC stores and writes 1 to rt if the link bit is set. Otherwise it
   stores nothing and writes 0. Either way it clears the bit.
4. An exception or ERET in the thread also clears the bit, so only those make
   an SC fail.

No other thread runs between an LL and its SC. A thread that issues an LL and
never reaches the SC therefore keeps the processor, even if it executes the
wait instruction. Higher-priority threads and their interrupts are held off in
the same way.

## The nHSE scheduler (`rtl/nhse.sv`)

### Registers

Each thread i has its own registers:

| Register | Meaning |
|---|---|
| `crTRi` | Event enable ("validated"). One bit per event. |
| `crEVi` | Event occurred ("pending"). One bit per event. |
| `crEPRi` | A 3-bit priority per event. Event k uses bits `[3k+2:3k]`. A smaller number is more urgent. |
| `mrCntRuni` | Counts the clocks in which thread i owned the running pipeline. |
| `mrTEVi` | Time-event counter. Software writes a count; it decrements every clock, and reaching zero sets the time event. |

Two registers are global:

| Register | Meaning |
|---|---|
| `cr0MSTOP` | Bit i allows thread i to run at all. |
| `grINT_IDj` | The thread that external interrupt j is attached to. |

Event bit numbers in `crTR`/`crEV`:

| Bit | Event | Bit | Event |
|---|---|---|---|
| 0 | time (`mrTEV` reached zero) | 4 | external interrupt |
| 1 | watchdog | 5 | mutex |
| 2 | deadline 1 | 6 | synchronisation message |
| 3 | deadline 2 | 7 | run / event in service |

At reset every thread has `crTR = crEV = 0x80`, so the run event is enabled and
pending. Only thread 0 has its `cr0MSTOP` bit set. Thread 0 therefore starts
alone, and it decides which other threads may run.

Only the time event and the external interrupts have sources in this RTL. The
watchdog, deadline, mutex and message bits can be enabled, set by software
and prioritised, but no hardware raises them.

### Choosing the thread

A thread is ready when `cr0MSTOP[i]` is set and `crTRi & crEVi` is not zero,
that is, some enabled event is pending. The state machine holds either
`FSM_WAIT` (no thread ready) or `FSM_sCPUi`. In `FSM_sCPUi`, i is the ready
thread with the lowest index, so thread 0 always wins. `nHSE_Task_Select` and
`nHSE_EN_sCPUi` are registered copies of the state.

A thread gives up the processor by clearing its own bit 7 with a CTC2 to
`crTR`: the "wait" instruction. It stays ready if another of its enabled
events is still pending.

### Interrupt events

An external interrupt is handled in four parts.

1. **Capture.** A rising edge on `ExtIntEv[j]` marks interrupt j pending. It
   also sets bit 4 of `crEV` in the thread that `grINT_IDj` names. That
   thread becomes ready if bit 4 is enabled in its `crTR`.

2. **Acceptance.** While the state machine runs that thread, the interrupt is
   accepted when all of these hold:
   - bit 4 is enabled and pending;
   - the mutex event (5) is not enabled, pending and of strictly higher
     priority than the interrupt event in `crEPR`;
   - the same is true of the message event (6);
   - the thread is not already serving an event.

   If several attached interrupts are pending, the lowest-numbered one wins.

3. **Entry.** On acceptance, in one clock, the scheduler:
   - records the event and the interrupt number in internal
     "serving" registers;
   - sets bit 7 in both `crEV` and `crTR`, so the thread stays runnable while
     it serves the interrupt;
   - clears bit 4 of `crEV` and the pending mark of interrupt j;
   - pulses `PC_nHSE_Sel` with `PC_nHSE_Out = 0x1000 + 0x40*j`.

   The processor loads this address into the thread's PC and drops the
   instruction the thread had just fetched.

4. **End of service.** The handler ends with the wait instruction. A CTC2 to
   `crTR` with bit 7 clear resets the serving registers and clears bit 7 of
   `crEV`. A new interrupt can then be accepted for that thread.

An interrupt is never half accepted. If the thread is busy serving, the event
stays pending in `crEV` bit 4 and the interrupt stays pending in the scheduler.
It is taken after the wait instruction.

### Response time

From the rising edge of `ExtIntEv[j]` to the first pipeline clock of the
attached thread takes three clocks:

1. The edge is captured in `crEV`.
2. The state machine moves to the thread.
3. Task select and enable follow the state.

The trap-cell load happens in the first clock the thread runs. If the running
thread has a data access waiting, the switch waits for it to finish. The
end-to-end test measures 3 clocks from an idle processor and 4 clocks with a
one-clock I/O access in progress. At 33 MHz, 3 clocks are 91 ns. The original
board measurement was 75 ns with up to 30 ns of jitter.

### COP2 instruction map

All moves act on the current thread's registers. `sel` is the immediate field,
bits 15:0 of the instruction.

| Instruction | sel | Register |
|---|---|---|
| CFC2 / CTC2 `rt, sel` | 0 | `crTR` |
| | 1 | `crEV` |
| | 2 | `crEPR` |
| | 4 | `cr0MSTOP` |
| | 8+j | `grINT_IDj` |
| MFC2 `rt, sel` | 0 | `mrCntRun` |
| | 1 | `mrTEV` |
| MTC2 `rt, sel` | 1 | `mrTEV` (`mrCntRun` is read only) |
| LWC2 / SWC2 `sel, off(base)` | as CFC2 / CTC2 | control register, with `sel` in the rt field |

Encodings are the standard MIPS32 coprocessor-move encodings: opcode
`010010`, rs = `00000` MF, `00010` CF, `00100` MT, `00110` CT. For example,
`48C10000` is `CTC2 r1, 0`, a write of r1 to `crTR`, which is the wait
instruction when bit 7 of r1 is clear.

LWC2 and SWC2 move a control register to or from data memory. The word address
is `base + off`, as for LW and SW. The register operand is not a GPR: the rt
field holds the selector, using the same map as CFC2 and CTC2. For example,
`swc2 0, 0x3C(r20)` stores `crTR`, and `lwc2 2, 0x10(r20)` loads `crEPR`.

The moves are executed in ID. Two consequences follow:

- A CTC2 or MTC2 stalls like a branch when its source register is produced by
  the instruction just before it.
- Its effect on scheduling is visible before the next instruction of the
  thread leaves ID.

SWC2 also reads its register in ID and carries the value to MEM as store
data. LWC2 has its word only at the end of MEM, so it writes the register from
WB, through a second write path into the scheduler. To keep the order, any
COP2 access of the same thread (MFC2, CFC2, MTC2, CTC2, LWC2, SWC2) waits in
ID while an LWC2 is in EX, MEM or WB. The scheduler also does not switch
threads until that write is done. An LWC2 into `crTR` with bit 7 clear ends a
service, just like the wait instruction.

A typical start-up for thread 0:

```
addi  r1, r0, 0xF     ; let threads 0..3 run
ctc2  r1, 4           ; cr0MSTOP
addi  r2, r0, 1
ctc2  r2, 9           ; grINT_ID1 = thread 1: interrupt 1 belongs to thread 1
addi  r1, r0, 0x10    ; enable only the interrupt event, bit 7 clear
ctc2  r1, 0           ; crTR: wait for an interrupt
```

## The pipeline (`rtl/processor.sv`)

The five stages are IF, ID, EX, MEM and WB.

### Branches and jumps

Branches and jumps resolve in ID, using `compare_unit`. The instruction in the
delay slot always executes.

### Forwarding

Forwarding into ID (for branches, JR, CTC2 and MTC0) and into EX takes the EX/MEM
ALU result or the WB value. A load's data is not forwarded from MEM, so:

- a load followed by a user costs one stall;
- a branch that uses a load result one instruction later costs two stalls;
- a branch that uses an ALU result one instruction later costs one stall.

### Memory

A load or store can take any number of clocks. `mem_controller` holds the
request until the memory's Ready and stalls the pipeline behind it.

LWL and LWR read a whole aligned word and merge part of it into rt. With byte
offset k (byte 0 is the most significant), LWL puts bytes k..3 into the top of
rt. LWR puts bytes 0..k into the bottom. The other bytes of rt are kept, so
these loads read rt like a store reads its data, with the same forwarding.
SWL and SWR write the same byte ranges from rt, using the byte enables. A pair
such as `lwl r1, 1(r2)` / `lwr r1, 4(r2)` loads the unaligned word at r2+1.

Data is big-endian. A thread in user mode with Status.RE set sees its data
little-endian: byte, halfword and LWL/LWR/SWL/SWR accesses use the mirrored
byte offset, and whole words are unchanged. Instruction fetch is always
big-endian.

Instruction fetch has its own Ready. While it is low, IF/ID receives a bubble.

### Exceptions (`rtl/cop0.sv`)

COP0 has Status (IE, EXL, UM, IM, RE, CU0), Cause (BD, CE, IP, ExcCode), EPC and
BadVAddr for each thread. These exceptions are taken:

- AdEL and AdES: misaligned load, store or fetch;
- Ov: ADD, ADDI or SUB overflow;
- Tr: TEQ, TNE, TGE, TLT and the immediate forms;
- Sys and Bp: SYSCALL and BREAK;
- RI: reserved instruction;
- CpU: MFC0, MTC0 or ERET in user mode while CU0 is clear;
- Int: the five hardware interrupts and NMI.

If several stages have an exception in the same clock, the oldest wins: MEM
before EX before ID. The excepting instruction and everything younger are
flushed, and EPC is loaded with the restart PC. If the instruction is in a
delay slot, EPC gets the branch's PC and BD is set. All exceptions go to one
vector at `0x2000`. ERET returns to EPC and clears EXL. No exception is taken
while a data access is waiting.

A thread is in user mode when Status.UM is set and EXL is clear, so every
exception handler runs in kernel mode. User mode only guards COP0. There is no
virtual memory, so addresses are not checked by segment; the I/O registers sit
above `0x8000_0000` and stay reachable. COP2, the scheduler, is open to both
modes.

The COP0 interrupts are separate from the scheduler's `ExtIntEv`. They are
ordinary MIPS interrupts, taken by whatever thread is running.

### Instruction set

Supported:

- arithmetic and logic: ADD, ADDU, SUB, SUBU, AND, OR, XOR, NOR, SLT, SLTU;
- immediate forms: ADDI, ADDIU, SLTI, SLTIU, ANDI, ORI, XORI, LUI;
- shifts: SLL, SRL, SRA and the variable forms;
- conditional moves: MOVN, MOVZ;
- loads and stores: LB, LBU, LH, LHU, LW, SB, SH, SW (big-endian);
- unaligned word parts: LWL, LWR, SWL, SWR;
- branches and jumps: BEQ, BNE, BLEZ, BGTZ, BLTZ, BGEZ, BLTZAL, BGEZAL, J, JAL,
  JR, JALR;
- traps, SYSCALL and BREAK;
- MFC0, MTC0 and ERET;
- MFC2, MTC2, CFC2, CTC2, LWC2 and SWC2;
- MULT, MULTU, DIV, DIVU, MFHI, MFLO, MTHI and MTLO;
- LL and SC, described with `nHSE_inhibit_CC` above.

Multiply and divide are single-cycle combinational operations in EX
(`rtl/muldiv.sv`). An MFHI right after a MULT needs no interlock. Division by
zero leaves LO all ones and HI equal to the dividend.

Not built, and decoded as reserved instructions:

- the SPECIAL2 group (MUL, MADD, MSUB, CLZ and the rest);
- branch-likely (BEQL, BNEL, BLEZL, BGTZL, BLTZL, BGEZL, BLTZALL, BGEZALL),
  which the published core leaves out as well.

### Start addresses

Thread i starts at `0x400*i`. Trap cells are at `0x1000 + 0x40*j` and the
exception vector is at `0x2000`. All of these are parameters of `processor`.

## The system (`rtl/soc_top.sv`)

Data addresses are decoded on byte-address bits 31:28:

| Address | Device | Answer |
|---|---|---|
| `0xC000_0000` | LED register (14 bits, `led_port`) | one clock |
| `0xD000_0000` | switches (8 bits, `switches_port`) | one clock |
| `0xE000_0000` | external bus `io_*` | when `io_ack` is high |
| anything else | on-chip memory, `bram_dp` | same clock |

The on-chip memory has 151552 words (592 KiB), an 18-bit word address, and
port A for instructions and port B for data.

The external bus is for the devices that sit outside this RTL: the UART boot
loader and the character LCD of the original board. The published program
writes `0xF0` to the LED register through `sll r14, r14, 30` (r14 = 3, giving
`0xC000_0000`).

`LED[13:0]` show the LED register. `LED[14]` shows `nHSE_EN_sCPUi`, that is,
whether some thread is running. `reset_n` is active low, and the whole system
runs on one clock.

## Files

| File | Contents |
|---|---|
| `rtl/nmpra_pkg.sv` | Opcodes, ALU operations, the control word and the pipeline-register structs. |
| `rtl/mt_pipe_reg.sv`, `pc_reg.sv`, `register_file.sv` | The per-thread storage. |
| `rtl/alu.sv`, `muldiv.sv`, `compare_unit.sv`, `trap_detect.sv`, `control_unit.sv`, `hazard_control.sv`, `mem_controller.sv` | Pipeline logic. |
| `rtl/cop0.sv`, `rtl/nhse.sv` | Coprocessors 0 and 2. |
| `rtl/processor.sv`, `rtl/soc_top.sv` | Assembly of the above. |
| `rtl/bram_dp.sv`, `led_port.sv`, `switches_port.sv` | Memory and I/O devices. |
| `tb/tb_<module>.sv` | A self-checking testbench for each module. |
| `tb/mips_asm_pkg.sv` | Instruction encoder functions used by the program-level tests. |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
ends any run that hangs. For example, with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/nmpra_pkg.sv tb/mips_asm_pkg.sv \
          tb/tb_soc_top.sv --top-module tb_soc_top
./obj_dir/Vtb_soc_top
```

Unit testbenches only need `rtl/nmpra_pkg.sv` and their own file, with `-Irtl`.
Verilator finds the other modules by file name.

`tb_soc_top` runs the complete system at its default size. It loads five small
programs into memory, one per thread plus the interrupt trap cells and an
exception handler:

- thread 3 and the trap cell of interrupt 0 run the published test sequence,
  instruction for instruction;
- thread 1 computes a sum while reading a slow device on the external bus;
- thread 2 enters user mode and traps on an MFC0, takes a system call and an
  overflow exception, multiplies and divides, runs LL/SC, moves scheduler
  registers with LWC2/SWC2, merges unaligned words with LWL/LWR/SWL/SWR, and
  waits for a time event.

The testbench raises two external interrupts and checks:

- the results in memory;
- the LED value;
- the response times;
- that every mechanism happened at least once: thread switches, interrupt
  acceptance, stalls, forwarding into ID and EX, memory waits, inhibited
  switches, exceptions, ERET, the wait state, the time event, multiply/divide
  the LL/SC hold and a COP2 access waiting behind an LWC2.

## Where this design departs from the published one

- **Clocks.** The original board produces a 33 MHz CPU clock and a 66 MHz
  memory and peripheral clock with a vendor PLL. Here everything runs on one
  clock, and memory reads are combinational. A block-RAM version would need one
  wait state, or the memory side on a doubled clock as in the original.
- **Scheduler details.** The event bit numbers, the COP2 selector map, the trap
  cell addresses, the thread start addresses and the fixed thread priority
  (lowest index first) are choices of this design.
- **End of service.** The published acceptance logic tests the "end of service"
  write in the write-back stage. This design does it in ID, together with all
  coprocessor moves except LWC2, which writes from WB.
- **LWC2/SWC2 operand.** The published design lists LWC2 and SWC2 among the
  scheduler instructions but does not say which register they move. Here the
  rt field selects a control register, using the CFC2/CTC2 map.
- **Clearing the interrupt event.** A served interrupt clears its `crEV` bit 4
  on acceptance, so it is not taken twice.
- **Test program.** In the published program the two monitoring-register reads
  at its start encode the same selector (`48060000` and `48020000`, which differ
  only in the destination register). Executed here, both read `mrCntRun`.
- **Multiply/divide.** The original ALU has a stall output for multi-cycle
  operations. Here multiply and divide finish in one clock, which costs a long
  combinational path in EX.
- **Missing event sources.** The watchdog, deadline, mutex and message events
  have no hardware source. Only their enable, pending and priority bits exist.
- **User mode.** User mode only guards the COP0 instructions. There are no
  address-segment checks, because there is no virtual memory and the I/O
  registers sit in the upper half of the address space.
- **Not built.** The UART boot loader, the LCD controller and the clock
  generator are not part of this RTL. Their place is the external bus and the
  clock input.
- **Lint warnings.** Verilator reports a few signals as unused. These are the
  state-machine and ready outputs of the scheduler, and a zero flag of the ALU.
  They are there for observation and testbenches.
