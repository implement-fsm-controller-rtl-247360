# LC3 micro-sequenced control unit with privilege, interrupt and memory-protection support

The LC3 controller is a finite-state machine with 59 states. It has a handful of inputs
that affect its next state (opcode, branch enable, memory ready, privilege bit,
interrupt). In principle its next-state and output functions could sit in one ROM
addressed by {state, inputs}. With 6 state bits and 9 input bits that is 2^15 rows of
46 bits, and almost all of them would be copies, because each state looks at one input
bit at most. A **micro-sequencer** avoids the copies. The ROM (the *control store*) gets
one row per state, 64 rows. Each row carries the state's control signals and a small
description of how to reach the next state. A few gates beside the ROM then fold in the
one input bit that matters.

This RTL builds that controller and the low-cost hardware added to it for privileged
operation:

* TRAP enters supervisor mode through the same path as an exception.
* Interrupts are gated by a priority comparator.
* A vector register supplies the handler addresses.
* A page-based memory protection register flags user-mode accesses to supervisor pages.

A slice of the datapath sits around the controller so that whole instructions can run:
register file, ALU, PSR with condition codes and BEN, IR, MAR and the system bus. Two
generic "ROM as logic" examples are included beside it.

## The micro-sequencer (`lc3_useq`, `lc3_cond_logic`, `lc3_ustore`)

The current state is held in the 6-bit **uMAR**, which addresses the control store.
Every row holds 50 bits:

| field | bits | meaning |
|-------|------|---------|
| IRD   | 1    | 1 only in decode state 32: next state = `{00, IR[15:12]}` |
| COND  | 3    | which input, if any, may modify the jump address |
| J     | 6    | jump address (the next state when no branch is taken) |
| control | 40 | the datapath control signals of this state (`lc3_pkg::ctrl_t`) |

**Decode.** With IRD = 1 the opcode becomes the next state. Every instruction therefore
starts in state `00xxxx`, where xxxx is its opcode. No other state number begins with
`00`, so this costs nothing. For example, ADD (0001) goes from state 32 to state 1.

**Branching.** `lc3_cond_logic` decodes COND into one line per branching code. Line k is ANDed with one
input and ORed into one bit of J. The micro-programmer puts a 0 in that bit of J, so the
two successors differ in exactly that bit:

| COND | input | J bit | example |
|------|-------|-------|---------|
| 0 | none | none | state 1 (ADD) jumps to 18 |
| 1 | R (memory ready) | J[1] | 33 waits on itself, then 35 |
| 2 | BEN | J[2] | BR: 0 goes to 18 (010010) or 22 (010110) |
| 3 | IR[11] | J[0] | JSR: 4 goes to 20 (JSRR) or 21 (JSR) |
| 4 | PSR[15] | J[3] | RTI: 8 goes to 36 or 44 (privilege exception) |
| 5 | INT | J[4] | fetch: 18 goes to 33 or 49 (interrupt) |

The uMAR loads once per clock and resets (synchronously) to fetch state 18. The
control word is read combinationally, so it is valid for the whole cycle spent in a
state. The current state is also an output. Small pieces of logic, such as the state-15
detector below, can decode it without adding control-store columns.

**The micro-program.** `lc3_pkg::ucode()` returns the row for each state, and
`lc3_ustore` fills its 64-entry array from it at elaboration. No data file is read.
Unused rows (17, 19, 28, 30, 46, 53, 55-58, 60-63) assert nothing and jump to 18. The
control word holds:

* the standard LC3 load and gate signals;
* the multiplexer selects;
* MIO_EN, R.W and Set_Priv;
* LD_Priority, which loads PSR[10:8] in the interrupt state.

## Two-way branching (`lc3_useq2`)

A simpler sequencer stores **both** successors in every row (Addr0, Addr1) together with
five one-hot condition bits R, P, B, A, I. The OR of (bit AND input) picks Addr1; decode
keeps the IRD path. It needs 18 next-state bits per row instead of 10, but no decoder
and no bit arithmetic on J.

Its rows are generated from the same micro-program: Addr0 = J, and Addr1 = J with the
COND bit set. The top runs it in lock step with `lc3_useq`, and the end-to-end test
checks every cycle that both are in the same state with the same control word.

## Entering and leaving supervisor mode

PSR[15] is the privilege bit: 1 means user mode. Four events switch to supervisor mode,
and they share one micro-code chain:

| entry state | cause | vector |
|-------------|-------|--------|
| 49 | interrupt (taken at fetch state 18) | `x01` : INTV |
| 13 | illegal opcode 1101 | x0101 |
| 44 | RTI executed in user mode | x0100 |
| 15 | TRAP | `ZEXT(trapvect8)` = x0000-x00FF |

Each entry state loads the Vector register, copies the PSR into the MDR and clears
PSR[15]. It then branches on the *old* PSR[15]. If the program was in user mode, state
45 saves the user stack pointer (R6) and loads the supervisor one. Then:

1. States 37/41 push the PSR.
2. States 43/47/48 push PC-1.
3. States 50/52/54 load the PC from the vector table entry `M[Vector]`.

**RTI** (state 8) pops the PC (36, 38, 39), then the PSR (40, 42), and bumps SP (34).
If the restored PSR says user mode, state 59 swaps the stack pointers back; otherwise
state 51 does nothing.

**TRAP through the exception path.** TRAP no longer has its own states (the old 28/30
rows are empty). State 15 behaves like state 13, except that the vector comes from the
instruction. Adding a new VectorMUX input would need a new control-store column.
Instead, state 15 drives `ZEXT(IR[7:0])` onto the bus through MARMUX. In front of the
Vector register (`lc3_vector_reg`) a 2:1 multiplexer selects the bus whenever the
current state is 15, decoded by a 6-input AND of the state bits. The high byte of the
vector is otherwise the constant x01. Two consequences follow:

* **Bus sharing.** State 15 needs the bus for the trap vector while it also copies
  PSR to MDR. Here the bus carries the vector (an assertion in the top allows two bus
  drivers only in state 15), so the MDR needs its own path from the PSR.
* **Saved PC.** The pushed PC is PC-1, which is the address of the TRAP itself (and,
  for states 13 and 44, of the faulting instruction). A service routine that wants to
  continue after the TRAP must advance the saved PC on the stack before RTI, as the
  test program's handlers do (`LDR R1,R6,#0; ADD R1,R1,#1; STR R1,R6,#0`). For an
  interrupt, PC-1 is the instruction that was about to be fetched, which is correct.

## Interrupt priority and masking (`lc3_int_priority`, `lc3_psr`)

A device request becomes INT only if its 3-bit priority is greater than PSR[10:8].
Entering an interrupt raises the running priority. The top-level parameter
`MASK_ALL_ON_INT` sets how far:

* **1 (default):** PSR[10:8] = 111, so no interrupt can arrive until the handler
  returns. This gives the handler time to set up and to silence its device.
* **0:** PSR[10:8] = the device's priority, so only requests at a higher level can
  interrupt the handler.

RTI restores the old priority with the PSR. Devices can also be masked in software
through their own status register (bit 14 of e.g. KBSR). That needs no controller
hardware and is not modelled.

## Memory protection (`lc3_mem_protect`)

The top four address bits name one of 16 pages of 4K words. The 16-bit MPR holds one
bit per page: 0 means supervisor only, 1 means user or supervisor.

`AV = PSR[15] & ~MPR[MAR[15:12]] & MIO_EN`

AV is combinational. The MPR loads from the bus on `ld_mpr`. After reset, pages 0-2 and
15 (system space, vector tables, device registers) are supervisor only and pages 3-14
are user pages (`MPR_RESET = 16'h7FF8`).

AV is brought out of the top but not acted on. No access-violation exception state or
vector is defined, so a violating access still completes. Adding one means a COND code
for AV and a new entry state that feeds the chain above.

## Datapath slice and the system bus (`lc3_regfile`, `lc3_alu`, `lc3_psr`, `lc3_fsm_top`)

* **Register file:** 8 x 16. DRMUX selects IR[11:9], R6 or R7; SR1MUX selects IR[11:9],
  IR[8:6] or R6; SR2 is read from IR[2:0].
* **ALU:** ADD, AND, NOT and PASS. IR[5] selects SR2 or the sign-extended imm5.
* **PSR:** privilege bit, priority and N/Z/P. N/Z/P are set from the bus value
  (negative/zero/positive), or the whole PSR loads from the bus (PSRMUX = 1, used by
  RTI). BEN = OR(IR[11:9] & NZP) is latched in decode.
* **IR and MAR:** load from the bus.

The bus is a priority multiplexer standing for the tri-state gates:

1. GateALU
2. GateMARMUX with MARMUX = 0 (`ZEXT(IR[7:0])`)
3. GatePSR
4. GateVector
5. otherwise the input `bus_ext`

The PC, PC-1, MDR, memory, address adder, stack-pointer ±1 logic and the saved stack
pointers are **not** in this design. Whoever instantiates `lc3_fsm_top` drives `bus_ext`
and `mem_ready` from them, following the control word. `sr1_out` is brought out as the
adder's base register and the SP source. `tb/tb_lc3_fsm_top.sv` contains a complete
behavioural model of these parts, which is the reference for how to connect them.

Timing everywhere: one controller state per rising clock edge, synchronous active-high
reset, combinational control word and bus.

## ROM as logic (`rom_table`, `rom_fsm`)

* **`rom_table`:** any k-input, n-output function is a 2^k-word table read at the input
  value. The default is the 3-input example f(A,B,C). Only rows 000-100 (0,1,0,1,1) are
  specified; rows 101-111 are 0 here.
* **`rom_fsm`:** a Moore machine whose next state and output both come from one ROM
  addressed by {state, IN}, captured in a single register. The default is the two-state
  toggle: IN = 1 flips the state and the output follows the state.

Both stand beside the LC3 logic in the top with their own ports.

## Where this RTL makes its own choices

The controller structure, field widths and state numbers are taken as specified. So are
the register transfers of fetch, decode, BR, ADD and the whole interrupt/exception/RTI
chain, the DRMUX/SR1MUX/VectorMUX encodings, the state-15 bus override, the priority
comparison and the MPR rule. The following are this design's choices:

* COND codes 3-5 and their J bits. They are chosen so that the specified successor pairs
  (18/49, 8/44, 13/45, 34/59) come out; a plain "code i alters J[i]" rule would not give
  them.
* The micro-code of LD, LDR, LDI, ST, STR, STI, JSR/JSRR, JMP, LEA, AND and NOT, which
  follows the standard LC3 state machine.
* The control-word bit order and the encodings of PCMUX, ADDR2MUX, SPMUX, ALUK, MARMUX
  and PSRMUX. LD_Priority was added to fill the 40 bits.
* The reset values: uMAR 18, supervisor mode, priority 0, Z set, registers 0, Vector 0,
  MPR x7FF8.
* The MPR load port, the device-request gating of INT, and the SR2 port, immediate
  operand and operation set of the ALU.
* The two-way sequencer reads its P input as PSR[15], the privilege bit.

## Files

| file | contents |
|------|----------|
| `rtl/lc3_pkg.sv` | types, control word, COND codes, the micro-program `ucode()` and its two-way form `ucode2()` |
| `rtl/lc3_useq.sv`, `lc3_cond_logic.sv`, `lc3_ustore.sv` | micro-sequencer |
| `rtl/lc3_useq2.sv` | two-way-branching sequencer |
| `rtl/lc3_vector_reg.sv`, `lc3_int_priority.sv`, `lc3_mem_protect.sv` | privilege/interrupt/protection additions |
| `rtl/lc3_regfile.sv`, `lc3_alu.sv`, `lc3_psr.sv` | datapath slice |
| `rtl/rom_table.sv`, `rom_fsm.sv` | ROM-as-logic examples |
| `rtl/lc3_fsm_top.sv` | top |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself; a watchdog
ends a hung run with a failure. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/lc3_pkg.sv tb/tb_lc3_fsm_top.sv \
          --top-module tb_lc3_fsm_top -o sim && ./obj_dir/sim
```

Replace the testbench name for the unit tests. `rtl/lc3_pkg.sv` must come first.

**End-to-end test (`tb_lc3_fsm_top`)** runs the top with default parameters on a short
LC3 program, in about 700 cycles:

1. Boot in supervisor mode.
2. RTI to supervisor code, then RTI to user code.
3. Arithmetic, loads and stores of every addressing mode, branches, JSR/JSRR/JMP.
4. A TRAP, an illegal opcode and a user-mode RTI.
5. A load from a supervisor page.
6. An interrupt that arrives while the program idles.

It compares the memory results and the four vectors used with hand-computed values, and
checks that the two sequencers agree on every cycle. It counts each mechanism and fails
if one never occurs:

* memory wait;
* BR taken and not taken;
* JSR and JSRR;
* the LDI and STI chains;
* interrupt taken, and interrupt held off by priority;
* TRAP via state 15;
* both exceptions;
* stack switch and restore;
* RTI to supervisor;
* access violation.

The unit tests check their module against independent models:

* the COND logic and the priority comparator exhaustively;
* the sequencers by walking the specified state graph edge by edge;
* the other modules with random stimulus.

**Nested-interrupt test (`tb_lc3_fsm_top_nested`)** runs the same program with
`MASK_ALL_ON_INT = 0` and two devices, A at priority 2 and B at priority 5. It checks
four things:

* B interrupts A's handler, entering from supervisor mode straight to state 37 with no
  stack switch.
* B's handler finishes before A's.
* Each handler runs at its own device's priority.
* Both vectors (x0180, x0181) are used.
