# REFLIX: a processor with reactive instructions

Control-dominated embedded software spends most of its life waiting for
external events and reacting to them quickly: wait for a sensor, raise an
output, and drop whatever it is doing when an emergency signal arrives. A
conventional microcontroller does this with port polling loops and
interrupts. Interrupts save and restore context even though a reactive
program usually never wants to go back to where it was interrupted.

REFLIX puts these operations into the instruction set, after the constructs
of the synchronous language Esterel:

* **EMIT / SUSTAIN** drive an output line for one instruction cycle or for
  ever.
* **SAWAIT / CAWAIT / PRESENT** test input lines directly: wait for a
  signal, wait for one of two signals, or branch on a signal.
* **TAWAIT** waits for a number of instruction cycles. Four internal timers
  raise time-out signals that programs can wait on like any input.
* **ABORT signal, address** opens a *preemptable region*. The region runs
  from the instruction after the ABORT up to `address`. If `signal` shows
  up while the region runs, the processor finishes the current instruction
  and jumps to `address`. It saves no context and never returns. If the
  region reaches `address` first, the ABORT quietly ends. ABORTs nest four
  deep, and an outer ABORT has priority over the inner ones. That is how a
  program expresses "stop pumping if methane is high, but raise the alarm
  if methane is very high".

This repository holds synthesizable SystemVerilog for the reactive part of
the processor. That part is the control unit, the abort handling block, the
signal input and output registers and the timer pool, with a minimal fetch
path. The base processor that REFLIX was built on is **not** included. Its
registers, ALU and instruction encoding were never specified alongside the
reactive extension. Of the base instruction set, only `JMP` is implemented,
because the reactive examples need it (see "Departures" below).

## Example: the mine pump controller

```
start:  ABORT   HIGH_METHANE, alarm      ; level 0: highest priority
start1: ABORT   NOT_RIGHT_METHANE, stop  ; level 1
loop:   SAWAIT  HIGH_WATER
        EMIT    START_PUMP
        SAWAIT  LOW_WATER
        EMIT    STOP_PUMP
        JMP     loop
stop:   EMIT    STOP_PUMP                ; level 1 preempted
        SAWAIT  RIGHT_METHANE
        JMP     start1
alarm:  EMIT    STOP_PUMP                ; level 0 preempted (ends level 1 too)
        EMIT    ALARM
        SAWAIT  RIGHT_METHANE
        JMP     start
```

The pumping loop never tests methane. While the loop sits in a `SAWAIT`,
the abort hardware watches both methane signals. If both appear in the same
instruction cycle, the outer ABORT wins. `tb/reflix_tb.sv` runs exactly
this program against a scripted environment.

## Instruction cycle and timing

Everything in REFLIX is measured in *instruction cycles*. An instruction
cycle is one trip through the control loop:

1. **Decide** (1 clock). If the pending-abort-event flag `PAEF` is set, the
   cycle is a *preemptive termination*. The PC is loaded with the
   continuation address and the cycle ends here, so a preemption costs one
   clock. Otherwise the PC goes out on `a` to fetch the instruction. In the
   same clock the abort block checks for *non-preemptive termination*, that
   is, whether the fetch address is the continuation address of an active
   ABORT.
2. **Load 1** (1 clock). Word 0 arrives on `din` and goes into IR (visible on
   `irbus`). If the opcode takes two words, the PC moves on and the second
   word is fetched.
3. **Load 2** (1 clock, two-word instructions only). The second word goes
   into the operand register.
4. **Execute** (1 clock). The instruction takes effect. This is the last
   clock of the cycle (`cyc_end`).

So a one-word instruction takes 3 clocks and a two-word instruction takes 4.
The memory is synchronous: `din` must carry the word at `a` one clock after
`a` is presented.

A busy-waiting instruction whose condition is not met resets the PC to its
own address. Examples are `SAWAIT` on an absent signal, `TAWAIT` still
counting, and `CAWAIT` with neither signal present. The instruction then
runs again in the next instruction cycle. Each retry is a complete
instruction cycle, so a pending ABORT can preempt the wait between two
retries.

### When is a signal "present"?

The Signal Input Register (`sir`) registers Sin and the four time-outs every
clock. It also keeps a record of every signal that was high on any clock of
the current instruction cycle. The record is cleared when the cycle ends. A
signal counts as present in an instruction cycle if it is in this record.
This holds for the polling instructions, which test the record in their
execute clock, and for the abort block.

Because Sin has one register stage, a signal enters the record one clock
after it appears on the pin. A pulse must be high across one rising clock
edge to be seen. A single-clock pulse is enough, but if it arrives in the
last clock of an instruction cycle it counts for the next cycle.

## Abort handling block (`ahb`)

This block is the heart of the design.

**State, per nesting level `i = 0..3`** (level 0 is the outermost):

| register | content |
|---|---|
| `AAAR[i]` | continuation address of the ABORT at level i |
| `AASR[i]` | one-hot mask of the signal it watches (20 bits: Sin 0..15, TimeOut 16..19) |
| `AF[i]`   | level active |
| `AP`      | number of active levels (the next free level) |
| `JASR`    | OR of the masks of the active levels |
| `PAEF`    | pending abort event flag |
| `AXP`     | outermost level whose signal was seen |
| `JAF`     | OR of AF (some ABORT is active), a pin |

**Activation.** `ABORT s, addr` executes in its execute clock. It writes
level `AP` and increments `AP`. A fifth nested ABORT is ignored and sets the
sticky `abort_ovf` pin.

**Detection, once per instruction cycle.** On the last clock of every
instruction cycle, the SIR record for that cycle is ANDed with JASR, and the
ORed result goes into `PAEF`. In the same clock, `AXP` takes the number of
the outermost level whose own signal is in the record. An event therefore
acts at the start of the *next* instruction cycle. The instruction that was
running when the signal arrived always completes.

**Preemptive termination.** In the next decide clock, `PAEF` makes the
control unit jump to `AAAR[AXP]`. Level `AXP` and every level inside it are
cleared (`AP := AXP`). Outer levels stay active and keep watching. The
preemption cycle is itself an instruction cycle with its own record, which
is checked against the levels that are still active.

**Priority.** When several levels see their signal in the same cycle, the
outermost one is taken. The inner ones vanish with it, so their
continuation code never runs.

**Non-preemptive termination.** When no abort is pending and `JAF` is set,
the fetch address is compared with every active `AAAR`. The outermost
matching level is cleared, together with every level inside it. This is
what happens when the body of an ABORT simply runs into its continuation
address. Nested ABORTs may share one continuation address, and reaching it
then ends all of them at once.

**The ABORT's own cycle.** Events recorded during the instruction cycle
that executes an ABORT are evaluated before the new level exists, so they
do not trigger it. The first cycle that can trigger a new ABORT is the one
after it.

The SystemVerilog assertions in `ahb.sv` check that `AF`, `AP` and `JASR`
describe the same stack, and that `PAEF` always points at an active level.

## Signal outputs and timers

**`sor`.** `EMIT n` raises `sout[n]` from the clock after its execute clock
until the end of the next instruction cycle, so it is high for exactly one
instruction cycle. Emitting the same line again in that next cycle keeps it
high. `SUSTAIN n` raises `sout[n]` until reset. Nothing else clears it.

**`timer_pool`.** There are four 16-bit one-shot counters that count
instruction cycles. `TSTART t, d` loads timer t. After `d` more instruction
cycles have completed, `timeout[t]` is high for exactly one instruction
cycle. `timeout` is a pin and is also fed back as signals 16..19, so
`ABORT 16, addr` preempts a region after a time limit. Loading 0 stops a
timer. In the end-to-end test, `TSTART 0,5` followed by
`ABORT TimeOut0, L` and an endless `SAWAIT` reaches `L` in the 8th
instruction cycle after the TSTART cycle. Those cycles are: the ABORT, 4
waits, the time-out cycle, the preemption and the first instruction at `L`.

`TAWAIT d` does not use the pool. It has its own counter in the control
unit and lasts `d` instruction cycles. A value of 0 or 1 gives one cycle.

## Instruction encoding

Word 0 is `[15:11] opcode`, `[10:6] signal a`, `[5:1] signal b`, `[0] 0`.
Word 1 holds the address or the delay. Signal numbers 0..15 are `sin`,
16..19 are `timeout`. For EMIT and SUSTAIN, `a[3:0]` selects the output
line. For TSTART, `a[1:0]` selects the timer.

| opcode | mnemonic | words | effect |
|---|---|---|---|
| 0 | NOP | 1 | none (also every unused opcode) |
| 1 | JMP addr | 2 | PC := addr |
| 2 | ABORT a, addr | 2 | open a preemptable region watching a, continuation addr |
| 3 | EMIT a | 1 | sout[a] high for one instruction cycle |
| 4 | SUSTAIN a | 1 | sout[a] high until reset |
| 5 | SAWAIT a | 1 | repeat until a is present |
| 6 | TAWAIT d | 2 | take d instruction cycles |
| 7 | CAWAIT a, b, addr | 2 | a present: continue; else b present: PC := addr; else repeat |
| 8 | PRESENT a, addr | 2 | a present: continue; else PC := addr |
| 9 | TSTART a, d | 2 | load timer a with d |

`reflix_pkg::enc(op, a, b)` builds word 0. The testbenches use it as a
small assembler.

## Pins of `reflix`

| pin | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `din` | in | 16 | program memory read data (one clock after `a`) |
| `sin` | in | 16 | sensor inputs |
| `a` | out | 16 | program memory address (the PC) |
| `irbus` | out | 16 | instruction register |
| `sout` | out | 16 | signal outputs |
| `timeout` | out | 4 | timer time-outs |
| `paef`, `jaf` | out | 1 | abort pending / some abort active |
| `abort_ovf` | out | 1 | sticky: an ABORT was ignored for lack of levels |

After reset the processor spends one clock initialising, then fetches from
address 0.

## Files

| file | block |
|---|---|
| `rtl/reflix_pkg.sv` | sizes, opcodes, instruction struct, `enc` |
| `rtl/reflix.sv` | top: wires the blocks below |
| `rtl/reflix_ctrl.sv` | control unit: state machine, PC, IR, decode, execute |
| `rtl/ahb.sv` | abort handling block |
| `rtl/sir.sv` | signal input register |
| `rtl/sor.sv` | signal output register |
| `rtl/timer_pool.sv` | four time-out timers |
| `tb/*_tb.sv` | self-checking testbenches: one per module, plus `pump_single_tb` |

## Departures and gaps

These points follow the published REFLIX architecture:

* the reactive instruction set and the length of each instruction;
* 16 inputs, 16 outputs and 4 timers;
* four ABORT levels with outer-over-inner priority;
* the register names of the abort block;
* the order of decisions in the control loop: a pending abort first, then
  fetch, with the continuation-address check alongside;
* the rule that events recorded in one instruction cycle act in the next.

These points are this design's own, because the architecture leaves them
open:

* **Base processor.** The original REFLIX extends an existing 16-bit core
  with registers, an ALU, memory-reference instructions and a two-bus
  (address bus / data bus) datapath. None of that is here. The
  corresponding pins (`Dout`, `R/W`) are absent, and the blocks are
  connected point to point instead of over shared buses. Programs can use
  only the instructions in the table above.
* **Pins `T[3:0]` and `EndFU[3:0]`** of the original external view have no
  described function and are not provided. A reset pin was added.
* **Binary encoding, clock counts and memory timing** are all chosen here.
  JMP was made a two-word instruction.
* **AASR width.** The original describes 16-bit AASR registers but also
  allows the 4 time-outs as abort signals. Here AASR is 20 bits, one per
  signal.
* **Starting a timer.** The reactive instruction set has no instruction
  that programs a timer, so `TSTART` was added. Timers count instruction
  cycles and are one-shot.
* **ABORT overflow** (a fifth level) is ignored and flagged.
* **SUSTAIN** is cleared only by reset, even when the surrounding ABORT is
  preempted.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -y rtl --top-module reflix_tb \
    rtl/reflix_pkg.sv tb/reflix_tb.sv -o sim
./obj_dir/sim
```

(`-y rtl` lets verilator find each module in `rtl/<name>.sv`; the package
is listed first because the other files import it.)

The same command works for the block tests; substitute `sir_tb`, `sor_tb`,
`timer_pool_tb`, `ahb_tb`, `reflix_ctrl_tb` or `pump_single_tb` for `reflix_tb`.

* `reflix_tb` runs the pump controller above. It then runs a second program
  that makes every mechanism happen at least once: preemption, priority,
  time-out abort, non-preemptive termination, overflow, every instruction
  and each branch of PRESENT and CAWAIT. It prints how often each mechanism
  happened, and any mechanism that never happened counts as a failure. The
  test runs the top at its only size, which is the architecture's own.
* `pump_single_tb` runs the single-level version of the pump controller.
  That version has nine instructions and twelve words. The test raises
  the methane alarm both while the loop waits for high water and while the
  pump is running. It checks that the pump stops within a few instruction
  cycles and stays off until methane is right again.
* `reflix_ctrl_tb` checks the executed-address trace and the clock count of
  every instruction cycle: 3, 4, or 1 for a preemption.
* `ahb_tb` drives the abort block cycle by cycle through nesting, priority,
  own-cycle events, non-preemptive termination and overflow.

## Changing it

Sizes live in `reflix_pkg`. The leaf blocks take them as parameters
(`NSIG`, `NSOUT`, `NTIMER`, `TW`, `NLEVEL`, `AW`). The signal number is 5
bits wide (`SIGNW`), so more than 32 signals need a wider instruction
field. To add an instruction, extend `opcode_e`, add it to `two_words` if it
carries a second word, and give it a case in the execute logic of
`reflix_ctrl`. Busy waits are written as "set `stay`", which makes the
instruction re-execute as a new instruction cycle.
