# Reconfigurable dual-core frame

Safety-critical embedded control usually runs safety tasks next to tasks that are
not safety-critical. A master/checker pair of processors catches any single fault
in a core, but it wastes half the silicon on work that needs no checking. This design
is a frame of logic that goes around two identical, unmodified processor cores and
lets software switch them at run time between two modes:

* **Lock mode** (safety mode). The two cores are a master/checker pair. Core 1
  drives the memories. Core 2 runs the same instruction stream 1.5 clock cycles
  later, and everything it puts out is compared with core 1's delayed output.
* **Split mode** (performance mode). The cores run different programs on in-phase
  clocks. They share the memories through arbitration.

The frame is written for 16-bit cores with separate instruction and data buses
(Harvard). It holds:

* one instruction cache per core;
* the shared instruction and data memories with parity;
* the two memory control units that compare, route and arbitrate;
* a mode switch unit that sequences the switches and makes core 2's clock;
* protected inputs for interrupt and reset.

The cores are not part of the RTL. Their buses are ports of the top module
`dual_core_frame`. The testbenches use a small behavioural core, `tb/core_model.sv`.

## Block map

```
            c1_* ports                                    c2_* ports
               |                                              |
  mode_switch_detect --+                       +-- mode_switch_detect
               |       |                       |              |
            icache     +--> mode_switch_unit <-+           icache   (core 2 clock)
               |            |  clk_core2, wait/message,        |
               |            |  core_mode_dr, error_dr          |
               +------> icu (burst_fsm x2, access_arbiter, ----+
               |             out_bus_route, in_bus_route)
               |              |
               |          safe_imem
               +------> dcu (access_arbiter, 2x out_bus_route, in_bus_route,
                             ID bit, semaphore) ---- safe_dmem (write protection)
  irq_t/irq_f, crst_t/crst_f --> single_bit_input x2 --> cores
```

| File | Purpose |
|---|---|
| `rtl/dcf_pkg.sv` | Widths, memory-mapped addresses, mode switch opcode, dual-rail codes, data request struct |
| `rtl/dual_core_frame.sv` | Top level |
| `rtl/mode_switch_unit.sv` | Mode sequencing, core 2 clock, core mode signal, error selection |
| `rtl/mode_switch_detect.sv` | Watches the fetched instruction for the mode switch opcode |
| `rtl/icache.sv` | Direct-mapped instruction cache, 4-word lines, per-line safety flag |
| `rtl/icu.sv` | Instruction memory control: block fills, comparison, routing |
| `rtl/burst_fsm.sv` | Address sequence of one 4-word block fill |
| `rtl/dcu.sv` | Data memory control: comparison, routing, core ID bit, semaphore |
| `rtl/access_arbiter.sv` | Core 1 first; core 2 wins after a cycle granted to core 1 |
| `rtl/out_bus_route.sv` | Outgoing bus: per-core parity, delayed comparison, output multiplexer |
| `rtl/in_bus_route.sv` | Incoming bus: direct to core 1, delayed (lock mode) to core 2, two parity checkers |
| `rtl/delay_1p5.sv` | 1.5-cycle delay: a rising-edge register, then a falling-edge register |
| `rtl/tsc_comparator.sv`, `rtl/tsc_parity_checker.sv`, `rtl/two_rail_checker.sv` | Self-checking checkers with alternating dual-rail outputs |
| `rtl/single_bit_input.sv` | Dual-rail input stage for interrupt and reset |
| `rtl/safe_imem.sv`, `rtl/safe_dmem.sv` | Memories that store parity; the data memory has a protected area |
| `rtl/watchdog.sv` | External watchdog: own clock, triggered by mode changes, resets the frame on timeout (not inside the top) |

## Time diversity: why core 2 is 1.5 cycles late

The two cores share one die, one clock and one supply. A disturbance that hits both
at the same moment could corrupt both in the same way, and a comparator would not
see it. In lock mode, core 2 therefore runs on the inverted clock and gets every
input 1.5 cycles after core 1. A common disturbance then hits the two cores at
different points in their programs, so the results differ and the comparison
catches the error.

* `delay_1p5` makes the delay: a rising-edge register followed by a falling-edge
  register.
* Every path into core 2 goes through such a delay in lock mode: instruction fill
  words, read data and interrupts.
* Every comparison delays core 1's output by the same amount before comparing it
  with core 2's.
* Core 2's reset is always delayed, because the frame always starts in lock mode.
  Core 2's frame logic (its cache and its half of the ICU) leaves reset 1.5 cycles
  after the rest of the design.

In split mode core 2 runs on the in-phase clock. Its inputs then bypass the delays,
so that the two cores can share the synchronous memories.

## The mode switch

The mode switching instruction is opcode `16'hF000`; to the core it is a NOP. A
`mode_switch_detect` unit sits on each core's instruction bus, after the cache. It
raises `core1_signal` or `core2_signal` when that core fetches the instruction. The
switch takes effect at fetch, so the opcode must not be placed in a branch delay
slot.

A switch happens only when **both** cores have asked for it. A core that asks is
halted at once (`wait1`/`wait2`). The other core is interrupted (`message2`/`message1`)
until it asks too. A core that asks alone therefore blocks only itself. In lock mode
that shows up as a comparison error. In split mode it stops that core's own work.

**Lock to split.** Core 1 asks first; core 2 follows 1.5 cycles later. If T is the
rising edge at which both requests are seen:

* core 2's last inverted edge is at T+0.5;
* the mode becomes split at T+1;
* core 2's first in-phase edge is at T+2, where both cores resume.

Core 2 loses half a cycle, and the two cores are then aligned. A typical program
first loads the identification address into a register, then executes the switch
instruction. It then reads the identification bit (0 on core 1, 1 on core 2) and
branches, so each core goes to its own task.

**Split to lock.** Say core 1 asks first. It is halted, and core 2 gets `message2`
as an interrupt. Core 2's handler saves its context and jumps to the same switch
instruction. When core 2 asks, at edge T:

* the mode becomes lock at T and core 1 resumes at T+1;
* core 2 stays halted while its clock is moved to the inverted phase, with edges
  at T, T+1.5 and T+2.5;
* core 2 resumes at T+2.5, 1.5 cycles behind core 1.

Software must then load the same register values in both cores.

**Core 2's clock.** `clk_core2 = (clk & en_true) | (~clk & en_inv)`. `en_inv` changes
only on the rising edge of `clk`, and `en_true` only on the falling edge. Each enable
may rise only while the other one is low. As a result, no enable changes while its
own term could pass a pulse, and the switch produces no glitch.

**Core mode signal.** `core_mode_dr` is dual-rail: `10` means lock and `01` means
split. Its two rails come from two registers with separate next-state logic, so a
single fault cannot produce the other valid code. The data memory uses it for write
protection. An external watchdog watches it change: a mode change needs
both cores, so a stopped clock or a hung core stops the changes.

**Watchdog.** `rtl/watchdog.sv` sits outside the frame and runs on its own clock
`wclk`, so a broken frame clock cannot stop it. Each rail of `core_mode_dr` passes
a two-flop synchronizer. Only a change from one valid code to the other restarts
its count; `00` and `11` do not. After `TIMEOUT` watchdog cycles without a change
it drives a reset request for `PULSE` cycles on a dual-rail pair (`rst_t`/`rst_f`),
meant for the frame's core reset pins. The frame then restarts in lock mode. A
program that stays in one mode for long must therefore insert dummy mode
switches to keep the watchdog quiet.

## Error signalling

Every checker reports with an alternating dual-rail pair:

* `01` and `10` mean healthy; `00` and `11` mean error;
* the healthy code flips every cycle, following the `alt` bit from the mode switch
  unit.

A rail stuck at either value therefore shows up as an error within a cycle.

* `tsc_parity_checker` splits the word and its parity bit into two halves. It forms
  one rail from each half (even parity) and XORs both rails with `alt`.
* `tsc_comparator` builds a tree of two-rail checker cells over the pairs
  `(a[i], ~b[i])`.
* `two_rail_checker` merges pairs. It removes the alternation, combines the pairs
  with the cell `z1 = x1&y1 | x0&y0, z0 = x1&y0 | x0&y1`, and applies the
  alternation again. This keeps an even number of alternating inputs from
  cancelling out.

Each control unit has two error outputs:

* `err_perf_dr`: the parity checkers only. It is valid in both modes.
* `err_safe_dr`: the parity checkers plus the comparators. It is valid only in lock
  mode.

The mode switch unit picks the safety set once lock mode has held for two cycles
after a switch, and at once after a reset. Otherwise it picks the parity set. It
merges the ICU and DCU signals and registers the result on `error_dr`.

## Bus protection

**Outgoing buses** (`out_bus_route`: instruction address, data address, write data).

* Each core's word gets its own parity bit. Core 1's word, control bits and parity
  pass through the 1.5-cycle delay and are compared with core 2's, parity included.
  The two parity generators thus check each other.
* In lock mode only core 1's word goes to memory; in split mode the granted core's
  word does.
* The comparison runs only when a core actually drives the bus (the `act` inputs),
  because idle buses may differ after a spell in split mode.

**Incoming buses** (`in_bus_route`: instruction fill words, read data).

* The word and its parity go straight to core 1.
* For core 2 they pass a multiplexer: through a delay in lock mode, directly in
  split mode.
* Each branch has its own parity checker, so at least one core gets a checked word
  under any single fault.
* Side-band bits such as the fill word index and a valid flag travel through the
  same path.

**Single-bit inputs** (`single_bit_input`: interrupt, core reset).

* The pins are dual-rail: `irq_t/irq_f` and `crst_t/crst_f`.
* Each rail passes a 2-flop synchronizer.
* The true rail drives core 1. The inverted rail is delayed and only then
  re-inverted for core 2. A disturbance that hits both rails therefore reaches the
  cores at different points in their programs.
* A rail disagreement is reported on `input_err_dr`.
* The interrupt to core 2 is delayed only in lock mode; the reset is always delayed.
* A core reset from the pins resets both cores and every part of the frame except
  the memories and the input stages. The pair therefore restarts in lock mode, as
  after power-up, even if the reset arrives in split mode, and core 2 leaves reset
  1.5 cycles after core 1. `rst_n` resets everything. While the frame is in reset,
  no memory access is made, because its checkers are in reset too. After a reset the
  comparators are selected at once: both cores start from the same state, so no
  settling time is needed.

## Caches and their consistency

Each core has a direct-mapped cache: 16 lines of 4 words each. A miss asks the ICU
for the whole 4-word block.

* **Lock mode.** Only core 1's request is served. Core 1's cache gets the words as
  they arrive, and core 2's cache gets the same words 1.5 cycles later. The two
  per-core burst state machines still run in step, and their addresses are
  compared.
* **Split mode.** The two caches fill independently through `access_arbiter`. Core 1
  has priority, except that core 2 wins any cycle after one granted to core 1.

After split mode the two caches hold different lines. If one core hit and the other
missed in lock mode, their timing would drift apart and the comparator would flag a
false error. Each line therefore has a *safety flag*:

* A fill in lock mode sets the flag.
* A fill in split mode by **either** core clears it. The other cache is told
  through `clr_valid/clr_line`.
* In lock mode a line counts as a hit only if its flag is set. Otherwise both caches
  miss together and refill the line.

The caches are not compared directly. Their faults show up at the ICU's address
comparison, because the caches sit between the cores and the ICU.

## Data memory control

The DCU serves single-word reads and writes; there is no data cache.

* **Lock mode.** Core 1's request goes to memory and core 2's is only compared.
  Read data go to core 1 at once and to core 2 1.5 cycles later.
* **Split mode.** The DCU arbitrates like the ICU.

It also decodes two memory-mapped registers:

| Address | Register |
|---|---|
| `0xFFF8` | Core identification bit: reads 0 on core 1 and 1 on core 2. The word carries parity like memory data. |
| `0xFFF9` | Semaphore, split mode only. Writing 1 locks the data memory for the writing core; writing 0 releases it. While one core holds it, the other core's accesses (except to `0xFFF8`) get no grant and wait. Reads return bit 0 = held by the reader, bit 1 = held by the other core. Lock mode clears it. |

`safe_dmem` stores a parity bit with each word and checks the address and
write-data parity. In split mode, or with an invalid `core_mode_dr` code, it refuses
writes to words `PROT_BASE .. PROT_BASE+PROT_SIZE-1` (default 0..255) and raises
`wp_hit`. Data that safety tasks rely on cannot then be overwritten by unchecked
split-mode code. `safe_imem` stores parity with each word and checks the address
parity. Its `prog_*` port loads the program.

## Parameters

| Module | Parameter | Default | Note |
|---|---|---|---|
| `dual_core_frame` | `W` | 16 | data and address width of the cores |
| | `CACHE_LINES` | 16 | lines per cache (4 words each) |
| | `IMEM_DEPTH`, `DMEM_DEPTH` | 1024 | words |
| `safe_dmem` | `PROT_BASE`, `PROT_SIZE` | 0, 256 | protected area |
| `dcf_pkg` | `ID_ADDR`, `SEM_ADDR`, `MS_INSTR` | `FFF8`, `FFF9`, `F000` | memory map and opcode |
| `watchdog` | `TIMEOUT`, `PULSE` | 1024, 4 | watchdog cycles |

## How far this follows the original design, and where it departs

The following come from the original description:

* the two modes and their purpose;
* the 1.5-cycle offset and its placement on every bus in and out;
* the rule that a switch needs both cores, with the wait/message handshake;
* per-core parity on outgoing buses and two checked branches on incoming ones;
* alternating dual-rail error and mode signals;
* the per-line safety flag;
* the arbitration rule;
* the core ID bit read at `0xFFF8`, and a data memory semaphore;
* write protection driven by the mode signal;
* 4-word cache blocks filled by burst.

Choices made here, where the description gives no detail:

* **Opcode and addresses.** The mode switch opcode (`F000`), the semaphore address
  and its encoding, and the hold-off semantics.
* **Cache.** Size and mapping.
* **Memories.** Depths and the protected area.
* **Timing.** The exact cycle timing of the switches and the two-cycle settling
  delay before the safety error set is selected.
* **Checkers.** The internal structure of the self-checking checkers.
* **Core interface.** The core bus protocol (`dreq_t` request/grant/rvalid).
* **Core reset.** A core reset from the pins also resets the frame logic.
* **Watchdog.** Its timeout, its pulse length, and that it acts through the
  reset pins.
* **Qualified comparison.** Comparison is qualified by "bus active", not made on
  every cycle.

Not built:

* **The cores.** Any 16-bit Harvard core with a stall input fits.
* **The safe memories' self-test and internal error detection.** The memories here
  only store and check parity.
* **Multiplexer hardening.** The special multiplexer design that keeps one fault from
  causing several bit errors on the outgoing bus; the multiplexers here are plain.
* **Data burst machine.** Data accesses are single words. The DCU therefore has no
  burst machine, although the original duplicates one there as in the ICU.
* **Peripheral bus.** The DCU serves the data memory and its two registers only.
  Memory-mapped peripherals would need their own port, protected the same way.
* **The fault-injection test environment.** The original evaluates the design by
  injecting stuck-at faults into a gate-level net list while a golden copy runs in
  parallel.

## Simulation

Each block has a self-checking testbench in `tb/`. It ends by printing
`TB_RESULT checks=<n> failures=<m>`, and a time limit stops it if it hangs. With
Verilator 5, for example:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dcf_pkg.sv tb/tb_dual_core_frame.sv --top-module tb_dual_core_frame
./obj_dir/Vtb_dual_core_frame
```

`tb_dual_core_frame` runs the whole frame at its default parameters with two
behavioural cores. The program:

1. starts in lock mode, writes and reads protected data, and switches to split mode;
2. branches on the identification bit, so core 1 and core 2 go to different code;
3. exercises the semaphore: core 1 holds it while core 2's write waits;
4. exercises arbitration conflicts on both memories;
5. tries a protected write in split mode, which is refused;
6. returns to lock mode through the message interrupt, with a forced cache refill;
7. raises an external interrupt on the dual-rail pins. Both cores must take it,
   core 2 exactly 1.5 cycles later. A disagreement between the two rails must then
   show on `input_err_dr`;
8. injects a fault on core 2's data address bus, which must appear on `error_dr`
   within two cycles.

`tb_dual_core_frame` also checks:

* core 2's 1.5-cycle lag;
* that `error_dr` alternates cleanly through the whole run;
* memory and register contents at the end;
* that each mechanism (both switches, conflicts, semaphore hold-off, ID reads,
  refused write, refill, message) happened at least once.

`tb_safety_fault_injection` is a small fault-injection campaign in lock mode. It
runs two complete systems side by side: a golden one and a device under test. For
each fault the device under test gets one permanent stuck-at-0 or stuck-at-1 on one
bit of the buses between a core and the frame. These buses are the instruction
address and instruction, data address, write and read data, strobes, stall and
grant lines. There are 344 faults in all.

* An *effect* is any difference on the data memory bus.
* A *detection* is an invalid `error_dr` code or a memory parity error.

Every fault must stay inactive, or be detected no later than two cycles after its
first effect. Of the 344 faults:

* 94 are never activated by the short workload;
* 131 are detected before they have any effect;
* 119 are detected within two cycles of their effect;
* none goes undetected.

All 119 effects come from faults on core 1's buses. Faults on core 2's buses are
detected but never reach the memory bus, since in lock mode core 2's outputs
only feed the comparators.

Faults inside the frame's own gates are not injected.

`tb_dual_core_frame_reset` pulses the reset pins while the cores run in split mode.
Both cores must restart in lock mode, with core 2 leaving reset 1.5 cycles after
core 1, and must then work as a master/checker pair again.

`tb_mode_fault_injection` runs the same kind of campaign across a mode round
trip. The program runs a short part in lock mode and switches to split mode,
where the two cores run different loops. It then returns to lock mode and runs
the lock-mode loop. Each of the 344 faults is switched on three cycles after the
device under test enters split mode. A watchdog drives the device's reset pins.
After the return, the effect test compares the order of memory transactions
rather than single cycles, because a fault can move the moment of the return.
Of the 344 faults:

* 77 are never activated;
* 28 are detected before they have any effect;
* 157 are detected by the checkers after the return to lock mode;
* 67 leave the device hung in split mode and are caught by the watchdog;
* 15 only misdirect stores in split mode, touch nothing the lock-mode program
  uses, and stay undetected;
* none has an undetected effect in lock mode.

`tb_dual_core_frame_watchdog` connects a watchdog with a short timeout (300
cycles of a 14 ns clock) to the reset pins. The program switches to split mode
and then loops forever on both cores without another switch. The watchdog must
not fire before its timeout after the last switch. While its pulse lasts, the
frame must be in lock mode. The cores must then restart as a master/checker pair
and reach split mode again, and the watchdog must fire again while the program
still hangs. `tb_watchdog` tests the watchdog alone.
