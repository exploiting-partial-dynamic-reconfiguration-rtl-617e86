# On-line routing test macros for SRAM FPGAs

SRAM FPGAs that fly in space, or simply age, pick up permanent faults. Most of
the die is routing: wire segments and the programmable interconnect points
(PIPs) that join them. A stuck or broken PIP in a free region only shows up when
a new module is loaded there by partial reconfiguration. Then it is too late.

This RTL describes small self-testing circuits, meant to be placed as
pre-routed hard macros into a region before it is used. The host loads a macro
by partial reconfiguration and lets it run. It then reads the result back
through the configuration port. Each macro has three parts:

* a **test pattern generator (TPG)** that drives one or more *wires under test*
  (WUTs) routed through the region;
* an **output response analyzer (ORA)** at the far end that checks what arrives;
* a few **distributed-RAM bits** (LUTs used as 16x1 RAM) that power up at 1 and
  hold the verdict until configuration readback collects it.

A macro needs no clock, reset or other global net, so it can be placed anywhere
and several can run at once. It makes its clock with a ring oscillator and its
reset with a shift register.

Three macros are provided. They are alternatives that trade wires per test
against fault coverage:

| macro | module | wires under test | principle |
|---|---|---|---|
| six-wire | `hm_6wut` | 6 | cross-coupled parity, ORA with feedback (remembers transient faults) |
| eight-wire | `hm_8wut` | 8 | cross-coupled parity without feedback, results addressed by the received wires |
| single-wire | `hm_1wut` | 1 | a burst of exactly 2^N-1 clock pulses, counted at the far end |

`fault_detect_top` instantiates all three side by side so that one simulation
runs them all. Its outputs are the readback views of every result RAM.

## Reading the results

Every result RAM powers up at 1, which means "fault" or "not started". A macro
that never runs, for example because a fault kills its oscillator, therefore
reports a fault by default. The start checker is a separate bit. It tells "did
not run" apart from "ran and found a fault".

| start bit | ORA bit(s) | meaning |
|---|---|---|
| 1 | any | test never started |
| 0 | 0 | started, no fault seen |
| 0 | 1 | started, fault seen (parity macros: separately for the odd and even ORA) |

For the six-wire and single-wire macros the result is at address 0 (bit 0 of the
`*_mem` outputs). The other 15 bits stay at 1, and synthesis reports them as
constant outputs. The eight-wire macro is read as a map; see below.

## Cross-coupled parity (six- and eight-wire macros)

The TPG is two 2-bit counters:

* **Even Parity TPG**: up counter `Cu1 Cu0` starting at 00, plus `PEven`. PEven
  is the next value of Cu1, which equals `Cu1 ^ Cu0`.
* **Odd Parity TPG**: down counter `Cd1 Cd0` starting at 11, plus `POdd`. POdd
  is the next value of Cd1, which equals `~(Cd1 ^ Cd0)`.

The macro steps through four configurations and then repeats. Columns are listed
in wire order:

| row | Cu1 | Cu0 | PEven | NPEven* | Cd1 | Cd0 | POdd | NPOdd* |
|---|---|---|---|---|---|---|---|---|
| 1 | 0 | 0 | 0 | 1 | 1 | 1 | 1 | 0 |
| 2 | 0 | 1 | 1 | 0 | 1 | 0 | 0 | 1 |
| 3 | 1 | 0 | 1 | 1 | 0 | 1 | 0 | 0 |
| 4 | 1 | 1 | 0 | 0 | 0 | 0 | 1 | 1 |

\* Only the eight-wire macro has the NP wires.

The parity bits are **swapped between the checkers**. The Odd Parity ORA checks
the up counter against POdd, and the Even Parity ORA checks the down counter
against PEven. If one TPG freezes, its own wires still look self-consistent. The
other group's check then fails. A comparison-based or single-parity scheme would
miss this.

**Six-wire ORA** (`ora6_check`). Pass means `POdd == XNOR(Cu1,Cu0)` for the odd
checker and `PEven == XOR(Cd1,Cd0)` for the even one. A feedback flag
remembers any mismatch seen at a write strobe. The RAM is written with
"mismatch now OR flag", so a glitch during one configuration is still reported
after the wires are correct again. The flag is cleared only by the power-up
reset.

**Eight-wire ORA** (`ora8_check`). It has no feedback. The freed input checks
the extra wire, and the minimised equations are:

```
odd:  fail = (Cu0 ^ NPOdd)  | ~(Cu1 ^ Cu0 ^ POdd)
even: fail = (Cd0 ^ NPEven) |  (Cd1 ^ Cd0 ^ PEven)
```

NPEven and NPOdd are the next values of each counter's LSB. So NPOdd equals Cu0
and NPEven equals Cd0. The duplicated wires are what the two checkers compare.

**Addressing (eight-wire only).** The received `{Cu1, Cu0, Cd1, Cd0}` address
both result RAMs, so each configuration writes its own cell. A fault-free run
leaves this map in both RAMs:

```
addresses 3, 6, 9, 12 = 0, all others = 1   ->  16'hEDB7
```

Any other map is a fault. This catches two faults that a single result bit
misses:

* A stuck **address wire** moves a write to the wrong cell.
* All wires stuck at one *valid* configuration pass the check, but write only
  one cell.

## Sequencing: TPG_SU and ORA_SU

Two small state machines share the macro clock:

* `tpg_su` raises **DR** (data ready) while the wires hold a configuration. It
  pulses **TPG_NEXT** once the ORA side has answered with **DONE**.
* `ora_su` has two states. S1 (outputs 00) is the initial state. DR=1 moves it to
  S0, where ORA_CLK=1 and DONE=1. DR=0 moves it back to S1.

ORA_CLK is the write enable of the result RAMs.

```
cycle      0      1      2         3      4
tpg_su   READY  READY  NEXT      WAIT   READY ...
DR         1      1      0         0      1
ora_su    S1     S0     S0        S1     S1
ORA_CLK    0      1      1         0      0
TPG_NEXT   0      0      1         0      0     (TPG advances at end of cycle 2)
```

One configuration takes 4 clock cycles. The wires only change while DR is low.
The second write in cycle 2 stores the same value again. TPG_NEXT also writes 0
into the start checker on its first pulse; the checker's RAM output then blocks
any further writes.

These rules are checked by assertions when you simulate with `--assert`:

* `tpg_su` never raises TPG_NEXT while DR is high.
* TPG_NEXT lasts exactly one cycle.
* `hm_6wut` and `hm_8wut` check that the wire struct does not change between two
  clock edges when DR is high at both.

## Single wire: counting a clock burst (`hm_1wut`)

A data pattern on one wire cannot be checked without a sequence recogniser or a
clock-recovering decoder at the far end. Both are too large for a test macro.
This macro sends the TPG clock itself over the wire instead, gated:
`wut = clk & ENABLE`.

* **TPGCU** (`tpgcu`). ENABLE is high from power-up. An N-bit counter on the
  *falling* clock edge drops ENABLE after exactly 2^N-1 complete pulses after
  reset. Because ENABLE only changes while the clock is low, no pulse is ever cut
  short. When ENABLE falls, the start checker bit is written to 0.
* **Edge counters** (`clk_ora`). The High counter counts rising edges and the Low
  counter counts falling edges, both N bits wide.
  `RNAND = OR(NAND(High, Low))` is 0 only when both counters are all ones, which
  is after exactly 2^N-1 whole pulses.
* **ORACU** (`oracu`). RNAND can be low for only half a pulse when extra pulses
  arrive. Two flip-flops clocked by RNAND itself therefore hold what happened:
  * FFDN (falling edge, powers up 0) records "RNAND fell".
  * FFDP (rising edge, powers up 1) records "RNAND rose again" by going to 0.

  A state machine on the ORA's own ring oscillator turns these into RAM writes:
  a 0 once FFDN is set, then a 1 if FFDP drops, after which it locks. The ORA
  clock may be faster or slower than the TPG clock.

| what reaches the ORA | RNAND | RAM bit |
|---|---|---|
| exactly 2^N-1 pulses | falls, stays low | 0 (pass) |
| stuck wire, or pulses lost | never falls | stays 1 |
| extra pulses (short to a toggling net) | falls, then rises | 0, then 1, then locked |

## Clock and reset without global nets

* `ring_oscillator`: a loop of N_INV inverters followed by N_FDE
  divide-by-two stages (`fde`: a flip-flop with ~Q fed back to D). The period
  is `2 * N_INV * T_INV * 2^N_FDE` time units. The inverter loop is a
  **behavioural model** (`always #(N_INV*T_INV)`) because a combinational loop
  has no synthesizable description. On the FPGA it is a chain of LUT inverters
  whose delay depends on placement. The dividers are real logic.
* `reset_gen`: a 32-bit shift register that powers up all ones and shifts in
  zeros. Its LSB is RESET, which is high for the first 32 clock cycles. In the
  single-wire macro it is clocked on the falling TPG edge, so reset is released
  while the wire is low.
* **Power-up values.** All state registers carry declaration initial values
  equal to their reset values, as FPGA flip-flops get from the bitstream. The
  result RAMs likewise power up at all ones. This matters because RESET is
  already high at time zero. An asynchronous reset that never sees an edge does
  not initialise anything on its own.

## Module map

```
fault_detect_top
 |- hm_6wut / hm_8wut
 |   |- ring_oscillator (-> fde)     reset_gen
 |   |- tpg_su   ora_su   startchecker (-> dist_ram)
 |   |- parity_tpg x2 (even, odd)
 |   |- ora6_check x2  |  ora8_check x2
 |   |- dist_ram x2 (odd, even results)
 |   '- cycle_counter (CYC_EN=1)
 '- hm_1wut
     |- ring_oscillator x2 (TPG, ORA)   reset_gen
     |- tpgcu   startchecker (ONE_WUT=1)
     '- clk_ora   oracu   dist_ram
fdt_pkg: wire structs (column order of the table above), FSM state enums
```

Main parameters: `hm_1wut.N` (burst of 2^N-1 pulses, default 8), the
oscillator sizes (`*_N_INV`, `OSC_T_INV`, `OSC_N_FDE`), `RST_WIDTH` (32),
`CYC_EN` and `CYC_WIDTH` (clock cycle counter variant, default on, 16 bits).

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and contains a watchdog. The testbenches need
verilator's timing support:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fdt_pkg.sv \
          tb/tb_fault_detect_top.sv --top-module tb_fault_detect_top
./obj_dir/Vtb_fault_detect_top
```

The macro testbenches inject faults with `force` on the wire structs. They
cover stuck wires, a transient inversion, a frozen pattern, lost and extra
pulses, and a dead oscillator, and compare the readback maps with expectations
computed from the pattern table. `tb_fault_detect_top` runs all three macros at
their default sizes, with one untouched copy and one faulty copy. It counts each
mechanism and fails if one never happens: reset release, handshake, RAM writes,
feedback hold, address map, end of burst, pass write and extra-pulse rewrite.

`tb_stuck_at_campaign` evaluates the macros the way a fault campaign on the
device would. Each fault runs in its own copy of a macro, present from power-up.
The start bit and the result RAMs are then sorted into four outcome classes:

* not started, fault detected;
* not started, no fault;
* started, fault detected;
* started, no fault. This is the bad case: the fault escaped.

The faults:

* each of the 6, 8 and 1 wires under test stuck at 0 and at 1. Every one of
  these 30 runs must end "started, fault detected".
* a stuck clock;
* a stuck start-checker enable;
* a fault whose ORA result wire is also stuck at 0, which masks it.

The testbench prints the class counts for each macro.

## How far this follows the original design, and where it fills gaps

Taken from the original description:

* the block structure and signal names;
* the pattern and expected-configuration tables;
* the XNOR/XOR checkers and the minimised eight-wire equations;
* the ORA_SU state diagram;
* the start checker gates;
* the reset register;
* the FDE and the ring oscillator structure;
* the edge-counter ORA and the behaviour of its control unit;
* the use of wires I, II, V, VI as RAM address.

Choices made in this RTL, where the description is silent:

* **TPG_SU state machine.** The four states and the one-cycle TPG_NEXT pulse
  are new; only the signals and their order are given.
* **Six-wire feedback.** It is built as a flag register. Feeding the RAM output
  back is impossible because the RAM powers up at "fault".
* **Cross-coupled groups.** The description says columns III and IV change
  groups. Its truth tables, its gate choice and its worked example all put PEven
  and POdd on the opposite checkers instead. This RTL follows the truth tables.
* **Reset length.** The description calls the reset "16 cycles" but specifies an
  all-ones 32-bit register. The register is followed, so reset lasts 32 cycles.
* **TPGCU and OCU.** Their state machines and the D inputs of FFDN/FFDP are
  reconstructions from the described behaviour.
* **ORA_CLK** is used as a write enable on the macro clock, not as a clock.
* **ORA-side reset.** ORA_SU, the feedback flags and the counters are also reset
  by RESET.
* **Sizes with no given value:** N = 8 for the single-wire burst, the oscillator
  sizes, the 16-bit cycle counter (counts from reset and saturates), and the
  address bit order `{Cu1, Cu0, Cd1, Cd0}`.

Limits to keep in mind:

* Timing comes from the behavioural oscillator, so real frequencies cannot be
  read from simulation.
* FFDN/FFDP change asynchronously to the ORA clock. Silicon would want a
  synchroniser, which the original does not show.
* RNAND is used as a clock. In zero-delay RTL it cannot glitch. On silicon a
  counter carry can glitch it, so a faithful implementation must constrain that
  logic.
* Fault injection here forces wire values. The original approach (bitstreams
  with one PIP removed) also hits faults in the control logic. Faults after the
  ORA, or on the constant-driving nets, stay undetectable by design.

Not included:

* **Write-acknowledge handshake.** The original suggests a variant of ORA_SU for
  result memories that report when a write has finished. LUT RAM needs no such
  signal, so only the plain two-state version is built.
* **Host side.** This covers loading a macro by partial reconfiguration,
  reading the RAM contents back through the configuration port, and the
  processor that sequences it. It is device infrastructure, not RTL, so the
  `*_mem` outputs stand in for readback.
* **Placement and routing.** The macros only test something once they are
  placed and routed as hard macros over the region under test, and that
  depends on vendor tools.
