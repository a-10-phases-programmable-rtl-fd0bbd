# Programmable ten-phase clock generator for a SAR ADC

A successive-approximation ADC steps through its conversion one bit at a
time, and each step needs its own clock phase to drive the transmission-gate
switches of that step. This generator makes those phases on chip from a single
external two-phase clock. It delivers up to ten phases, `Nclk[9:0]`, each with
a complement `Pclk[9:0]`, one after the other in a repeating round.

Its main idea is that it does not use a chain of D flip-flops. A single `1`,
called the token here, moves down a chain of sections. In the transistor
circuit each section stores the token on the gate capacitance of two
inverters, between two switches clocked by `clk1` and `clk2`. A section
holding no token does not switch, so power is spent only where the token is.
Three things are programmable:

* **Which sections run.** A 10-bit word `bsi` chooses the first and the last
  section of the round, so that any contiguous run of phases can be used. This
  matches an ADC whose branches can be selected the same way.
* **How many phases.** The round length is the number of sections chosen.
* **Phase width.** The input `CLK_FILL` trims each phase. This sets where two
  neighbouring phases cross, which controls glitches in the ADC.

## Structure

```
                 +-------------------+
   restart ----> |  input block      |--- first_tok ---+---------+----- ... ---+
   (NOR)         |  (iclk_atom_in)   |                 |         |             |
                 +-------------------+                 v         v             v
                                  BlockIn=1 -->  [section 9]-->[section 8]--> ... -->[section 1]--> Nclk[0]
                              clk1st_in2=0 -->     |  Nclk[9]     |  Nclk[8]            |  Nclk[1]
                                                   +-- to_nor ----+-- to_nor ... -------+-- to_nor
                                                                  |
                                                     9-input NOR (restart_nor) --> restart
```

| Module | Role |
|---|---|
| `clkgen_10phase` | Top level: one input block, `NPHASES-1` sections, and the restart NOR. |
| `iclk_atom` | One section. It makes one phase and passes the token on. |
| `iclk_atom_in` | The input block. It holds a newly made token for one cycle, then offers it to every section. |
| `restart_nor` | A NOR gate. It makes a new token when no section reports one. |
| `dyn_stage` | The two-switch dynamic storage, shared by the section and the input block. |

## One section

Section `k` (k = 9..1) has these programming inputs:

* `Bprog1`, which is `bsi[k]`.
* `Bprog2`, which is `bsi[k-1]`.
* `BlockIn`, which comes from the section above. It is tied to 1 at section 9.

The section's logic is:

```
first     = ~Bprog1 & BlockIn               // "I am the first active section"
token     = (first & clk1st_in1) | clk1st_in2
BlockOut  = BlockIn & Bprog1                // a 0 bit blocks every section below
Nclk      = CLK_FILL & token,  Pclk = ~Nclk
to_nor    = Bprog2 & token                  // report, unless this is the last section
clk1st_out = Bprog2 & dyn_stage(token)      // token to the next section, one cycle later
```

`clk1st_in1` is the input block's output, and every section receives it.
`clk1st_in2` is the `clk1st_out` of the section above.

## Programming word

The phases start at the section of the **first `0`** in `bsi`, reading from
bit 9 down. They stop at the section just **above the second `0`**. Section
`k` lets the token out only when `bsi[k-1]` is 1.

If there is no second `0`, the token leaves section 1 and appears as
`Nclk[0]`. That phase is the raw output of section 1's storage, so `CLK_FILL`
does not trim it. It is a full cycle wide. If `bsi[0] = 0`, phase 0 is off.
`bsi[0]` can never start a round. If bits 9..1 contain no `0`, no phase runs
at all.

| `bsi` (bit 9..0) | Phases, in order | Round length |
|---|---|---|
| `0111111111` | 9, 8, …, 1, 0 | 10 |
| `1111011110` | 5, 4, 3, 2, 1 | 5 |
| `1011111011` | 8, 7, 6, 5, 4, 3 | 6 |
| `1111011111` | 5, 4, 3, 2, 1, 0 | 6 |
| `1111111001` | 2 (every cycle) | 1 |
| `1111111111` | none | – |

To move a window of phases or change its length, you only change the two or
four bits that hold the zeros.

## Timing and the restart

`clk1` and `clk2` must not overlap. One clock cycle is one `clk1` pulse
followed by one `clk2` pulse. The token sits in a section's OR gate from one
rising edge of `clk2` to the next. That window is when the section's phase is
high, wherever `CLK_FILL` is also high. The token then moves one section per
cycle:

```
clk2   _|^|_____|^|_____|^|_____|^|___
clk1   _____|^|_____|^|_____|^|_______
Nclk9  __|^^^^^^^|______________________   (CLK_FILL high inside the window)
Nclk8  __________|^^^^^^^|______________
Nclk7  __________________|^^^^^^^|______
```

The NOR sees the `to_nor` report of every section. The last section of the
round does not report, because its `Bprog2` is 0. With no second `0`, the
token is reported until it leaves section 1 for phase 0. In either case the
NOR makes a new `1` during the last phase of the round. The input block
stores it on that cycle's `clk1` and offers it on the next `clk2`. So the first
phase of the next round follows the last phase of this one with no gap. The
round period is therefore exactly the number of active phases, in cycles.
`nclk_x` and `pclk_x` show the NOR output trimmed by `CLK_FILL`. They are high
during the last phase of each round.

**Reset** is active high and asynchronous. It clears every storage node. In
the circuit this is done by an NMOS pulling to ground and a PMOS pulling to
VDD. After Reset is released, the first `clk1`/`clk2` cycle makes a new token.
The first active phase is high from the second `clk2` pulse on. The round
always restarts from its first phase.

## How the transistor circuit maps to RTL

* **Switches.** Each switch and the inverter input behind it is written as a
  level-sensitive latch (`always_latch`). The latch is transparent while its
  clock is high. The charge leaking from the node is not modelled, so the RTL
  holds a value for ever, while the circuit holds it only for a short time.
  The clocks must keep running.
* **Loop warnings.** Lint and synthesis report a combinational loop: input
  block → sections → NOR → input block. The loop passes a `clk1` latch and a
  `clk2` latch. With non-overlapping clocks it is never transparent end to
  end, so the warning is expected.
* **Synthesis.** The design synthesizes to 20 latches and simple gates. A
  library flow needs the latch timing constraints of a two-phase design. A
  full-custom flow would place the switches and capacitances as drawn.
* **Supply pins.** The `VDD` terminals of the blocks are supply connections
  and have no ports.

## Interface of `clkgen_10phase`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk1`, `clk2` | in | 1 | Non-overlapping two-phase clock from outside the chip. |
| `rst` | in | 1 | Reset, active high. |
| `clk_fill` | in | 1 | Trims the width of phases 9..1. |
| `bsi` | in | `NPHASES` | Programming word. |
| `nclk` | out | `NPHASES` | Phases, active high (for NMOS gates). |
| `pclk` | out | `NPHASES` | Complements of `nclk` (for PMOS gates). |
| `nclk_x`, `pclk_x` | out | 1 | Phase output of the input block. |

`NPHASES` defaults to 10. Raising it adds sections to the chain. The
16-phase testbench exercises this.

## Choices and departures

These are points where the published circuit is ambiguous, or where this RTL
makes its own choice:

* **Which output is `Nclk`.** The section schematic labels the AND output
  `Pclk` and the inverted one `Nclk`. The circuit description says `Nclk` is
  the AND output and drives NMOS gates. That is also the only reading that
  gives positive `Nclk` pulses and an inverted `Pclk[0]`. This RTL uses it.
* **The restart gate.** It is called both an OR and a NOR. Only a NOR makes a
  new token when the chain is empty, so a NOR is used. The drawn tree of four
  gates becomes one 9-input reduction.
* **Number of sections.** The chain is called "10 blocks". The block diagram
  shows an input block plus nine sections, with phase 0 taken from the last
  section. This RTL follows the diagram.
* **Switch polarity.** A switch is taken to be closed while its clock is high.
  `clk1` and `clk2` are assumed never to overlap.
* **Changing `bsi` while running.** This is not specified. The testbenches
  change it only under Reset, so behaviour during a change made while the
  chain runs is not verified.
* **Not modelled.** Analog behaviour is outside the RTL: charge leakage,
  supply current, energy per cycle (about 145 fJ), and edge shapes.

## Simulation

Every file in `rtl/` is one module, and the file has the module's name. The
testbenches use timing controls, so build them with `--timing`. They print
`TB_RESULT checks=N failures=M` at the end.

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -y rtl \
          --top-module tb_clkgen_10phase tb/tb_clkgen_10phase.sv
./obj_dir/Vtb_clkgen_10phase
```

| Testbench | What it checks |
|---|---|
| `tb_dyn_stage` | One cycle of delay; the value holds during `clk1` and between pulses; Reset at random times. |
| `tb_iclk_atom` | All 64 input combinations against the section rules: BlockOut, Nclk/Pclk, `to_nor`, and `clk1st_out` after exactly one cycle and only when `Bprog2` is 1. |
| `tb_iclk_atom_in` | Trimmed phase output, one cycle of delay, Reset. |
| `tb_restart_nor` | All 512 input patterns. |
| `tb_clkgen_10phase` | The full design at its default size. |
| `tb_clkgen_extended` | The same checks at 16 phases. |

`tb_clkgen_10phase` runs the modes `0111111111`, `1111011110`, `1011111011`
and others, plus 30 random words. It uses three `CLK_FILL` widths and a Reset
in the middle of a round. It builds the expected phase order from the rule in
*Programming word*, independently of the gates. In every cycle it then checks
three things:

* The right `Nclk` is alone high in the middle of the `CLK_FILL` pulse.
* `Pclk` is its complement.
* Phases 9..1 are low while `CLK_FILL` is low, and phase 0 keeps its level.

It also counts each mechanism and fails if any of them never occurs: token
hand-over, restart, end at a second `0`, phase 0 on, phase 0 off, mid-round
Reset, reprogramming, and each fill shape.
