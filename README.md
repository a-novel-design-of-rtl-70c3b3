# Data-driven clock-gated merging flip-flops

Most flip-flops in a digital design hold the same value for most clock cycles.
Typical data-to-clock toggling ratios are 1 % to 10 %. Even so, each flip-flop's
clock pin is charged and discharged every cycle. This design removes those wasted
clock edges in two ways:

* **Merging flip-flops (k-MBFF).** k flip-flops share one clock pin, so the clock
  tree sees one load instead of k.
* **Data-driven clock gating (DDCG).** Each bit compares its next value with its
  present value. The k comparison results are ORed together. The merged flip-flop
  receives a clock pulse only in cycles in which at least one of its k bits
  actually changes.

Together, the clock gate's cost (XOR gates, an OR tree, a latch and an AND) is
spread over k flip-flops rather than paid per flip-flop.

The RTL contains the gating cell and a small demonstration circuit. In that circuit
two 8-bit registers are built from such gated groups. One register stores the input
word. The other stores the input plus a second operand.

## How one gated group works

```
            d[K-1:0] ─────────────────────────────┬──────────────► D  merging_ff  Q ──┬──► q
                                                  │                     ▲             │
   state_change_detector:  z = d ^ q ◄────────────┴─────────────────────┼─────────────┘
                           f = |z                                       │
                               │                                        │ gclk
   icg:            latch (open while clk = 0) ──► en_latched ──► AND ───┘
                                                                  ▲
                                                 clk ─────────────┘
```

* **State change detector** (`state_change_detector`). It computes `z = d ^ q`,
  one bit per flip-flop, and `f = |z`. `f = 1` means the group's contents would
  change at the next rising edge.
* **Integrated clock gate** (`icg`). A level-sensitive latch follows `f` while
  `clk` is low and holds while `clk` is high. The gated clock is
  `clk & en_latched`. The latch is closed during the high phase, so a late change
  of `f` cannot cut a pulse short or add a glitch.
* **Merging flip-flop** (`merging_ff`). K D flip-flops on the one gated clock
  pin, with an asynchronous active-high reset.

### Timing

Inputs must settle during the low phase of the clock. That is when the latch is
open and the request propagates through it. At the rising edge one of two things
happens:

* If any bit differs, the latch holds 1, `gclk` rises together with `clk`, and the
  group loads `d`.
* If no bit differs, `gclk` stays low and the group keeps `q`. That is the value
  it would have loaded anyway.

Seen from outside, a group therefore behaves exactly like an ordinary register
with one cycle of latency. Only the number of clock pulses differs.

After the edge `q` equals `d`, so `f` drops. The latch is closed during the high
phase, so this has no effect until the next low phase. As a result the gate stays
closed in a steady state. The assertion `a_no_lost_update` in `ddcg_mbff` checks
the safety property: a closed gate at a rising edge implies `d == q`.

The gated clock drives flip-flops directly. In a real implementation `icg` maps
to the library's clock-gating cell, and the gated net is a clock net in static
timing analysis. In RTL simulation the AND gate is an ideal zero-delay gate.

## Choosing the group size k

A larger k shares the detector's OR tree and the latch over more flip-flops. It
also makes the group's clock run more often: with independent bit activity p, a
k-bit group is clocked with probability `1 - (1 - p)^k`. Balancing the clock
energy saved against the latch overhead gives the k that maximises savings. It
solves

    (1 - p)^k · ln(1 - p) · C_FF + C_latch / k^2 = 0

where `C_FF` and `C_latch` are the clock input loads of a flip-flop and of a
latch. Low-activity flip-flops favour large groups. Flip-flops should be grouped
with others of similar activity, in order of their toggling probability, so that
one busy bit does not keep the clock of many quiet ones running.

In the RTL, k is the parameter `K`. The default is 8. `ddcg_top` splits each W-bit
register into `W/K` independent groups, so k = 2, 4 or 8 can be compared directly.
`tb_ddcg_top_ksweep` does this with 16-bit registers and p = 1/16. The measured
clocking rate per group matches the formula above: about 0.12, 0.23 and 0.40 for
k = 2, 4 and 8.

The RTL cannot measure energy. Which k is best depends on cell capacitances,
which belong to the technology, not to the logic. The activity-ordered grouping is
a design-flow step (deciding which flip-flops go together). It is not implemented
here. `ddcg_top` groups adjacent bits.

## The demonstration circuit (`ddcg_top`)

| signal | meaning |
|---|---|
| `clk`, `rst` | free-running clock; asynchronous reset, active high |
| `din[W-1:0]`, `b[W-1:0]` | inputs; change them while `clk` is low |
| `v` | `din + b` (modulo 2^W), combinational |
| `dout1` | register 1: `din` one edge later |
| `dout2` | register 2: `v` one edge later |
| `z1`, `z2` | per-bit change vectors of the two registers |
| `f1`, `f2` | per-group change requests (W/K bits each) |
| `s1`, `s2` | per-group latched enables |
| `dc1`, `dc2` | per-group gated clocks |

Each register has its own detectors and clock gates:

* When only `b` changes, register 2 is clocked and register 1 is not.
* When `din` and `b` change but their sum stays the same, register 1 is clocked
  and register 2 is not.

Reference point: with `din = 0x1A` and `b = 0x75`, the circuit settles to
`dout1 = 0x1A` and `dout2 = v = 0x8F`. At that point `z1 = 0` and `f1 = s1 = 0`,
and `dc1` stays low while `clk` keeps running.

Module hierarchy:

```
ddcg_top
├── arith_unit                 v = din + b
└── g_grp[W/K]
    ├── ddcg_mbff u_reg1        din -> dout1
    │   ├── state_change_detector
    │   ├── icg
    │   └── merging_ff
    └── ddcg_mbff u_reg2        v -> dout2  (same structure)
```

`ddcg_pkg` holds the shared defaults `DATA_W = 8` and `MBFF_K = 8`.

## What is taken from the source design and what is chosen here

These parts follow the described technique directly:

* XOR per bit, then OR, then latch, then AND with the clock, driving k flip-flops
  that share one clock pin.
* The latch-based (glitch-free) form of the gate, not a bare AND gate.
* The 8-bit widths and the reference values.

These points are design choices, made where the description gives no detail:

* **Latch polarity.** The latch is transparent while `clk` is low, as in a
  standard gate for rising-edge flip-flops.
* **Reset.** Reset is asynchronous and active high, so a gated group can still be
  cleared. The gate has no test-enable (scan) input.
* **Adder.** The operation `din + b` is inferred from the reference values. The
  carry out is dropped.
* **Two independent gates.** Register 2 has its own gate rather than sharing
  register 1's. A shared gate would lose updates when only `b` changes.
* **`W/K` split.** Dividing a register into separately gated k-bit groups
  generalises the k-MBFF idea. With the defaults each register is one group.
* **Port meanings.** `s1` is taken to be the latched enable and `dc1` the gated
  clock.

Not included:

* The circuit that the FPGA area/power comparison was made against.
* Any FPGA-specific clock-enable mapping.

On an FPGA, synthesis tools usually turn such a gate into a flip-flop clock
enable. Area and power figures quoted for the technique (about half the LUTs and
about 30 % less power than an ungated reference) come from such an FPGA
implementation. They have not been reproduced here.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_state_change_detector` | all 65,536 (d, q) pairs for K = 8 |
| `tb_icg` | enable changes in both clock phases; gated clock equals `clk & latch` at every step, no glitches, pulse count |
| `tb_merging_ff` | loads on the shared edge; asynchronous reset between edges |
| `tb_arith_unit` | reference vector, carry corner cases, random operands |
| `tb_ddcg_mbff` | 4,000 cycles at low activity against a plain reference register; detector outputs; exactly one gated-clock pulse per changing cycle |
| `tb_ddcg_top` | the full-size default design end to end (see below) |
| `tb_ddcg_top_ksweep` | k = 2, 4, 8 side by side on identical stimulus; outputs and pulse counts for each k |

`tb_ddcg_top` runs the design at its defaults, with no parameter overrides. It
replays the reference point and then mixes five kinds of cycle, counting each:

* both gates closed;
* only register 2 clocked;
* only register 1 clocked;
* both clocked;
* an asynchronous reset while the clocks are gated.

It fails if any kind never occurs.

Each testbench has been checked against a deliberately broken copy of its module,
and it detects the fault. The faults were:

* the OR tree drops a bit;
* the latch is open in the wrong phase;
* the reset is synchronous;
* the detector misses the MSB;
* the adder loses carries;
* the two registers share one gate.

To simulate, for example, the top-level testbench:

```
verilator --binary --timing --assert -Irtl rtl/ddcg_pkg.sv tb/tb_ddcg_top.sv \
    --top-module tb_ddcg_top -Mdir obj_top
./obj_top/Vtb_ddcg_top
```

Any other testbench works the same way: put `rtl/ddcg_pkg.sv` first and the
testbench file second, and verilator finds the remaining modules in `rtl/` by
name. All RTL is synthesizable. `icg` contains one intentional latch per group.
Lint reports that `rst` is used both as an asynchronous reset and in the
(simulation-only) assertion's `disable iff`. That warning is expected.
