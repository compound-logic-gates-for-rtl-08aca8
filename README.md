# Compound RSFQ gates and a four-cycle carry lookahead adder

In rapid single flux quantum (RSFQ) logic a bit is a voltage pulse, not a
level: a pulse arriving during a clock period is a 1, no pulse is a 0. Most
gates (AND, XOR, NOT, the D flip-flop) store their input pulses in
superconducting loops until the next clock pulse reads them. So every such gate
is a pipeline stage of its own. A function that CMOS computes in one
combinational cloud takes several RSFQ clock cycles, plus path balancing
flip-flops to keep the operands of each gate in step.

*Gate compounding* works around this. A clocked gate is split into primitives:
its input storage loops, and the merger that the clock pulse is read through.
The clock-free gates (splitters and confluence buffers, i.e. pulse OR) are then
placed in front of those loops. All the work before the loops happens within
one cycle, so richer functions finish in a single clock period. Examples are
NIMPLY (`a & ~b`), XNOR, the carry term `(g_i + p_i)(g_i + g_j)`, and in fact
every two-input truth table. The result does not depend on when the pulses
arrive within the cycle, only on the usual setup and hold limits.

This repository models the idea at the clock-cycle level in synthesizable
SystemVerilog. It has two parts:

* a set of RSFQ cells and compound gates, each exactly one clock stage;
* the showcase circuit, a 4-bit carry lookahead adder (CLA) built from
  compound gates. It gives `a + b` four clock cycles after the operands arrive
  and takes a new operand pair every cycle. A CLA built from plain RSFQ cells
  needs six to eight cycles for the same job.

## From pulses to registers

The whole model rests on one mapping, used in every file:

| RSFQ element | class | RTL |
|---|---|---|
| splitter (copies one pulse onto two outputs) | asynchronous | net fanout; no module |
| confluence buffer / merger | asynchronous | `sfq_cb`: combinational `a \| b` |
| D flip-flop (destructive readout) | clocked | `sfq_dff`: one register |
| AND, XOR, inverter | clocked | `sfq_and`, `sfq_xor`, `sfq_not`: function, then one register |
| compound gate | clocked | function of the whole pre-loop network, then **one** register |

A net holding 1 during cycle *t* stands for one pulse during that cycle. A
clocked gate's output in cycle *t+1* is its function of the inputs in cycle
*t*. A compound gate collapses a network that plain cells would spread over
two or three stages into a single register. Compare the conventional NIMPLY
(an inverter stage, a path balancing DFF, then an AND stage: two cycles) with
`sfq_nimply`, which takes one cycle.

Pulse timing, bias currents, Josephson junction counts and operating
frequency are outside this model. It is exact about *which cycle* each result
appears in, which is what gate compounding changes.

`rst_n` (active low, asynchronous) puts every storage loop in its power-up
state: empty, so every clocked output is 0. The circuits themselves have no
reset pin. The reset input is a convenience of this RTL.

## The double-pulse rule

A confluence buffer is not a perfect OR. If both inputs carry a pulse in the
same cycle, it emits one pulse when they coincide and two when they are apart
in time. AND gates, DFFs and inverters ignore a second pulse in a cycle. An XOR
does not: its loop is set by one pulse and reset by the next, so a double pulse
on one input corrupts the result. For example, `(A + B) ^ C` with a merger in
front of an XOR gives a wrong output when A, B and C all pulse. Hence:

> a buffer may drive an XOR only if its two inputs are never 1 in the same cycle.

Because a net in the RTL carries one bit per cycle, the hazard itself cannot
occur in simulation. `sfq_cb` therefore has a parameter `SINGLE_PULSE`. When it
is set, a deferred assertion fires if both inputs are ever 1 together. The
adder's GP blocks set it on the buffer that merges `g_i` and `p_i`. A bit
position, or a group of them, cannot both generate and propagate a carry, so
the assertion checks that invariant on every cycle of every simulation.

## Cells and compound gates

All are one cycle from input to output and accept new inputs every cycle.

| module | function | notes |
|---|---|---|
| `sfq_dff` | `q = d` | path balancing; the readout clears the loop |
| `sfq_not` | `q = ~a` | releases the clock pulse unless an input pulse arrived |
| `sfq_and` | `q = a & b` | |
| `sfq_xor` | `q = a ^ b` | mind the double-pulse rule |
| `sfq_cb` | `q = a \| b`, no clock | `SINGLE_PULSE` assertion |
| `sfq_nimply` | `q = a & ~b` | compound: the conventional form takes 2 cycles and a balancing DFF |
| `sfq_xnor` | `q = ~(a ^ b)` | compound, built as `~(a\|b) \| (a&b)`: a merger, an inverting branch and an AND branch joined by a merger |
| `sfq_gate2 #(TT)` | `q = TT[{a,b}]` | any of the 16 two-input functions in one cycle |

`sfq_gate2`'s truth-table parameter uses the input pair `{a,b}` as a bit index.
So `4'b1000` is AND, `4'b0110` XOR, `4'b0100` NIMPLY, `4'b1001` XNOR and
`4'b1110` OR. It models only the logic of each function. Each truth table has
its own circuit, with its own area, bias margins and maximum frequency, and
those are not represented. The original work notes that some compound forms
cost a lot: XNOR is large and comparatively slow, so compounding should be
used with care.

## The carry lookahead adder (`cla_adder4`)

### Building blocks

* **`cla_init`**: one per bit. Splitters copy `a_k` and `b_k` to an XOR and
  an AND: `p_k = a_k ^ b_k` (propagate), `g_k = a_k & b_k` (generate). The
  pair travels as the packed struct `sfq_pkg::gp_t`.
* **`cla_gp`**: combines a more significant group *i* with the adjacent
  less significant group *j*:

      G = (g_i + p_i)(g_i + g_j)   (= g_i + p_i g_j)
      P = p_i p_j

  Two confluence buffers form `g_i+g_j` and `g_i+p_i` with no clock, and one
  clocked AND joins them. `G` therefore costs one cycle rather than the two that
  an AND followed by an OR would take. `P` is a second AND. With
  `HAS_P = 0` that AND is left out, for blocks whose `P` nobody reads. `p_out`
  then reads 0 and the `p` field of `gp_j` is unused. The linter reports that
  unused field, and the report is expected.

### Topology and timing

`c_k` is the carry into bit `k`. There is no carry input.

```
cycle 1        cycle 2                    cycle 3                      cycle 4
init k=3 ─┐
          ├─ GP(3,2)      G32,P32 ──┐
init k=2 ─┤                          ├─ GP, no P  (G32,P32)+G10 → c4 ── DFF  → s4
          └─ DFF,DFF      g2,p2 ────┼─ GP, no P  (g2,p2)+G10   → c3 ── XOR p3 → s3
init k=1 ─┐                          │
          ├─ GP(1,0), no P  G10 ────┴─ DFF                      → c2 ── XOR p2 → s2
init k=0 ─┴─ DFF          g0 ──────── DFF                      → c1 ── XOR p1 → s1
                                                        p0 ─────────── DFF  → s0
```

Each `p_k` also passes through two path balancing DFFs (cycles 2 and 3), so
it meets its carry in the sum stage. In cycle 4, `s0 = p0`, `s_k = p_k ^ c_k`
for k = 1..3, and `s4 = c4`. Three of the four GP blocks have no `P`.

Every path from operand to sum crosses exactly four registers. Operands
applied in cycle *t* give their sum in cycle *t+4*, and the adder is fully
pipelined. The sum XORs are driven by AND gates and DFFs, never by a
confluence buffer, so the double-pulse rule is met by construction.

A worked sequence, one operation per cycle, as the adder's end-to-end test
applies it:

| a | 15 | 12 | 7 | 10 | 6 | 5 | 0 | 13 | 4 | 6 | 12 | 15 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|
| b | 1 | 4 | 1 | 3 | 7 | 1 | 12 | 1 | 13 | 0 | 1 | 15 |
| s (4 cycles later) | 16 | 16 | 8 | 13 | 13 | 6 | 12 | 14 | 17 | 6 | 13 | 30 |

The reference circuit ran at up to 16.4 GHz, which makes the four cycles a
latency of about 244 ps. The RTL has no notion of frequency.

## Top level (`sfq_compound_top`)

The adder and a bank of single-cycle gates stand side by side. They share
only the clock and reset.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock pulse; active-low asynchronous reset |
| `a`, `b` | in | 4 | adder operands |
| `s` | out | 5 | `a + b`, four cycles later |
| `gx`, `gy` | in | 1 | gate bank inputs |
| `nimply_q` | out | 1 | `gx & ~gy`, next cycle |
| `xnor_q` | out | 1 | `gx xnor gy`, next cycle |
| `not_q` | out | 1 | `~gx`, next cycle (plain clocked inverter) |
| `tt_q` | out | 16 | bit `k` = truth table `k` applied to `gx, gy`, next cycle |

The adder is fixed at 4 bits. Its topology is specific to that width, so
`sfq_pkg::CLA_BITS` is a named constant, not a tuning knob. `CLA_LATENCY`
records the four-cycle latency.

## Files

* `rtl/sfq_pkg.sv`: constants and the `gp_t` struct. Compile it first.
* `rtl/sfq_*.sv`: the cells and compound gates.
* `rtl/cla_init.sv`, `rtl/cla_gp.sv`, `rtl/cla_adder4.sv`: the adder.
* `rtl/sfq_compound_top.sv`: the top.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each ends with
  a line `TB_RESULT checks=N failures=M` and has a cycle watchdog.

## Simulating

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/sfq_pkg.sv tb/tb_sfq_compound_top.sv --top-module tb_sfq_compound_top
./obj_dir/Vtb_sfq_compound_top
```

Replace the testbench name to run any other testbench. Every test runs in well
under a second.

What the tests establish:

* each cell and compound gate: all input combinations plus random streams.
  The result is compared one clock later against a truth table written out
  in the testbench. Each test also checks that the output does not change
  before the clock, so the latency is exactly one cycle.
* `cla_gp`: inputs drawn from real generate/propagate/kill states, with `G`
  checked as the carry out of the combined group, for both variants.
* `cla_adder4` and the top: the latency of an isolated addition (exactly 4),
  the sequence above, all 256 operand pairs and random pairs back to back,
  checked against integer addition. The top's test also checks the gate bank
  on every cycle. It counts how often each carry mechanism occurred and fails
  if one never did. The mechanisms are: carry generated in bit 0, carry passed
  through `p1`, through `p2`, and through the group propagate `P32`, overflow
  into `s4`, and back-to-back issue.

## How far to trust it, and where it departs

* The RTL is a cycle-level logical model of the superconducting circuits.
  It reproduces their functions and cycle counts. It says nothing about
  pulse timing, margins, area or clock distribution. The clock splitter tree
  and counter-flow clocking of the real circuit are just `clk` here.
* These are this design's own choices: the reset input, `HAS_P = 0` driving a
  constant 0, the `TT` bit order of `sfq_gate2`, and the `SINGLE_PULSE`
  assertion.
* The adder's block diagram does not show the sum stage or the balancing of
  `p_k`. The two DFFs per `p_k`, and the DFFs on `s0` and `s4`, are the
  simplest way to meet the stated four-cycle latency.
* In the description of the P-less GP blocks, the unused input is named `p_i`.
  But `G` needs `p_i`. Here the P-less block drops `P = p_i p_j` and ignores
  `p_j`.
* For NIMPLY, the stated function `a & ~b` is followed. The single-cycle
  structure is only summarised in the source material, so `sfq_nimply` models
  its function and latency, not its loops.
* The characteristics of the individual compound gates (margins, maximum
  frequency, junction count) are not modelled. The adder's junction count
  (658) and frequency are not modelled either.
