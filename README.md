# A 2-bit add-compare-select unit in majority logic

A Viterbi decoder does most of its work in its add-compare-select (ACS)
units, one per trellis state. At every stage, each unit receives two
candidate paths into its state. For each path it adds the branch metric to
the path metric, compares the two sums, and keeps the smaller one as the
state's new metric. The comparison result is the survivor decision: it says
which predecessor path survived, and the traceback logic stores it.

This RTL describes such a unit the way it is laid out in quantum-dot
cellular automata (QCA). In QCA the native gate is the three-input majority
gate, not NAND or NOR. Everything here is therefore written as majority
gates, some with one input tied to a constant. The logic function is
ordinary and synthesizable. It is meant as an executable reference for the
majority-gate netlist, and it can also be used as a plain logic block.

## The unit

```
pm1 ─┐
bm1 ─┴─ qca_xor ── sum1 ──┬─────────────────────────── s1 ┐
                          └── a ┐                         │
                                qca_lt_cmp ── dec ──┬─── sel  qca_mux2 ── sm_q
                          ┌── b ┘                   │     │
pm2 ─┬─ qca_xor ── sum2 ──┴─────────────────────────┼─ s0 ┘
bm2 ─┘                                              └──────────────────── dec
```

| Port | Dir | Meaning |
|------|-----|---------|
| `pm1`, `bm1` | in | path metric and branch metric of candidate path 1 |
| `pm2`, `bm2` | in | path metric and branch metric of candidate path 2 |
| `sum1`, `sum2` | out | candidate metrics `pm xor bm` |
| `dec` | out | survivor decision, `sum1 < sum2`, for the traceback memory |
| `sm_q` | out | new state metric: `sum1` if `dec`, else `sum2` |

Every metric is **one bit wide**. "2-bit" means two bits per candidate
path: a path metric and a branch metric. At this width the "add" is an XOR.
It gives the sum bit of two single bits and drops the carry, so it is
addition modulo 2. The comparator is the one-bit less-than. Together,
compare and select pass on the minimum of the two sums, `sum1 & sum2`.
When the sums are equal, `dec` is 0 and path 2 is kept.

The unit is purely combinational. It has no clock, no reset and no state.
In a decoder, the path-metric register and the survivor memory sit outside
it (see the end-to-end testbench below).

## Majority logic, gate by gate

`M(a,b,c) = ab + bc + ac`. Tie one input to 0 and the gate becomes AND. Tie
it to 1 and it becomes OR. In a QCA layout these constants are cells with a
fixed polarization: -1 is logic 0 and +1 is logic 1. The package `qca_pkg`
names them `FIXED_0` and `FIXED_1`. Each gate module instantiates
`qca_maj3` with these constants, so the RTL netlist matches the
majority-gate count.

| Module | Function | Majority network | Gates |
|--------|----------|------------------|-------|
| `qca_maj3` | `ab+bc+ac` | primitive | 1 |
| `qca_xor` | `a ^ b` | `M( M(a,b',0), M(a',b,0), 1 )` | 3 + 2 inverters |
| `qca_lt_cmp` | `a < b` | `M(a',b,0)` | 1 + 1 inverter |
| `qca_mux2` | `sel ? s1 : s0` | `M( M(s0,sel',0), M(s1,sel,0), 1 )` | 3 + 1 inverter |
| `acs_unit` | add-compare-select | 2 × `qca_xor`, `qca_lt_cmp`, `qca_mux2` | 10 + 6 inverters |

The XOR and less-than equations are the standard majority-logic forms. The
multiplexer's internal network, and which data input `sel = 1` picks, are
this implementation's choice. The only requirement is a 2:1 majority-logic
mux.

## What the RTL does not model

- **QCA clocking.** A QCA circuit is paced by a four-phase field clock
  (switch, hold, release, relax) applied zone by zone. The reference
  layout of the whole unit uses 4 clock zones and is reported at 1.4 clock
  cycles of latency. It is reported at 0.75 cycles for the XOR, 1.25 for
  the comparator and 1.00 for the mux. Those figures describe the cell
  clock, not a digital pipeline. No mapping of cells to zones is
  available, so the RTL does not reproduce them.
- **Physical figures.** The reference layout has 68 cells and an area of
  0.52 µm² (cell size 18 nm, radius of effect 65 nm). Its energy per
  operation is on the order of 3·10⁻²¹ J at 1 K. None of these has an RTL
  counterpart.
- **The decoder around the unit.** Branch-metric computation,
  path-metric storage and traceback are outside the unit. The unit's ports
  are where they connect.
- **Wider metrics.** Multi-bit metrics with real carries and a multi-bit
  comparator would be an extension. They are not described here.

## Files

- `rtl/qca_pkg.sv`: fixed-polarization constants.
- `rtl/qca_maj3.sv`, `rtl/qca_xor.sv`, `rtl/qca_lt_cmp.sv`,
  `rtl/qca_mux2.sv`: the gates.
- `rtl/acs_unit.sv`: the top-level ACS unit. It has no parameters.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M` and has a watchdog.

The gate testbenches apply every input combination and then random ones.
They compare against integer arithmetic, such as `(a+b) % 2` and `a < b`,
not against gate equations. `tb_acs_unit` runs in two phases:

1. All 16 input combinations.
2. 256 trellis stages with a path-metric register in the testbench. The
   register feeds `sm_q` back into `pm1`, as a state-metric update would.
   Each stage's `dec` is stored in a survivor history, which is then
   checked.

It counts how often path 1 wins, how often path 2 wins and how often the
sums tie, and it fails if any of the three never happens.

## Simulating

With Verilator 5 (any testbench; the package is listed first):

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_acs_unit \
    -y rtl -y tb +libext+.sv rtl/qca_pkg.sv tb/tb_acs_unit.sv
./obj_dir/Vtb_acs_unit
```

Lint only: `verilator --lint-only -Wall -y rtl rtl/qca_pkg.sv rtl/acs_unit.sv`.
A passing run ends with `TB_RESULT checks=1075 failures=0`.
