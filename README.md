# Multi-modulus prescaler: a 3/4 stage rippling into a 2/3 stage

A prescaler divides a fast clock, such as a PLL's VCO output, by a small integer.
It is the only part of a frequency divider that runs at the full input rate. This
design reaches several ratios with as little logic as possible at that rate. Two
dual-modulus cells are used, and each one is just two flip-flops and two 2-input
NOR gates:

* a **divide-by-3/4 cell** clocked by the input `fin`;
* a **divide-by-2/3 cell** clocked by the 3/4 cell's output, whose output is `fout`.

Three mode inputs `mc1`, `mc2`, `mc3` select the ratio. `mc2` sets the 2/3 cell's
modulus directly. Two more NOR gates combine `mc1`, `mc3` and the output `fout` into
the 3/4 cell's control. That feedback lets the 3/4 cell divide by 3 in some of its
cycles and by 4 in others.

In silicon the flip-flops are true single-phase clock (TSPC) dynamic flip-flops
with an added reset, and the gates are static CMOS NORs. The RTL describes the same
network at the logic level.

## Ratio table

One output period spans `P` cycles of the 3/4 cell: `P = 2` when `mc2 = 1` and
`P = 3` when `mc2 = 0`. `fout` is high for exactly one of those cycles. The 3/4 cell
gets

```
mc34 = NOR(NOR(fout, mc1), mc3) = ~mc3 & (fout | mc1)
```

and it divides by 3 in a cycle where `mc34 = 1`, and by 4 otherwise. So:

| mc1 | mc2 | mc3 | 3/4 cell divides by | fin periods per fout period | fout high for |
|-----|-----|-----|----------------------|-----------------------------|---------------|
|  0  |  0  |  0  | 3 while fout = 1, else 4 | 3 + 4 + 4 = **11** | 3 |
|  0  |  0  |  1  | always 4             | 4 x 3 = **12**              | 4 |
|  0  |  1  |  0  | 3 while fout = 1, else 4 | 3 + 4 = **7**      | 3 |
|  0  |  1  |  1  | always 4             | 4 x 2 = **8**               | 4 |
|  1  |  0  |  0  | always 3             | 3 x 3 = **9**               | 3 |
|  1  |  0  |  1  | always 4             | 4 x 3 = **12**              | 4 |
|  1  |  1  |  0  | always 3             | 3 x 2 = **6**               | 3 |
|  1  |  1  |  1  | always 4             | 4 x 2 = **8**               | 4 |

The reachable ratios are 6, 7, 8, 9, 11 and 12. No 3/4 -> 2/3 cascade can divide by
more than 12. The published mode list for this prescaler gives other pairings:
÷8 at 010, ÷7 at 011, ÷9 at 110 and ÷13 at 101. Those pairings cannot all come from
this structure. ÷9 needs three 3/4 cycles, so it cannot happen while `mc2 = 1`.
÷13 is out of reach altogether. The RTL follows the gate-level structure, so the
table above is what it does. Treat the mode encoding as this design's own, not as a
reproduction of the published one.

## The two dual-modulus cells

Both cells have the same shape. The first flip-flop's D input is the complement of
the output. The second flip-flop's D input is `NOR(NOR(x, control), y)`, and its Q
output is the cell's output.

**2/3 cell** (`rtl/prescaler_2_3.sv`):
`d2 = NOR(NOR(q1, mc), q2)`, `d1 = ~q2`, `fout = q2`.
With `mc = 1` the inner gate is held at 0, so `q2` toggles and the cell divides by 2.
With `mc = 0`, `d2 = q1 & ~q2`, and `(q1,q2)` steps 00 -> 10 -> 11 -> 00, dividing
by 3. The output is high for one input period in both modes. `mc` matters only at
the clock edge taken in state 00.

**3/4 cell** (`rtl/prescaler_3_4.sv`):
`d2 = NOR(NOR(~q2, ~mc), ~q1)`, `d1 = ~q2`, `fout = q2`.
With `mc = 0` the inner gate is held at 0 and `d2 = q1`. The pair is then a
twisted-ring counter, 00 -> 10 -> 11 -> 01 -> 00, which divides by 4 with a 50 %
duty cycle. With `mc = 1`, `d2 = q1 & ~q2`, so state 01 is skipped and the cell
divides by 3, high for one input period. `mc` is sampled at the edge taken in state
11, which comes one input period after the output rises.

The 3/4 cell's polarity (`mc = 1` divides by 3) matches the 2/3 cell, where
`mc = 1` also picks the smaller modulus. Built from the reference gate network, the
3/4 cell has the opposite polarity. This design keeps the stated polarity by
inverting `mc` at the first gate. Removing that inverter swaps the cell's two modes,
and with them the meaning of `mc1`/`mc3` at the top.

## Timing of the ripple

The 2/3 cell is clocked by the 3/4 cell's output, not by `fin`. This is an
asynchronous ripple, as in the transistor design. In a zero-delay simulation
everything settles within the time step of a `fin` rising edge. The 3/4 cell's
output rises, the 2/3 cell updates `fout`, and the control gates recompute `mc34`.
In hardware, the path clock-to-Q (3/4) -> clock-to-Q (2/3) -> two NOR gates must
settle before the next `fin` rising edge, because the 3/4 cell samples `mc34` then.
That path is what limits the top input frequency.

The mode inputs are meant to be static. A new setting takes effect within one output
period, and the testbench checks this. After reset the first output period can
differ from the steady ratio.

## The flip-flop and reset

`rtl/tspc_dff.sv` is a positive-edge D flip-flop with `q` and `qbar`. The reset is
**asynchronous and active high** and clears `q`. This is this design's own choice.
The reference only says a reset is added, by discharging an internal node. The
cells' reset pin is the one marked `in`/`In` on their symbols, shared by both
flip-flops; the top brings it out as `rst`. Asserting `rst` clears all four
flip-flops, so `fout = 0`. After release, the 2/3 cell (in its own test) gives its
first output pulse on the first `fin` edge in ÷2 mode and on the second in ÷3 mode.
The 3/4 cell gives its first pulse on the second edge.

Not modelled: the TSPC cell stores its state on node capacitance and fails at very
low clock rates through leakage. The RTL flip-flop is static.

`rtl/nor2.sv` is the two-input NOR. The static CMOS gate was chosen over NMOS and
pseudo-NMOS NORs because those draw static current; that choice has no effect at
the logic level.

## Files

| file | module | role |
|------|--------|------|
| `rtl/multi_modulus_prescaler.sv` | `multi_modulus_prescaler` | top: the two cells and two control NORs |
| `rtl/prescaler_3_4.sv` | `prescaler_3_4` | divide-by-3/4 cell |
| `rtl/prescaler_2_3.sv` | `prescaler_2_3` | divide-by-2/3 cell |
| `rtl/tspc_dff.sv` | `tspc_dff` | D flip-flop with asynchronous reset |
| `rtl/nor2.sv` | `nor2` | 2-input NOR |

None of the modules has parameters. Top ports: `rst`, `fin`, `mc1`, `mc2`, `mc3`
(inputs) and `fout` (output), all 1 bit.

Out of scope: the PLL around the prescaler (VCO, phase-frequency detector) and all
power, delay and transistor-count figures. Those belong to the transistor-level
implementation and have no RTL counterpart.

## Testbenches

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and has a
watchdog.

* `tb/tb_nor2.sv`: all four input combinations against the truth table.
* `tb/tb_tspc_dff.sv`: random data against a reference register, hold between edges,
  asynchronous reset between edges and held across an edge.
* `tb/tb_prescaler_2_3.sv`, `tb/tb_prescaler_3_4.sv`: for both modes, checks the
  length and high time of every output period, the reset value, the first pulse
  after reset, and 20 random mode changes without reset.
* `tb/tb_multi_modulus_prescaler.sv`: end to end, all eight mode settings, 40 output
  periods each. Period and high time are checked against the formulas above, which
  are computed in the testbench, not taken from the RTL. Then 30 random mode changes
  without reset. It also counts each mechanism: every mode, the 3/4 cell dividing by
  3 and by 4 (read from the internal `f34` net), the 2/3 cell dividing by 2 and by 3,
  on-the-fly mode changes and resets. Any mechanism that never happens is a failure.
  The design has no parameters, so this is also the full-size test.
* `tb/tb_mmp_ratios.sv`: the published ratios against this design. It sweeps all
  eight settings and checks that ÷8, ÷7 and ÷9 come out at 011/111, 010 and 100,
  that no setting gives ÷13, that the longest period is 12, and that the set of
  ratios is exactly {6, 7, 8, 9, 11, 12}.

Running one with Verilator (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -y rtl +libext+.sv \
    --top-module tb_multi_modulus_prescaler tb/tb_multi_modulus_prescaler.sv
./obj_dir/Vtb_multi_modulus_prescaler
```

Each run takes well under a second.
