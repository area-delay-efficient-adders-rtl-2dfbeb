# Two-bits-per-gate ripple adder for quantum-dot cellular automata

In quantum-dot cellular automata (QCA) the only logic primitives are the
three-input majority gate, M(a,b,c) = ab + ac + bc, and the inverter. AND
and OR are majority gates with one input tied to 0 or 1. Every logic level
also costs at least one clock phase, because QCA circuits are cut into clock
zones that each hold their value like a latch. So the length of the carry
path, counted in majority gates, directly sets an adder's latency.

A conventional QCA ripple-carry adder spends one majority gate (MG) per bit
on its carry. This design rewrites the two-bit carry look-ahead expression
so that a carry crosses **two** bit positions through a **single** MG. An
n-bit adder is a chain of n/2 such 2-bit slices. It keeps the small area of
a ripple adder, and its worst-case path is n/2 + 3 MGs plus one inverter,
where a plain ripple adder needs n + 2. The 64-bit version has a latency of
36 clock phases, which is nine QCA clock cycles.

The RTL models the adder at gate level, one module per MG, and places one
register rank at every clock-zone boundary. Simulation therefore shows both
the function and the latency in clock phases.

## The 2-bit slice (`qca_2bit_module`)

The slice covers bit positions i and i+1. It takes the carry c_i and
produces c_{i+1} and c_{i+2}. With p = a|b (propagate) and g = a&b
(generate):

```
p_i = M(a_i, b_i, 1)              g_i = M(a_i, b_i, 0)
u   = M(a_{i+1}, b_{i+1}, p_i)    = g_{i+1} | p_{i+1} p_i
v   = M(a_{i+1}, b_{i+1}, g_i)    = g_{i+1} | p_{i+1} g_i
c_{i+2} = M(u, v, c_i)
c_{i+1} = M(p_i, g_i, c_i)
```

Why a single MG is enough for c_{i+2}: g_i implies p_i, so v implies u.
For any v ≤ u, M(u, v, c) = v | c·u. Expanding gives
g_{i+1} | p_{i+1}g_i | p_{i+1}p_i c_i. That is exactly the two-bit
look-ahead carry. Signals p, g, u and v depend only on the operands. They
can therefore be computed while the carry is still on its way, and only the
final MG lies on the carry path.

## The carry chain (`qca_carry_chain`, `qca_lsb_module`)

The carry-in of the adder is fixed at 0. The least significant slice
therefore needs no p_0, and it shrinks to two MGs:

```
c1 = g_0 = M(a_0, b_0, 0)
c2 = M(a_1, b_1, g_0)
```

Slices k = 1 … n/2−1 follow, each on bits 2k and 2k+1. Only c_{2k+2}
ripples on. The chain also hands the sum block one operand pair per bit
position:
- (p_i, g_i) for even i ≥ 2, which the slice has already computed;
- (a_i, b_i) for odd i and for bit 0.

## The sum block (`qca_sum_block`, `qca_sum_cell`)

Each bit position uses one inverter and two MGs:

```
t   = M(x_i, y_i, ~c_{i+1})
s_i = M(~c_{i+1}, c_i, t)
```

(x_i, y_i) is either (a_i, b_i) or (p_i, g_i). Both give the same t,
because M(a|b, a&b, z) = M(a, b, z). The carry out c_n is returned as the
top sum bit, so the sum bus is n+1 bits wide.

Worst-case path: 2 MGs in the first slice, (n−2)/2 MGs in the other slices,
and 2 MGs plus the inverter in the sum. That totals n/2 + 3 MGs and one
inverter.

## Clock zones and latency — how the timing model works

This is the part that needs the most care when reading the RTL.

- **One register per zone.** `clk` ticks once per clock phase, so four ticks
  make one QCA clock cycle. Each clock zone is one register rank, built from
  `qca_zone_delay`.
- **Phase budget.** Acquiring the inputs takes 1 phase. The least
  significant slice takes 2 phases (g0, then c2). Each further slice takes
  1 phase. The sum takes 2 phases (first MG, then second MG). The latency is
  therefore

  ```
  adder_phases(N) = 1 + 2 + (N/2 − 1) + 2 = N/2 + 4
  ```

  | N  | phases | QCA clock cycles |
  |----|--------|------------------|
  | 16 | 12     | 3                |
  | 32 | 20     | 5                |
  | 64 | 36     | 9                |

  The functions in `qca_pkg` compute these numbers.
- **Skewed wavefront.** The carry reaches slice k at zone k+2. Each slice's
  operands are delayed to meet it. Each slice's results (two carries and p,
  g) are then delayed to the end of the chain, so that all bits of one result
  leave together. In a layout these delays are wire zones. The RTL places
  them as plain delay lines, so the register count grows with N²: about
  10,000 register bits at N = 64.
- **Zones inside a slice.** Inside a slice, p, g, u and v sit in the same
  zone as the carry MG. They are fed from delayed operands, so only the
  c_i → c_{i+2} path crosses one zone per slice. The layout computes them in
  earlier zones. The difference is not visible at the ports.
- **Throughput.** The model is fully pipelined and accepts a new operand
  pair on every tick. A QCA layout accepts one pair per clock cycle, which
  is every fourth tick. That cadence is a special case of the model, and the
  testbenches drive both.
- **Combinational mode.** `ZONED = 0` removes every zone register. The
  adder becomes purely combinational, with `out_valid = in_valid`. This is
  useful for checking the function alone.

## Interface of the top, `qca_adder`

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock-phase tick (unused when `ZONED = 0`) |
| `rst_n`     | in  | 1     | asynchronous, active low; clears only the valid tag |
| `in_valid`  | in  | 1     | `a`, `b` hold an operand pair this tick |
| `a`, `b`    | in  | N     | addends |
| `out_valid` | out | 1     | `sum` holds the result of the pair given N/2+4 ticks earlier |
| `sum`       | out | N+1   | a + b; `sum[N]` is the carry out |

| parameter | default | meaning |
|-----------|---------|---------|
| `N`       | 64      | operand width; must be even and at least 2 (16, 32 and 64 are the sizes laid out for QCA) |
| `ZONED`   | 1       | 1: one register rank per clock zone; 0: combinational |

The datapath registers have no reset, just as a QCA wire has none. A result
is meaningful once `out_valid` is high.

## Modules

| file | role |
|------|------|
| `rtl/qca_pkg.sv` | phase budget constants, `chain_zones()` and `adder_phases()` |
| `rtl/qca_maj.sv` | majority gate |
| `rtl/qca_inv.sv` | inverter |
| `rtl/qca_zone_delay.sv` | DEPTH clock zones on a W-bit bus |
| `rtl/qca_lsb_module.sv` | simplified slice for bits 0–1 (2 zones) |
| `rtl/qca_2bit_module.sv` | generic 2-bit slice (1 zone) |
| `rtl/qca_carry_chain.sv` | n/2 slices plus the alignment delays |
| `rtl/qca_sum_cell.sv` | one sum bit (2 zones) |
| `rtl/qca_sum_block.sv` | all sum bits, carry out appended |
| `rtl/qca_adder.sv` | top: input zone, chain, sum block, valid tag |

## Where this RTL departs from the QCA design, or adds to it

- **Not modelled.** The physical QCA level is not modelled: cells, the
  multilayer wire crossings, the four-phase clock fields, cell counts, area
  (18.72 µm² for 64 bits) and area-delay product. The zone latches are
  modelled as edge-triggered registers.
- **Operand bits of slice 0's sum column.** The sum column of bit 0 uses
  (a_0, b_0). With the carry-in at 0, this is the pair that gives the
  correct sum.
- **Own additions.** The valid tag, `rst_n` and the `ZONED = 0` mode are
  additions of this design.
- **Zone placement.** The phase budget and the n/2 + 4 latency match the
  QCA design. Where the off-critical-path signals and the alignment delays
  sit is this design's choice.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and includes a watchdog.

- **Gates.** `tb_qca_maj` and `tb_qca_inv` are exhaustive.
- **Slices and sum cell.** `tb_qca_lsb_module`, `tb_qca_2bit_module` and
  `tb_qca_sum_cell` are exhaustive against integer addition. They check the
  zoned instance's latency to the tick and also run the combinational
  instance.
- **Chain and sum block.** `tb_qca_carry_chain` (8 and 16 bits) and
  `tb_qca_sum_block` (16 bits) stream random and worst-case operands on
  every tick.
- **Top, three widths.** `tb_qca_adder` runs 16-, 32- and 64-bit zoned
  adders and a combinational 64-bit adder, through `tb/qca_adder_exerciser.sv`.
  It measures the latency (12, 20 and 36 phases). It checks every result of
  a one-pair-per-cycle stream and of a back-to-back stream. It counts full
  carry ripples from bit 0 to the carry out, carry-outs and overlapping
  operations, and fails if any of them never occurs.
- **Top, defaults.** `tb_qca_adder_full` uses the adder at its defaults
  (64 bits, zoned): one worst-case addition timed at 36 phases, then
  200 checked additions.

To simulate with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/qca_pkg.sv tb/tb_qca_adder.sv --top-module tb_qca_adder
./obj_dir/Vtb_qca_adder
```

To lint a module: `verilator --lint-only -Wall -y rtl +libext+.sv
rtl/qca_pkg.sv rtl/qca_adder.sv`. Lint reports an unused `clk` wherever a
zone delay has depth 0, and an unused package constant. Both are expected.
