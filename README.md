# Dynamic logic reconfigurable (DLRS) adders and multipliers

An arithmetic unit is usually built once, for one point on the speed/power
curve: a ripple-carry adder is small and quiet but slow, a carry look-ahead
adder is fast but switches more gates. A *dynamic logic reconfigurable
structure* (DLRS) puts both structures of one function into one unit, shares
every gate the two have in common, and selects the active structure with a
mode bit at run time. Both structures produce the same result, so the choice
only moves the unit along the speed/power curve; it never changes the data.

Combined with per-unit supply-voltage scaling, this gives a power optimiser
twice as many operating points per unit: a unit on a path with slack can run
its slow structure, at a lower voltage, or both, while a unit on the critical
path keeps its fast structure. This repository holds the logic side of that
scheme:

| module        | what it is |
|---------------|------------|
| `dlrs_pkg`    | the `dlrs_mode_e` type: `MODE_LOW_POWER` (0), `MODE_HIGH_SPEED` (1) |
| `dlrs_adder`  | adder: ripple-carry (low power) / carry look-ahead (high speed), 4 bits by default |
| `dlrs_mult`   | unsigned multiplier: array (low power) / Wallace tree (high speed), 4x4 by default |
| `dlrs_hal`    | top level: the HAL differential-equation benchmark built from 2 DLRS adders and 6 DLRS multipliers, 16-bit words |

The power optimiser, which picks every unit's mode and voltage under a timing
constraint, and the supplies themselves (regulators, level shifters, power
switches) are not logic and are not part of this RTL. The optimiser's mode
choices enter the top as the `add_mode` and `mul_mode` ports.

## How "powering off" is represented

Only one structure of a unit is in use at a time. In silicon the other one can
be put in a separately switched supply domain. RTL cannot describe a supply
switch, so each unit instead forces the inputs of its idle structure to
zero. This is operand isolation: the idle structure does not toggle, and its
outputs are a known zero. A power-intent flow (UPF/CPF) can add real power
switches around these structures without touching the logic. The testbenches
check that the idle structure's outputs are zero.

## The reconfigurable adder (`dlrs_adder`)

Both adder structures compute per-bit propagate `p = a ^ b` and generate
`g = a & b`, and both form each sum bit as `p ^ carry_in_of_that_bit`. These
gates are built once. Only the carry logic exists twice:

* **Ripple chain** (`c_rc`): `c[i+1] = g[i] | p[i] & c[i]`, bit after bit.
  The delay grows linearly with the width.
* **Look-ahead block** (`c_la`): every carry is a flat sum of products of `p`,
  `g` and `cin`. For example,
  `c[2] = g[1] | p[1]g[0] | p[1]p[0]cin`.
  Two gate levels for any bit, with more gates.

A carry multiplexer picks `c_la` or `c_rc` by mode, and the shared sum gates
use the result. The idle carry structure sees `p = g = cin = 0`. The unit is
purely combinational: a mode change takes effect as soon as the logic
settles, with no clock cycle of latency.

`WIDTH` defaults to 4, the size of the published unit. For larger widths the
look-ahead remains one flat group, and it is used that way as the
multiplier's final adder. If you want a multi-level look-ahead for wide
adders, change the `g_lookahead` block. Nothing else depends on it.

## The reconfigurable multiplier (`dlrs_mult`)

Both structures start from the same `WIDTH x WIDTH` AND-gate partial
products, `pp[i][j] = b[i] & a[j]`, which are shared. Two copies are then
isolated by mode: `pp_arr` feeds the array and `pp_wt` feeds the tree.

**Array (low power).** Each partial-product row is added to the running sum
by a `WIDTH`-bit ripple-carry row. That row takes the previous row's upper bits
and carry-out, and its lowest sum bit is a finished product bit. At 4x4 this
is three rows of four one-bit adders. The lowest adder of every row, and the
top adder of the first row, have a constant-zero input and act as half
adders. This is the classic 8 full adder + 4 half adder array. The critical path snakes through every row.

**Wallace tree (high speed).** The partial products are sorted into columns by
weight. Each reduction layer turns every complete group of three bits in a
column into a full adder (sum stays in the column, carry moves one column
up). A leftover pair becomes a half adder, and a single bit passes through.
Layers repeat until no column holds more than two bits. The two remaining
rows go into a carry look-ahead adder, which is a `dlrs_adder` instance tied
to high-speed mode. The depth grows with the logarithm of the width, not
linearly.

The tree's schedule depends only on `WIDTH`. It is therefore computed at
elaboration by the constant function `height_table`, which gives the number
of bits in every column before every layer. Generate loops then place each
full adder and half adder. Within a layer, column `c` holds, in this order:
the sums of its own full adders, then its half-adder sum or passed bit, then
the carries arriving from column `c-1`. `NSTAGE = WIDTH` layers are
instantiated, and layers after the tree has converged are plain wires.
Carries out of the top column are dropped. They would weigh `2^(2*WIDTH)`,
which no product reaches.

The product is `p = a * b` (unsigned, `2*WIDTH` bits) in either mode, and
the block is combinational.

## The HAL benchmark circuit (`dlrs_hal`, top level)

HAL is the standard high-level-synthesis benchmark that solves
`y'' + 3xy' + 3y = 0` by forward Euler steps:

```
do {
    x1 = x + dx                      adder      A0  (add_mode[0])
    u1 = u - (3*x)*u*dx - (3*y)*dx   multipliers M0 3*x, M1 (3x)*u, M2 (3xu)*dx,
                                                 M3 3*y, M4 (3y)*dx
                                     2 subtractors (fixed logic)
    y1 = y + u*dx                    multiplier M5 u*dx, adder A1 (add_mode[1])
    x = x1; u = u1; y = y1
} while (x1 < a)                     comparator (fixed logic)
```

That is 2 adders, 6 multipliers, 2 subtractors and 1 comparator, the unit
mix the benchmark is known for. Adders and multipliers are DLRS units, each
with its own mode bit (`mul_mode[k]` is `Mk`, `add_mode[k]` is `Ak`). The
subtractors and the comparator have only one structure.

**Number format.** Unsigned `WIDTH`-bit integers (default 16) with
wrap-around. Every multiplier keeps the low `WIDTH` bits of its product. The
loop also stops when `x + dx` carries out of `WIDTH` bits (`overflow` is then
set), so every run ends even when `x` would wrap past `a`.

**Timing.** The whole loop body is one combinational step, and the circuit
completes one iteration per clock. The speed/power choice shows up as the
clock period this step can meet: all high-speed units for the tightest
period, and slow structures (and lower voltages) wherever a path has slack.
RTL simulation is cycle based, so every mode setting gives the same cycle
count.

**Handshake.**

* While idle (`busy` low), pulse `start` for one cycle with `x_in`, `y_in`,
  `u_in`, `dx_in` and `a_in` valid. A `start` while busy is ignored.
* `busy` is high for exactly as many cycles as the loop runs, and the body
  always runs at least once.
* In the cycle after the last iteration, `done` pulses for one cycle and
  `busy` falls. `x_out`, `y_out` and `u_out` hold the results, `iterations`
  the pass count, and `overflow` the reason the loop ended.
* Reset (`rst_n`) is asynchronous and active low.
* The mode inputs may change at any clock edge, even in the middle of a run.
  Results do not depend on them.

Two assertions in `dlrs_hal` check that `done` is a single-cycle pulse and
never coincides with `busy`.

## Where this RTL departs from the published design

* **Booth encoding.** The published description says the Wallace-tree
  multiplier uses Booth encoding. Its reconfigurable multiplier, however,
  shares plain AND partial products between the two structures, and Booth
  recoding would produce different partial products that could not be
  shared. This RTL follows the sharing and uses no Booth recoding.
* **Adder counts.** The published 4-bit Wallace tree uses 15 full adders and
  3 half adders. The greedy reduction here produces a different count. The
  published array also mentions a carry-select adder. Here every row is
  ripple-carry.
* **Signed multiplication.** The published multiplier figure marks parts that
  can be switched off during unsigned multiplication, which hints at a signed
  mode. That mode is not specified, and only unsigned multiplication is
  implemented.
* **Exact shared netlist.** The published figures show which gates the two
  adder (and multiplier) structures share. Here the sharing is: p/g/sum gates
  in the adder, and partial products in the multiplier. Carry logic and the
  adder arrays are duplicated.
* **HAL.** Word width, number format, schedule, handshake and the overflow
  guard are this design's own choices.
* **Not built.** The IDCT benchmark (16 adders, 20 multipliers,
  10 subtractors, 2 dividers) and the DIST benchmark (96 adders,
  16 comparators) are known only by their unit counts. The optimiser and the
  supply-voltage hardware (0.8 V / 0.9 V / 1.0 V per unit) are not logic.

## Verification

Each testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`.

* `tb/tb_dlrs_adder.sv`: every `a`, `b` and `cin` of the 4-bit adder in
  both modes against integer addition. It flips the mode under held operands
  and expects an unchanged sum, and it checks that the idle carry structure
  is all zero. It also runs a 12-bit instance on random operands.
* `tb/tb_dlrs_mult.sv`: all 256 operand pairs of the 4x4 multiplier in both
  modes, the mode flip, and the idle structure at zero. It also runs 8x8 and
  16x16 instances on random and all-ones operands, which exercises deeper
  trees.
* `tb/tb_dlrs_hal.sv`: the top at its default parameters. It makes 300 runs
  against an integer model of the loop and checks x, y, u, the iteration
  count, the overflow flag, and that the cycle count from `start` to `done`
  equals the iteration count. One third of the runs keep every unit in
  low-power mode, one third every unit in high-speed mode, and one third
  re-draw all eight mode bits on every clock. It also sends starts while
  busy. It counts, and requires to be non-zero: iterations per unit and
  mode, mid-run mode switches, runs ended by the comparator, runs ended by
  overflow, and ignored starts.

Run one testbench with plain Verilator from the repository root:

```
verilator --binary --timing --assert -Irtl rtl/dlrs_pkg.sv tb/tb_dlrs_hal.sv \
          --top-module tb_dlrs_hal -Mdir obj_hal
./obj_hal/Vtb_dlrs_hal
```

Swap in `tb_dlrs_adder` or `tb_dlrs_mult` the same way. `-Irtl` lets
Verilator find each module in `rtl/<module>.sv`. All three finish in a few
seconds.

## Changing it

* **Operand width.** Set `WIDTH` on `dlrs_adder`, `dlrs_mult` or
  `dlrs_hal`. The multiplier needs `WIDTH >= 2`. Its schedule table stores
  column heights in 8 bits, which is enough up to `WIDTH = 127`.
* **Other circuits.** Instantiate `dlrs_adder` and `dlrs_mult` wherever an
  adder or multiplier is needed, and drive each `mode` from a configuration
  register or a static tie. The mode may change every cycle.
* **Real power gating.** Keep the isolation. Put `g_ripple` / `g_lookahead`
  (adder) or the array rows / Wallace layers (multiplier) in separate power
  domains controlled by the same mode bit.
