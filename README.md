# Multiplexer-based array multiplier

An N x N unsigned multiplier with no partial-product AND array. For each operand
bit j, a 4-to-1 multiplexer picks one of four values that are already available:
0, the low bits of X, the low bits of Y, or the low bits of X + Y. The rows
that result are added in a triangular array of simple cells. This array holds
about half as many adding cells as a conventional array multiplier. Its
critical path is about N+1 full-adder delays, where a ripple array needs
about 2N-1.

The design is a purely combinational, synthesizable SystemVerilog model of
that architecture. The default width is 4 x 4, the size the low-power
evaluation of this multiplier style uses.

The low-power version ("TG multiplier") builds its full adders from
transmission gates. These gates act as RC low-pass filters and swallow
glitches. A behavioural model of that adder is included. The parameter
`TG = 1` puts it into every full-adder slot, for simulation.

## The arithmetic

Write `X_j` for the number formed by the j low-order bits of X, and `x_j` for
bit j (likewise for Y). Adding one more bit to each operand gives

    X_(j+1) * Y_(j+1) = X_j * Y_j  +  2^j * Z_j  +  2^(2j) * x_j * y_j
    Z_j = x_j * Y_j + y_j * X_j

Unrolling this from j = 0 to N-1 gives the whole product:

    P = sum_j 2^(2j) x_j y_j  +  sum_(j>=1) 2^j Z_j

`Z_j` needs no multiplication. It depends on the bit pair `{x_j, y_j}`:

| x_j | y_j | Z_j         |
|-----|-----|-------------|
| 0   | 0   | 0           |
| 0   | 1   | X_j         |
| 1   | 0   | Y_j         |
| 1   | 1   | X_j + Y_j   |

`S = X + Y` is computed once, by a ripple-carry adder whose stage j produces
`s_j` and `c_(j+1)`. `S_j = X_j + Y_j` is then `s_(j-1) .. s_0` with `c_j` as
its top bit at position j. Bit i of `Z_j` (i < j) is a 4-to-1 multiplexer over
`{0, x_i, y_i, s_i}` with select `{x_j, y_j}`. The top bit, at position j, is
`x_j y_j c_j`, because only `X_j + Y_j` reaches that position. The encoding is
the enum `zsel_e` in `mux_mult_pkg`.

## The two cells

**Cell I** (`cell_i`, N(N-1)/2 of them) holds bit i of `Z_j` for i < j, at
weight i + j. It contains the multiplexer and one full adder, which adds the
selected bit to an incoming sum `s_in` and carry `c_in`. It repeats
`x_j, y_j` along its row and `x_i, y_i, s_i` to the next row. These are wires,
brought out as ports so that the array reads like the cell drawing.

**Cell II** (`cell_ii`, one per bit j) sits at weight 2j, at the end of
row j. Its contents:

* The first full adder is stage j of the `X + Y` ripple adder:
  `{c_(j+1), s_j} = x_j + y_j + c_j`. Chained over all Cell II blocks, with
  carry in 0, this is the whole `S = X + Y` adder.
* Two AND gates form `x_j y_j` (the `2^(2j)` term) and `x_j y_j c_j` (the top
  bit of `Z_j`).
* The second full adder adds `x_j y_j c_j` to its `s_in` and `c_in`.
* It broadcasts `x_j`, `y_j` and `s_j` to the Cell I blocks that need them.

## How the array adds its rows

This is the part that takes the most care. Row j consists of Cell I (j, 0)
to (j, j-1) at weights j to 2j-1, followed by Cell II j at weight 2j. Rows
are added from the longest one down:

* Row N-1 starts from zero. All its `s_in` and `c_in` are 0, so its cells only
  pass the `Z_(N-1)` bits through.
* Row j < N-1 takes, at each of its weights j+1 .. 2j, the sum bit that
  row j+1 left at that weight. Its carries ripple along the row: from Cell I
  (j, 0), whose inputs are 0, through to the `c_in` of Cell II j.
* After row j, nothing else arrives at weights 2j and 2j+1. Each holds exactly
  two bits:
  * weight 2j: `s_out` of Cell II j and `x_j y_j`;
  * weight 2j+1: `c_out` of Cell II j and the sum of Cell I (j+1, j).

Weight 0 holds only `x_0 y_0` and weight 1 only the sum of Cell I (1, 0), so
`p[0]` and `p[1]` leave the array directly. The two-bit columns at weights
2 .. 2N-3 go into a chain of N-2 two-bit carry-lookahead cells (`cla2`).
CLA cell j takes weights 2j and 2j+1, so it sits next to Cell II j. Weight
2N-2 goes into one full adder at the top of the chain, together with the
chain's carry. That adder's carry is `p[2N-1]`. Cell II N-1 needs no
connection here: it is in the all-zero first row, so its carry out is
always 0.

For N = 4:

| row | cells (weight)                                  | sum inputs from           |
|-----|-------------------------------------------------|---------------------------|
| 3   | I(3,0) w3, I(3,1) w4, I(3,2) w5, II 3 w6         | all 0                     |
| 2   | I(2,0) w2, I(2,1) w3, II 2 w4                    | I(3,0), I(3,1)            |
| 1   | I(1,0) w1, II 1 w2                               | I(2,0)                    |
| 0   | II 0 w0                                          | 0                         |

| product bits | formed by                                                            |
|--------------|----------------------------------------------------------------------|
| p0           | x0 y0                                                                |
| p1           | sum of I(1,0)                                                        |
| p3 p2        | CLA cell 1: {I(2,1) sum, II 1 s_out} + {II 1 c_out, x1 y1}           |
| p5 p4        | CLA cell 2: {I(3,2) sum, II 2 s_out} + {II 2 c_out, x2 y2} + carry   |
| p7 p6        | full adder: II 3 s_out + x3 y3 + carry                               |

The totals match the cost formulas for this multiplier style:
* N(N-1)/2 multiplexers;
* N(N-1)/2 + 2N + 1 full adders (one per Cell I, two per Cell II, one at the
  top of the final adder);
* N-2 two-bit CLA cells;
* 2N AND gates.

## Timing

There is no clock and no reset. `p` follows `x` and `y` after the
combinational delay. The intended operation time is (N+1) full-adder delays.
That figure assumes a 2-bit CLA cell passes its carry in one full-adder delay.
The row ripples run in parallel with the `X + Y` ripple and the final CLA
chain.

The zero-delay logic build says nothing about timing. The TG build
(`TG = 1`) gives a rough view. In it, every full adder delays by `TAU_PS`,
and multiplexers, AND gates and CLA cells have no delay. Over the 256
successive operand changes of the 4 x 4 test, the slowest product settles
after 5 TAU, which is N+1. Runs at N = 3, 5 and 6 also gave N+1. To pipeline
the multiplier, register `x`, `y` and `p` around it.

## The transmission-gate adder model

`tg_full_adder` models the glitch-filtering adder. It is not synthesizable,
and its ports are those of `full_adder`. Each output follows the ideal logic
value only when that value is still present `TAU_PS` later. A shorter pulse
is swallowed, like a pulse that cannot charge an RC node before it ends.

`TAU_PS` defaults to 300 ps. A minimum-size transmission gate is roughly
15-60 kOhm, and a typical node is about 10 fF, which gives 150-600 ps.

The helper `fa_cell` picks `full_adder` or `tg_full_adder` according to `TG`.
Every full adder in `cell_i`, `cell_ii` and `final_adder` is an `fa_cell`.

The model does not capture:

* the slower edges of a real RC node;
* process, supply or leakage effects;
* power.

In the 4 x 4 run the TG build still produces 1322 output bit toggles, where
the zero-delay build makes 718. Glitches that come from path-length skew of
a whole adder delay or more are wider than `TAU_PS` and pass through.
Measuring the glitch and power savings of the real circuit needs
transistor-level simulation.

## Departures and limits

* **Unsigned only.** The same idea is said to carry over to two's-complement
  operands, but no signed array is specified, so none is built.
* **Adders.** The low-power version replaces the 28-transistor static CMOS
  full adder with an 18-transistor transmission-gate adder. The synthesizable
  build (`TG = 0`, the default) uses the logic only, which is the same for
  both. The TG behavioural model adds a first-order version of the glitch
  filtering, and nothing else.
* **Routing between cells is a reconstruction.** The cell contents, cell
  counts, CLA count, final full adder and directly produced `p0`/`p1` follow
  the architecture. The exact wiring of sums and carries between neighbouring
  cells was chosen to reproduce those counts. This choice is described above
  and verified exhaustively.
* **CLA count.** One cost table of the architecture lists N two-bit CLA
  cells. The gate-level description lists N-2, and N-2 is what the structure
  needs. This design uses N-2.
* **Width.** `N` must be at least 2. The design was simulated exhaustively
  for N = 2, 3, 4, 5, 8, and with 20,000 random operand pairs for N = 16.

## Files

| file                    | contents                                                     |
|-------------------------|--------------------------------------------------------------|
| `rtl/mux_mult_pkg.sv`   | `zsel_e`, the select encoding `{x_j, y_j}`                   |
| `rtl/full_adder.sv`     | 1-bit full adder                                             |
| `rtl/tg_full_adder.sv`  | behavioural transmission-gate full adder (inertial filter)   |
| `rtl/fa_cell.sv`        | full-adder slot: `full_adder` or `tg_full_adder` by `TG`     |
| `rtl/mux4.sv`           | 4-to-1 multiplexer                                           |
| `rtl/cell_i.sv`         | Cell I: multiplexer + full adder                             |
| `rtl/cell_ii.sv`        | Cell II: X+Y stage, two AND gates, accumulating full adder   |
| `rtl/cla2.sv`           | 2-bit carry-lookahead adder                                  |
| `rtl/final_adder.sv`    | chain of `cla2` cells, plus a full adder when the width is odd |
| `rtl/mux_multiplier.sv` | top: parameters `N`, `TG`, `TAU_PS`; ports `x`, `y`, `p`     |
| `tb/tb_*.sv`            | self-checking testbench per module                           |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
Each has a watchdog. With Verilator 5:

    verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb \
        rtl/mux_mult_pkg.sv tb/tb_mux_multiplier.sv --top-module tb_mux_multiplier
    ./obj_dir/Vtb_mux_multiplier

What the testbenches check:

* `tb_mux_multiplier` runs all 256 operand pairs at the default N = 4. It
  also counts how often each of the four multiplexer selections, the
  `x_j y_j c_j` top bit and a carry between CLA cells occurred, and fails if
  any never did.
* `tb_mux_multiplier_sizes` runs the other widths.
* `tb_mux_multiplier_tg` runs the TG build against a zero-delay reference. It
  checks the products and the (N+1) TAU settling bound, and prints the toggle
  counts.
* `tb_tg_full_adder` checks the model's logic, that 100 ps and 150 ps pulses
  are swallowed, and that a lasting change arrives between TAU and TAU + 100 ps.
* The cell testbenches are exhaustive over their inputs.

To change the width, override `N`: `mux_multiplier #(.N(8)) u_mul (...)`.
The output is `2*N` bits wide.
