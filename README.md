# Formal cell library: arithmetic by recursion on counters

This is a small library of hardware cells in which every arithmetic operation
is built from the primitives of recursive function theory: a **zero** constant,
a **projection** (pick one of several arguments) and a **successor** (add one).
Addition is the successor applied m times, multiplication is addition applied
m times, and an inner product a·b + c is a multiplication followed by an
addition. Cells are chained by a Control/Ready handshake, which is how
functions are composed. Because each cell mirrors one construct of a
mathematically checked specification, a circuit assembled from the cells
implements the specification by construction. The library is meant as the
back end of a formal high-level synthesis flow.

The price is speed: an add takes as many clock cycles as one of its operands,
a multiply as many as the product. The library is not a fast arithmetic unit.
It is a correct-by-construction one.

As a complete example, the library builds a matrix-matrix multiplier three ways:

| module             | architecture                                  | cells used                    | output       |
|--------------------|-----------------------------------------------|-------------------------------|--------------|
| `mm_simultaneous`  | simultaneous recursion: N·N inner-product cells | inner_product, projection    | all at once  |
| `mm_several_vars`  | recursion on several variables: N pro cells + 1 add cell | pro_unit, add_unit, projection | one element at a time |
| `mm_fixed_nesting` | fixed nesting: a chain of N inner-product cells | inner_product                | one element at a time |

`formal_hls_top` places the three side by side, each with its own ports. The
defaults are 8-bit words (`W = 8`) and 2×2 matrices (`N = 2`). Both are
parameters, and `formal_pkg` holds the defaults.

## Clock, reset and the Control/Ready handshake

Every cell works from one rising-edge clock `clk` and an asynchronous,
active-low reset `rst_n`. The cells were first conceived for two
non-overlapping clock phases: the input is latched on the first phase and
the result driven on the second. Here one clock edge stands for such a pair.

Every sequential cell has an input `control` and an output `ready`. The
protocol is the same everywhere:

1. The user sets the operands and raises `control`. In the first cycle with
   `control` high, the cell loads its start values.
2. The operands must stay stable while `control` is high.
3. When the cell is done, `ready` rises. It stays high, with a stable result,
   as long as `control` stays high. An assertion in `add_unit` checks this.
4. When `control` drops, `ready` drops in the same cycle. The cell is idle
   on the next edge. Control must be low for at least one cycle between two
   operations.

Composition is wiring: the `ready` of one cell drives the `control` of the
next. The downstream cell starts when the upstream one finishes. When the
first cell's `control` drops, the whole chain resets in cascade. Results are
unsigned and wrap modulo 2^W.

## Primitive cells

**`successor`** is an incrementer. On an edge with `load` it stores
`in + andin`. With `count` (and no `load`) it stores `out + andin`. Otherwise
it holds. `andin` is the carry into bit 0 and `andout` the carry out of the
top bit. Tie `andout` of one cell to `andin` of the next and two 4-bit cells
make an 8-bit one. With `andin = 1`, loading 7 gives 8. The cell becomes an
up-counter when `count` feeds its output back.

**`projection`** is an N_ARGS-to-1 multiplexer with an output enable: `result =
args[sel]` while `control` is high. The default is the 2-to-1 cell. The
original cell leaves its output floating when disabled. This one drives zero,
and `ready` simply follows `control`.

**`eq_comparator`** is the equality test that ends every recursion.

**zero** has no module. It is a constant, tied as `'0` wherever it is used.

## Recursive cells

**`counter_unit`** counts from 0 up to `limit`. It is a successor in count
mode with a comparator against the bound, and it takes limit + 1 cycles.

**`add_unit`** computes m + n. A counter starts at 0 and a result successor
starts at n. Both step together until the counter equals m. The
comparator's inverse is the count enable and the comparator itself is Ready.
Latency: **m + 1** edges (one load, m increments). m = 0 is handled because the
start values load without an increment.

**`pro_unit`** computes m·n by running the add cell m times. The add cell
counts n increments each time. Its start value comes from a projection cell:
zero on the first step, then its own held result. A step counter with a
comparator against m ends the loop. Between steps the add cell's control
drops for one cycle so it reloads. Latency: **m·(n + 3)** edges, or 1 when m = 0.
Each step is n + 1 cycles of adding plus two handshake cycles. Note that the
time depends on the order of the operands.

**`inner_product`** computes a·b + c. A pro cell forms a·b, and its Ready
starts an add cell that counts c increments from a·b. Latency:
**(a = 0 ? 1 : a·(b + 3)) + c + 1** edges.

All these latencies are exact. The testbenches check them cycle for cycle.

## The three matrix multipliers

All three take `a` and `b` as packed arrays indexed `[row][col]`, each
element W bits wide, and compute C = A×B modulo 2^W.

### Simultaneous recursion (`mm_simultaneous`)

There is one inner-product cell per element C[i][j]. Each cell feeds back an
accumulator register `acc[i][j]`, which is cleared when the operation starts.
A step counter k (a successor with a comparator against N) drives the
recursion:

- In step k, projection cells give cell (i, j) the operands A[i][k] and
  B[k][j]. Its c operand is `acc[i][j]`. All N² cells start together.
- When **all** cells are ready, every accumulator takes its cell's result and
  k steps. The cells' control drops for one cycle.
- After N steps, `ready` rises and `c` holds the whole product.

Each step takes as long as its slowest cell. The total is
1 + Σ_k (max over i,j of the cell latency + 1) + (N − 1) edges. This is the
fastest architecture and the largest (N² inner-product cells).

### Recursion on several variables (`mm_several_vars`)

This one has N pro cells and a single add cell, and produces one element at a
time. A sequencer (`seq_state_t` in `formal_pkg`) runs these phases per
element:

- `CALC`: pro cell k forms A[i][k]·B[k][j]. All N run in parallel, and the
  phase ends when all are ready.
- `SUM`: the add cell folds the products together in N − 1 adds. The first
  add counts P[1] increments from P[0]. Each later add counts P[s] increments
  from the add cell's own held result, picked by a projection cell. The pro
  cells keep `control` high, so their products stay valid.
- `EMIT`: `out_data` = C[i][j] with `out_row`/`out_col`, and `read` high for
  one cycle. An element counter (a successor with a comparator against N²)
  steps.
- `GAP`: the pro cells' control drops for one cycle. Then comes the next
  element, or `DONE`, where `ready` is high.

Elements leave in row-major order. Dropping `control` aborts at any phase.

### Fixed nesting (`mm_fixed_nesting`)

This one has N inner-product cells in a chain and also produces one element
at a time. Cell k computes A[i][k]·B[k][j] + (result of cell k − 1), and cell 0
adds zero. The Ready of each cell is the Control of the next, so the partial
sum ripples down the chain. The last cell's Ready is the `read` strobe for
C[i][j]. Then the element counter steps and the chain's control drops for one
cycle. Per element the time is the sum of the N cell latencies plus 2 cycles.
`ready` rises one cycle after the last element.

### Timing compared with the original cycle counts

The original analysis gives cycle counts that leave out handshake cycles, and
for the add cell it gives max(m, n). This design follows the description of
the add cell: the counter increments m times, so an add takes m + 1 cycles
whichever operand is larger.

| unit | original count | this RTL (clock edges) |
|------|----------------|------------------------|
| counter | n | n + 1 |
| add | max(m, n) | m + 1 |
| pro | m·n | m·(n + 3), 1 if m = 0 |
| inner product | a·b + max(a·b, c) | pro + c + 1 |
| multiplier 1 | max(C11 … Cnn) | see above |
| multiplier 2 | ΣC, C11 = 2·max(a11·b11, a12·b21) | see above |
| multiplier 3 | ΣC, C11 = a11·b11 + a12·b21 + max(…) | see above |

For the worked 2×2 example, [[1,2],[1,2]] × [[2,1],[2,1]] = [[6,3],[6,3]], multiplier 1
finishes in 23 cycles and the two serial multipliers in under a hundred.

## Where this RTL departs from the original cells, or fills gaps

- **Single-edge clock.** The original uses two phases, and a disabled
  transmission gate leaves a floating node. Here everything is
  edge-triggered and every output is always driven.
- **Handshake details.** The hold-until-control-drops rule, the one-cycle
  gaps and operand sampling are this design's choices. Cells were only
  specified as "start on Control, signal Ready".
- **Gate-level control.** The original control networks of the composed cells
  and the multipliers are small gate networks. Here they are rewritten as
  registered logic with the same role: an `active` flag per cell, and an enum
  state machine in multiplier 2. They do not follow the gates one for one.
- **Sum folding in multiplier 2.** How one add cell sums N products is this
  design's choice (sequential folding with a projection cell).
- **Element order and `out_row`/`out_col`** in the serial multipliers are
  additions.
- **Not built:** the unbounded-minimisation (μ-recursion) primitive, which
  was never given a hardware form, and the two-phase clock generator.
  Transistor counts and layout areas are physical-design results with no RTL
  counterpart.

## Files

| file | contents |
|------|----------|
| `rtl/formal_pkg.sv` | default width and matrix order, sequencer state type |
| `rtl/successor.sv`, `rtl/projection.sv`, `rtl/eq_comparator.sv` | primitive cells |
| `rtl/counter_unit.sv`, `rtl/add_unit.sv`, `rtl/pro_unit.sv`, `rtl/inner_product.sv` | recursive cells |
| `rtl/mm_simultaneous.sv`, `rtl/mm_several_vars.sv`, `rtl/mm_fixed_nesting.sv` | matrix multipliers |
| `rtl/formal_hls_top.sv` | the three multipliers side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_formal_hls_top_n3.sv` | end-to-end test at N = 3 |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with
`$finish`. Each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/formal_pkg.sv \
          tb/tb_formal_hls_top.sv --top-module tb_formal_hls_top
./obj_dir/Vtb_formal_hls_top
```

`-y rtl` lets Verilator find each module in `rtl/<name>.sv`. The package
is named first because the modules refer to it. `-Wno-fatal` keeps
lint warnings (unused carry outputs, for instance) from stopping the build.
Replace the testbench and top-module name to run another one.
`tb_formal_hls_top` runs the top at its default parameters. It feeds the
worked example, zero entries, wrap-around, random small matrices and two
random full-range 8-bit matrix pairs to all three
multipliers at once and checks every element against its own product. It
also counts the design's mechanisms and fails if one never happened: the step
recursion of multiplier 1, pro-to-add chaining, cell chaining in multiplier 3,
add folding in multiplier 2, serial emission, a recursion ending at once on a
zero bound, and wrap-around. `tb_formal_hls_top_n3` does the same with 3×3
matrices. The cell testbenches include the small examples the cells were
first demonstrated with: 7→8, 15+7, 3+2, 3×4, 3×2, 3×2+4 and 3×2+1.

Simulation time grows with the operand values, because every add counts.
Keep random operands small: a full 8-bit product 255×255 takes about 66,000
cycles for one pro cell.

## Changing it

- Width and matrix order are the `W` and `N` parameters of every module. The
  defaults live in `formal_pkg`.
- `successor` can be cascaded through `andin`/`andout` to build wider cells
  from narrower ones.
- The cycle formulas above are checked by the testbenches. A change to a
  handshake shows up there first.
