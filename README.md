# Dual systolic array processors for Haar, Walsh and DFT transforms

A matrix–vector product `y = T x` maps well onto a linear systolic array:
`x` flows one way, the partial sums `y` flow the other way, and every cell
does one multiply‑accumulate when an `x_j` and a `y_i` meet. The hard part is
feeding each cell the right coefficient `t_ij` at the right clock. A general
matrix needs a fresh column of coefficients every step, which is O(n) of I/O
bandwidth.

For transforms whose coefficients are a function of their indexes, that
bandwidth is not needed. This design puts a second systolic array above the
arithmetic one. Each cell of the upper array is a *matrix element
coprocessor* (MECP). It receives only the row index `i` (moving with `y_i`)
and the column index `j` (moving with `x_j`) and computes `t_ij` locally. The
lower array of *inner product step processors* (IPSPs) does the arithmetic.
Only `x`, `y` and two index streams cross the array ends, so the I/O per
element is constant.

The design follows the paper "Dual Systolic Architectures for VLSI Digital
Signal Processing Systems". It contains two processors:

* **`dsap_ternary`**: Haar or Walsh transform of order `n = 2^N`. The
  coefficients are in {‑1, 0, +1}, so the IPSP only adds, subtracts or skips.
  Several modules can be cascaded into one long array.
* **`dft_dsap`**: the paper's extension to the discrete Fourier transform.
  The coprocessors rebuild `omega^(i*j)` from two vectors injected at the two
  array ends, and the IPSP does complex arithmetic.

`dsap_top` holds three processors side by side: a Haar processor for
`n = 8`, a Walsh processor for `n = 16` and a DFT processor for `n = 4`.
These are the sizes of the paper's worked examples. The processors share
only the clock and reset.

## How data moves through the array

The array has `C = 2n − 1` cells, numbered 0 (left) to `C−1` (right).

* `x_j` enters at the left in clock `2j` and moves one cell right per clock.
* A partial‑sum slot `y_i` (starting at 0) enters at the right in clock `2i`
  and moves one cell left per clock.
* Each cell registers what enters it. In clock `c` cell `p` therefore holds
  `x_j` when `c = 2j + p + 1`, and holds `y_i` when `c = 2i + (C−1−p) + 1`.
* Both are present in cell `p = n − 1 + i − j` in clock `i + j + n`. Every
  pair `(i, j)` (counted from 0) meets exactly once. The diagonal `i = j`
  meets in the middle cell, `j > i` to its left and `i > j` to its right.
* Elements are one empty slot apart. By parity, in any clock only every
  second cell can hold a real `x` and a real `y` together. The other cells
  rest.

When a pair meets, the MECP of that cell has `i` in its row register and `j`
in its column register. It computes `t_ij` combinationally, and the IPSP
forms `y + t_ij·x`. The left neighbour registers that sum on the next edge.

Consequences, all checked by the testbenches:

| quantity | value |
|---|---|
| input rate | one element every 2 clocks (`x_valid` may never be high twice in a row; an assertion checks it) |
| result `y_i` at the left end | `2i + C` clocks after `x_0` entered |
| complete transform | the last result `y_{n−1}` leaves `4n − 3` clocks after `x_0` entered |
| throughput | one transform per `2n` clocks; transforms may follow with no gap |
| utilisation | in steady state exactly `n²` steps per `2n` clocks: `n/2` cells busy on average |

## Haar and Walsh coefficients from index bits (`mecp`, `common_function_block`)

Both matrices are defined by a 2×2 block recursion, starting from `[T^0] = [1]`:

    Haar:  [H^k] = [ H^(k-1)   H^(k-1) ]     Walsh: [W^k] = [ W^(k-1)   W^(k-1) ]
                   [ I^(k-1)  -I^(k-1) ]                    [ W^(k-1)  -W^(k-1) ]

Write `i = [r_N … r_1]` and `j = [c_N … c_1]` in binary, counting from 0. Bits
`r_k, c_k` pick the quadrant at level `k`, and the lower bits index inside it.
The MECP therefore chains `N` identical *common function blocks*. Block `k`
turns the level‑`k−1` element into the level‑`k` element.

A coefficient is a two‑bit control word `V = [v1, v0]`:

| v1 | v0 | coefficient | IPSP operation |
|---|---|---|---|
| x | 0 | 0 | no‑op |
| 0 | 1 | +1 | add |
| 1 | 1 | −1 | subtract |

Each function block has five small cells:

1. **unity cell**: `i0^k = i0^(k−1) AND NOT(r_k XOR c_k)`. It records whether
   `(i, j)` lies on the diagonal of `I^(k−1)`. The unit‑matrix word is
   `[0, i0]`.
2. **w cell** (transform‑specific): selects the unit matrix (`w = 1`) or the
   previous word. Haar: `w = r_k`. Walsh: `w = 0`.
3. **α cell** (transform‑specific): the sign of the quadrant. For both
   transforms `α = −1` only when `r_k = c_k = 1`: `α1 = r_k AND c_k`,
   `α0 = 1`.
4. **switch cell**: a 2:1 multiplexer controlled by `w`. The paper draws it as four
   pass transistors.
5. **multiply cell**: `v1 = α1 XOR v1'` and `v0 = α0 AND v0'`.

Cells 1, 4 and 5 are the same for every transform. Cells 2 and 3 are set by
the `KIND` parameter (`TR_HAAR`, `TR_WALSH`) in `recursion_cell`. For Walsh,
`v0` stays 1 and the unity and switch cells have no effect. After
constant propagation each Walsh block is one AND and one XOR:
`v1^k = (r_k AND c_k) XOR v1^(k−1)`, starting from `v1^0 = 0`.

## Back‑to‑back transforms: the frame bit

A `y_i` of one transform would also meet the first elements of the next
transform on its way out, and corrupt them. The index registers therefore
carry one bit above the `N` index bits. The counters toggle that bit each
time they wrap, so it alternates between successive transforms. An IPSP
steps only when the frame bits of `i` and `j` agree (`same_frame`). The paper
only says that successive problems can be pipelined "with the addition of
limited control logic"; this bit is that logic, and it is this design's own
choice.

With transforms back to back, a total cell count above `2n + 2` would let a
transform meet the one two places later, which has the same frame bit. An
elaboration check in `dsap_ternary` rejects such a size.

## Cascading modules (`dsap_module`, `index_counter`)

One `dsap_module` is a row of cells with a column counter at its left end and
a row counter at its right end. Large transforms can be split over several
modules (chips) placed in a row (`MODULES` parameter of `dsap_ternary`). Only
the backbone data and **one wire per index direction** join two modules:

* Each module brings out the LSB of the row index leaving its left end and of
  the column index leaving its right end.
* In a cascade, only the leftmost column counter and the rightmost row counter
  count (clock mode, strobed once per element). Every other counter is in
  LSB mode. It counts each change of its neighbour's index LSB, since every
  new index flips it, and so rebuilds the full index locally.
* In LSB mode the counter's output reacts to the incoming LSB in the same
  clock. The rebuilt index therefore stays aligned with the data that crossed
  the boundary in that clock.

Each module gets `CELLS = ceil((2n−1)/MODULES)` cells. If the total `C` is
even, the partial‑sum slots enter one clock after `x_valid` instead of with
it, so that pairs still meet in whole cells. Results then come out one clock
later (`2i + C + 1`).

The paper's example is a 1024‑point transform from four 256‑point modules.
Four modules of `2·256 − 1 = 511` cells give 2044 cells, three short of the
2047 needed, so each module here needs 512 cells. `tb_dsap_1024` runs that
configuration.

## The DFT array (`dft_dsap`, `dft_mecp`, `dft_ipsp`)

The DFT matrix is `F = [omega^(i·j)]`, with `omega = exp(−2πj/n)` (forward
transform). Here the coprocessors receive no indexes. Two vectors cross the
array instead, each value held for two clocks, i.e. at half the element
rate:

* the **control vector** `a` enters at the left beside `x`: `a_0 = 1`,
  `a_j = 2` for the later elements, 0 when idle;
* the **root vector** `b` enters at the right beside `y`: `b_i = omega^i`,
  0 when idle.

Each cell computes its coefficient `f` as follows:

* `a = 0`: `f = 0`.
* `a = 1`: `f = 1` if `b ≠ 0`, else 0.
* `a = 2`: `f` = the value in the right neighbour's *pass register*.

Each clock the cell loads `f · b` into its own pass register for its left
neighbour. Along row `i` the coefficient is thus multiplied by `omega^i` once
per column, and the cell where `y_i` meets `x_j` holds `omega^(i·j)`. The
cell‑by‑cell flow for `n = 4` (steps 3 to 10 after `x_0`) is the table printed
in the paper. `tb_dft_dsap` compares every `a`, `b` and `f` entry of it with
the RTL.

Coefficients are powers of a root of unity, so they are kept as an `N`‑bit
exponent plus a nonzero flag, and the `f · b` multiplier is an `N`‑bit adder.
The IPSP turns the exponent into `cos − j·sin` through a table computed at
elaboration, scaled by `2^(TW−2)` so that ±1 is exact. Products are rounded
back to the data scale.

* For `n = 4` every root is 1, −j, −1 or j, and results are exact.
* For larger `n` each step adds under one unit of rounding error.

The accumulator is `N + 1` bits wider than the data.

The `a` and `b` generators are built in, driven by `x_valid`. The paper
allows them to be inside or external.

## Files

| file | contents |
|---|---|
| `rtl/dsap_pkg.sv` | control word type, transform kind, DFT control code |
| `rtl/dsap_top.sv` | Haar, Walsh and DFT processors side by side (top) |
| `rtl/dsap_ternary.sv` | Haar/Walsh processor: one module or a cascade, slot timing, spacing assertion |
| `rtl/dsap_module.sv` | one module: cells plus the two index counters |
| `rtl/index_counter.sv` | clock‑mode / LSB‑mode index counter |
| `rtl/mecp.sv` | index registers and the function‑block chain |
| `rtl/common_function_block.sv` | one recursion step, built from the four cell files below |
| `rtl/unity_cell.sv`, `recursion_cell.sv`, `switch_cell.sv`, `alpha_mult_cell.sv` | cells 1, 2+3, 4, 5 |
| `rtl/ipsp.sv` | add / subtract / no‑op step processor |
| `rtl/dft_dsap.sv` | DFT array with its `a`/`b` generators |
| `rtl/dft_mecp.sv` | DFT coefficient cell |
| `rtl/dft_ipsp.sv` | complex step processor with twiddle table |

### Parameters of `dsap_top`

| parameter | default | meaning |
|---|---|---|
| `H_N` | 3 | Haar order `n = 2^H_N` (8) |
| `H_DW` | 8 | Haar input width; results are `H_DW + H_N` bits and cannot overflow |
| `H_MODULES` | 1 | number of cascaded Haar modules |
| `H_CELLS` | `ceil((2n−1)/H_MODULES)` | cells per Haar module |
| `W_N`, `W_DW`, `W_MODULES`, `W_CELLS` | 4, 8, 1, 31 | the same for the Walsh processor (`n = 16`) |
| `F_N` | 2 | DFT order `n = 2^F_N` (4, the paper's example) |
| `F_DW` | 8 | width of each part of a complex input; results are `F_DW + F_N + 1` bits |
| `F_TW` | 12 | twiddle width |

The data widths, the twiddle width, two's complement arithmetic and the
synchronous active‑high reset are this design's choices; the paper gives no
word lengths.

### Ports

Haar side (`h_` prefix):

* Present `h_x_in` with `h_x_valid` every second clock.
* Read `h_y_out` when `h_y_valid` is high; `h_y_row` is `i`, and `h_y_frame`
  alternates per transform.
* `h_x_out`/`h_x_out_valid` pass the input on at the right end.
* `h_row_lsb_out` and `h_col_lsb_out` are the index LSBs at the open ends, for
  a further chip.
* `h_active_cells` shows which cells step in this clock.

The Walsh side (`w_` prefix) has the same ports.

The DFT side (`f_` prefix) works the same way, with complex `f_x_re`/`f_x_im`
and `f_y_re`/`f_y_im`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/dsap_pkg.sv tb/dsap_ref_pkg.sv tb/tb_dsap_top.sv --top-module tb_dsap_top
    ./obj_dir/Vtb_dsap_top

Replace `tb_dsap_top` with any other testbench:

| testbench | what it shows |
|---|---|
| `tb_dsap_top` | whole design at default sizes: 8 Haar transforms (n = 8), 8 Walsh transforms (n = 16) and 6 DFTs (n = 4) concurrently; results, row order, arrival clock, utilisation |
| `tb_dsap_ternary` | Haar and Walsh, n = 8 and 16, one module and cascades of 2, 3, 4 modules (odd and even cell counts), back‑to‑back and gapped transforms |
| `tb_dsap_1024` | 1024‑point Haar transform on 4 × 512 cells |
| `tb_dft_dsap` | DFT n = 4 against the published coefficient‑flow table and exact results; n = 8 within rounding |
| `tb_dsap_module` | one module with clock‑mode counters against one with LSB‑mode counters |
| `tb_mecp` | every `(i, j)` for Haar n = 8 and Walsh n = 16; the reference checked against the printed order‑8 matrices |
| `tb_common_function_block` | exhaustive, both rules |
| `tb_index_counter`, `tb_ipsp`, `tb_dft_mecp`, `tb_dft_ipsp` | randomised unit tests |

Reference values come from `tb/dsap_ref_pkg.sv`, which evaluates the block
recursions directly (quadrant by quadrant), and from a floating‑point DFT. It
shares no logic with the bit‑level generator it checks.

## Departures and limits

* **Frame bit and valid bits.** These are additions. The paper's index
  registers are `N` bits, and it gives no mechanism for telling elements from
  empty slots.
* **Counter strobe.** In clock mode the counter advances on a strobe once per
  element, not on every clock edge, so that indexes change at the element
  rate.
* **Walsh w cell.** The Walsh `w` cell follows the paper's truth table
  (`w = 0`, never the unit matrix). One of its drawings ties `w` high, which
  would select the unit matrix and could not produce the Walsh matrix.
* **No gate‑level simplification.** Both function blocks are written as the
  same five generic cells, not as the reduced netlists the paper draws (5
  gates per Haar block, 2 per Walsh block). After constant propagation the
  Walsh block is the drawn AND/XOR pair. The Walsh step processor still
  decodes `v0`, which is always 1 there.
* **Switch cell.** The pass‑transistor switch cell is modelled as a
  multiplexer.
* **Cell count bound.** A cascade must have between `2n − 1` and `2n + 2`
  cells in total.
* **DFT arithmetic.** The internal design of the complex IPSP (twiddle table,
  rounding, widths) is this design's own. The paper only states that complex
  multiplication is needed. The DFT array is not cascadable here.
