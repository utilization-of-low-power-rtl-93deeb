# Block FIR filters in transposed form: reconfigurable and multiplier-less

A plain FIR filter produces one output sample per clock. These filters work on
**blocks** instead: every clock they take `L` input samples and return `L`
output samples, so throughput grows by `L` without a faster clock. The
filter is in **transposed form**: partial results are delayed and added,
not the input samples. That keeps the delay line short and makes the datapath
naturally pipelined.

Two realizations share this structure:

* `reconfigurable_block_fir`: the taps sit in a writable coefficient
  store and can be changed at run time. Two tap sets let a new filter be
  loaded while the other one runs.
* `mcm_block_fir`: the taps are fixed when the design is elaborated. Every
  multiplication becomes shifts and adds (multiple constant
  multiplication, MCM), so the design has no multipliers.

`fir_top` puts the two side by side on one input stream.

Default sizes: block size `L = 4`, `N = 16` taps (a filter of order 15),
8-bit signed samples, 4-bit signed taps and 16-bit signed outputs.
16 = 8 + 4 + log2(16), so the default output is exact and cannot overflow.

## The block formulation

Number the input blocks `k = 0, 1, ...`. Block `k` holds samples
`x(kL) .. x(kL+L-1)`, and `x_blk[0]` is the oldest. Split the `N` taps into
`M = N/L` **short weight vectors**: `c_m = (h(mL), h(mL+1), ..., h(mL+L-1))`.

Output sample `i` of block `k` is

    y(kL+i) = sum_{m=0}^{M-1} sum_{j=0}^{L-1} h(mL+j) * x(kL+i - mL - j)

For one weight vector `m`, the samples needed by the `L` outputs of a block
form an `L x L` matrix. Row `i` is `x(kL+i), x(kL+i-1), ..., x(kL+i-L+1)`.
For weight vector `m` this matrix is the same as the matrix that weight
vector 0 saw `m` blocks earlier. That gives the transposed block form: each
block, compute

    r_m(k) = S_k * c_m            (L inner products, for each m)

from the **current** block's matrix `S_k` only. Then combine the results
through a chain of one-block delays:

    Y_k = r_0(k) + z^-1( r_1 + z^-1( r_2 + ... + z^-1 r_{M-1} ) )

Only one input matrix is ever built. The history of the signal lives in the
`M-1` delay registers of the adder chain, not in a long sample delay line.

`S_k` contains `2L-1` distinct samples: the `L` current ones and the last
`L-1` samples of the previous block. Entry `(i, j)` with `j > i` comes from
the previous block.

## Reconfigurable filter

    x_blk ─► register_unit ──► S_k ──┬─► inner_product_unit (c_0) ─► r_0 ─┐
                                      ├─► inner_product_unit (c_1) ─► r_1 ─┤
    coef port ─► coefficient_         ├─ ...                               ├─► pipeline_adder_unit ─► reg ─► y_blk
                 selection_unit ─► c_m┘─► inner_product_unit (c_M-1) ─────┘

* **`register_unit`** holds the previous block in a register. It wires the
  `L x L` matrix together from that register and the current input,
  combinationally.
* **`coefficient_selection_unit`** holds `NSETS = 2` sets of `N` taps in
  registers. It presents the active set as `M` short weight vectors.
* **`inner_product_unit`** (one per weight vector, `M` in all): `L`
  inner products, each from `L` Wallace-tree multipliers and a binary tree
  of Kogge-Stone adders, all within one clock. The result keeps full
  precision: `DATA_W + COEF_W + log2(L)` bits.
* **`pipeline_adder_unit`** is the delay-add chain. It has `M-1` registers
  of `L` words: `acc[M-1] <= r_{M-1}` and `acc[m] <= r_m + acc[m+1]`. The
  block output is `r_0 + acc[1]`. Every addition is a Kogge-Stone adder.
* An output register adds one clock: `y_blk` for the block accepted on
  clock `t` appears after clock `t+1`, with `out_valid` high.

The critical path is one multiplier, the adder tree (`log2 L` adders)
and one chain adder. It does not grow with `N`.

### Multiplier and adders

The reconfigurable filter multiplies variable samples by variable taps, so
it needs real multipliers: `L*L*M = L*N` of them, 64 at the default size.
Each one is a `wallace_tree_multiplier`, built in three stages.

1. **Partial products.** Row `j` is the sample, sign-extended and shifted
   by `j`, when bit `j` of the tap is set. The tap's sign bit weighs
   `-2^(COEF_W-1)`, so its row holds the one's complement of the shifted
   sample, and one more row adds the `+1` of the two's complement.
2. **Reduction.** Levels of 3:2 carry-save adders turn every three rows into
   a sum row and a carry row. With a 4-bit tap the row count goes
   5, 4, 3, 2, costing three full-adder delays.
3. **Final addition.** A `kogge_stone_adder` adds the last two rows.

`kogge_stone_adder` is a parallel-prefix adder. Every bit's generate and
propagate signals are combined at distances 1, 2, 4, and so on. After
`log2(W)` levels every carry is known, so the adder's delay grows with the
logarithm of its width rather than linearly.

### Reconfiguration

Taps are written one per clock: `coef_wr_en`, `coef_wr_set`, `coef_wr_idx`,
`coef_wr_data`. A write is visible from the next clock. `set_sel` chooses
the active set, and it may change between any two blocks.

The usual way to reconfigure is to write the idle set while the filter runs,
then flip `set_sel`. As in every transposed-form filter, the partial sums
already in the chain were made with the old taps. So the next `M-1` output
blocks mix old and new taps, and from the `M`-th block on the output is
purely the new filter. The testbench models this mixing exactly, rather
than ignoring those blocks. If a clean switch matters, discard `M-1` output
blocks after a switch.

### Stalls

`in_valid` low freezes every register: the block history, the adder chain
and the type II product register. `out_valid` drops one clock later.
Pausing the stream therefore changes nothing in the output sequence.

## Fixed multiplier-less filter (`mcm_block_fir`)

With constant taps, a multiplier is wasteful. `mcm_unit` multiplies one
sample by all `N` taps using shifts, adds and subtracts only. Each tap is
recoded at elaboration into **canonic signed digits** (CSD): digits -1, 0
and +1, with no two adjacent digits non-zero. The product is then the sum of
`x` shifted to each non-zero digit, with the digit's sign. For example,
`7x = 8x - x` costs one subtractor, and taps of 0 or a power of two cost
nothing.

Which samples go through an MCM unit is set by `CONFIG`:

* **Type I (`CONFIG = 1`)**: one MCM unit for each of the `2L-1`
  distinct samples of the matrix. The last `L-1` samples of the previous
  block are registered and multiplied again.
* **Type II (`CONFIG = 2`, default)**: only the `L` current samples are
  multiplied. Their products are registered, and in the next block they
  serve as the products of the previous block's samples. This needs fewer
  adders and more flip-flops.

The products of each weight vector are then summed into `r_m` and pass
through the same `pipeline_adder_unit`.

The default taps are `0 0 0 0 -1 -1 2 7 7 2 -1 -1 0 0 0 0`. They are a
16-tap symmetric (linear-phase) low-pass filter: a Hamming-windowed ideal
low-pass with cut-off at a quarter of the sample rate,

    h(n) = sin(pi/2 (n-7.5)) / (pi (n-7.5)) * (0.54 - 0.46 cos(2 pi n / 15))

scaled so that the largest tap is 7 and rounded to 4 bits. With only 4-bit
taps the small outer taps round to zero. Pass wider `COEF_W` and your own
`H` for a sharper filter.

## Top level (`fir_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (all state to zero) |
| `in_valid` | in | 1 | `x_blk` holds a block this clock |
| `x_blk[L]` | in | `DATA_W` each | input block, `[0]` oldest |
| `coef_wr_en`, `coef_wr_set`, `coef_wr_idx`, `coef_wr_data` | in | 1, log2 `NSETS`, log2 `N`, `COEF_W` | write one tap of the reconfigurable filter |
| `set_sel` | in | log2 `NSETS` | active tap set of the reconfigurable filter |
| `rcf_valid`, `rcf_y[L]` | out | 1, `OUT_W` each | reconfigurable filter output block |
| `mcm_valid`, `mcm_y[L]` | out | 1, `OUT_W` each | fixed MCM filter output block |

Parameters: `L`, `N` (must be a multiple of `L`), `DATA_W`, `COEF_W`,
`OUT_W`, `NSETS`, `MCM_CONFIG` (1 or 2) and `H_FIXED[N]`. The defaults are
collected in `fir_pkg`. If you change `N` or `COEF_W`, pass a matching
`H_FIXED`. Choose `OUT_W >= DATA_W + COEF_W + log2(N)` for exact outputs;
a narrower output wraps.

After reset both tap sets are zero, so the reconfigurable filter outputs
zero until taps are written.

At the default size, coarse synthesis of `fir_top` gives about 650
flip-flop bits. About 400 of them belong to the reconfigurable filter: the
two tap sets, the adder chain and the registers. Nearly all of the logic
is the 64 multipliers of the reconfigurable filter. The fixed filter is
about a twentieth of its size.

## Files

| file | contents |
|---|---|
| `rtl/fir_pkg.sv` | default sizes, width helper |
| `rtl/register_unit.sv` | input matrix former |
| `rtl/coefficient_selection_unit.sv` | two-set tap store |
| `rtl/kogge_stone_adder.sv` | parallel-prefix adder |
| `rtl/wallace_tree_multiplier.sv` | signed Wallace-tree multiplier |
| `rtl/inner_product_unit.sv` | `L` inner products |
| `rtl/pipeline_adder_unit.sv` | transposed delay-add chain |
| `rtl/reconfigurable_block_fir.sv` | reconfigurable filter |
| `rtl/mcm_unit.sv` | CSD shift-add constant multipliers |
| `rtl/mcm_block_fir.sv` | fixed filter, type I / type II |
| `rtl/fir_top.sv` | both filters side by side |
| `tb/fir_model_pkg.sv` | reference model: block convolution with per-block taps |
| `tb/tb_<module>.sv` | self-checking testbench for each module |
| `tb/tb_filter_lengths.sv`, `tb/tb_len_case.sv` | both filters at 8, 16, 32 and 64 taps |

## Verification

Every testbench compares the outputs with values it computes itself, and
prints `TB_RESULT checks=<n> failures=<n>`. A watchdog ends any run that
hangs.

* `tb_fir_top` runs the top at its default parameters. It covers:
  * a two-tap filter (taps 1 and 2, constant input 5): the output must be 5
    for the first sample and 15 after that;
  * the impulse response of the fixed filter, which must equal its taps;
  * a background reload of the idle set, followed by a switch;
  * 4000 random clocks with stalls, switches and tap writes.

  Both outputs are checked every block, along with the one-clock latency.
  The test counts stalls, switches, writes, blocks that mix old and new
  taps, and blocks where the two filters agree, and fails if any count is
  zero.
* The module testbenches use random stimulus with stalls. `tb_mcm_unit`
  and `tb_wallace_tree_multiplier` try every 8-bit input against every
  4-bit tap. `tb_kogge_stone_adder` checks all 8-bit operand pairs. `tb_mcm_block_fir`
  checks both configurations, plus an `L = 2` instance.
* `tb_filter_lengths` runs both filters with 8, 16, 32 and 64 taps.

To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/fir_pkg.sv tb/fir_model_pkg.sv tb/tb_fir_top.sv --top-module tb_fir_top
    ./obj_dir/Vtb_fir_top

Swap in the testbench name for the others. Each finishes in seconds.

## Design choices and departures

The following come from the design description: the block structure, the
split into register unit, coefficient selection unit, `M` inner product
units and a delay-add chain, the output equation, the block size of 4, the
order-15 filter, and the 8-bit input, 4-bit taps and 16-bit output. So do
multiplier-less MCM for fixed taps and the existence of a type I and a
type II configuration. The Wallace-tree multiplier with Kogge-Stone adders
in the reconfigurable filter follows the same description.

These are this design's own choices:

* **Tap store.** The store is writable registers with two sets. A ROM of
  preset filters was the other reading. Registers were chosen so that any
  filter can be loaded.
* **Type I and type II.** How the two configurations differ, as described
  above, is this design's reading of them.
* **Interface details.** The valid handshake, the one-clock output
  register, the asynchronous zero reset and signed arithmetic.
* **MCM method.** CSD recoding, without sharing subexpressions between
  taps, as the way to build the MCM units.
* **Multiplier details.** The signed partial-product scheme and the
  word-wide carry-save rows of the multiplier, and the shape of the adder
  tree.
* **Default taps.** The fixed filter's default taps and cut-off.
* **Top level.** Placing both filters in one top.

Not included:

* **Linear phase.** The taps of a linear-phase filter are symmetric.
  Nothing here uses that symmetry to share multipliers.
* **Cascaded form.** A cascaded-form FIR was used only for comparison, and
  its structure is not specified.
* **Tap design.** Choosing the filter order and taps (Kaiser order
  estimate, Hamming window) happens offline.
* **Two-tap output value.** In the two-tap example, the output value quoted
  for the original implementation cannot come from a two-tap filter with
  4-bit taps and input 5. This design produces 15, the value the
  arithmetic gives.
