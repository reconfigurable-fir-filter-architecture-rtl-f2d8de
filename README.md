# Block FIR filters in transpose form for EEG signals

An EEG record is cleaned of mains hum and high-frequency artefacts by a linear-phase
low-pass FIR filter (here: Hamming window, 32 Hz cut-off at a 173.6 Hz sample rate).
This RTL computes such a filter **one block of L = 8 samples per clock**, in
**transpose form**. It comes in two variants that share the block formulation and the
output adder chain:

* `rfir_block_filter`: **reconfigurable**. Coefficients are read from a small
  coefficient ROM holding several filters. General multipliers form the inner products.
  The filter can switch between coefficient sets between any two blocks.
* `mcm_block_filter`: **fixed coefficients**. It uses no multipliers. Each
  sample is multiplied by all the constants at once with shifts and adds
  (*multiple constant multiplication*, MCM).

`eeg_fir_top` feeds one stream of sample blocks to both filters. When set 0 is
selected, the two outputs must match bit for bit.

## The block formulation

The filter is `y(n) = sum_{i=0}^{N-1} h(i) x(n-i)`. Samples travel in blocks. Block k holds

    x_k = [ x(kL), x(kL-1), ..., x(kL-L+1) ]      (index 0 = newest)

Output block k is made up the same way from `y(kL) ... y(kL-L+1)`.

**Input matrix.** Output `y(kL-l)` needs the window `x(kL-l) ... x(kL-l-N+1)`. Cut the
coefficients into M = N/L vectors `c_m = [h(mL), ..., h(mL+L-1)]`. Let `S_k^0` be the
L x L matrix whose row l is `[x(kL-l), x(kL-l-1), ..., x(kL-l-L+1)]`. Then

    y_k = sum_{m=0}^{M-1} S_{k-m}^0 · c_m

Two properties of `S_k^0` make this cheap:

* It spans only 2L-1 distinct samples: the current block plus the L-1 newest samples of
  the previous block. It is constant along its anti-diagonals.
* `S_{k-m}^0` is simply `S_k^0` from m blocks ago.

**Transpose form.** The design never stores old matrices. Every coefficient vector is
applied to the *current* matrix. The product `S_k^0 · c_m` is then delayed by m blocks
and added in. This is the transposed FIR structure, with whole blocks in place of
single samples. Each delay stage holds one adder and one register per lane, so the
critical path does not grow with N.

**Regrouping for constant coefficients.** In the MCM variant, a product is formed
only while its sample is in its own block. Tap i of output lane l uses the sample at
position `j = (l+i) mod L` of the block that is `q = (l+i) div L` blocks older. So the
products of block k that output block k+q needs are

    p_q[l] = sum_{j=0}^{L-1} h(qL+j-l) · x(kL-j)      (terms with 0 <= qL+j-l < N)

These are summed at once, and `p_q` is delayed by q blocks. This takes Q = ceil((N+L-1)/L)
stages (3 at the defaults, against M = 2 in the reconfigurable filter). Nothing but
the current block has to be stored.

## Reconfigurable filter (`rfir_block_filter`)

    x_blk ──► register_unit ──S_k^0 (L×L)──┬──► inner_product_unit (c_{M-1}) ──┐
                                           ├──► ...                            ├─► pipelined_adder_unit ──► y_blk
    coef_sel ──► coefficient_storage_unit ─┴──► inner_product_unit (c_0) ──────┘

| unit | what it does |
|---|---|
| `register_unit` | Keeps L-1 registers holding the previous block's newest samples. Wires them, with the current block, into `S_k^0`. |
| `coefficient_storage_unit` | Constant table of `NUM_SETS × N` coefficients (a LUT ROM on an FPGA). Outputs the selected set as M vectors `c_m`. |
| `inner_product_unit` | Holds L `inner_product_cell`s, one per row of `S_k^0`, all using the same `c_m`. Registers its L results. |
| `inner_product_cell` | L multipliers and a balanced adder tree: (0+1), (2+3), ..., then pairs of pairs. |
| `pipelined_adder_unit` | Transposed chain. `d[M-2] <= r[M-1]`, `d[m] <= r[m+1] + d[m+1]`, output register `<= r[0] + d[0]`. |

In the usual drawing of this structure the units are numbered IPU-1 … IPU-M from the
far end of the adder chain. So IPU-1 applies `c_{M-1}` and IPU-M applies `c_0`.

**Switching coefficients.** `coef_sel` is read together with each input block. Output
block k therefore takes its `c_m` term from the set that was selected when block k-m
came in. For M-1 blocks after a switch, the outputs mix the two sets. This is what a
transposed filter does when its taps change in flight, and the testbenches model it
exactly. Flush the filter first (M-1 blocks of zeros) if a clean switch is needed.

## Fixed-coefficient filter (`mcm_block_filter`)

    x_blk ──► input register ──► L × mcm_unit ──► adder_network ──► pipelined_adder_unit (Q stages) ──► y_blk

* `mcm_unit` writes each coefficient magnitude in **canonic signed digit** form, with
  digits in {-1, 0, +1} and no two adjacent non-zero digits. The digits are worked out
  while the design is elaborated, so only the adders and subtractors for non-zero digits
  exist.
* Two kinds of common sub-expression are shared:
  * **Digit pairs.** Two non-zero digits two places apart (patterns `101` and `10-1`)
    equal 5x or 3x, shifted. `3x = 4x - x` and `5x = 4x + x` are built once per unit.
    Every coefficient takes its pairs from them, saving one adder per pair. Pairs are
    formed greedily from the least significant digit.
  * **Whole products.** A coefficient equal to, or the negative of, an earlier one
    reuses that product. A linear-phase filter therefore builds only N/2 products
    per sample.
* `adder_network` forms the sums `p_q[l]` given above.
* The same `pipelined_adder_unit`, with Q stages, adds them in transpose form.

## Coefficients and number formats

| parameter | default | meaning |
|---|---|---|
| `L` | 8 | block size (samples per clock) |
| `N` | 16 | filter length; a multiple of L for the reconfigurable filter |
| `DATA_W` | 12 | two's-complement sample width |
| `COEF_W` | 12 | two's-complement coefficient width; value = integer / 2^11 |
| `NUM_SETS` | 2 | coefficient sets in the ROM |

Both filters compute at full precision. Outputs are `DATA_W + COEF_W + clog2(N)` = 28 bits,
in units of 2^-11 of an input LSB. There is no rounding or saturation: take the bits
your application needs.

The coefficient sets live in `rtl/fir_pkg.sv`. Each is a Hamming-windowed ideal
low-pass at fs = 173.6 Hz, normalised to unity DC gain and rounded to `round(h·2^11)`:

    h(n) = w(n) · 2(fc/fs) · sinc(2(fc/fs)(n - (N-1)/2)),   w(n) = 0.54 - 0.46 cos(2πn/(N-1))

* set 0 has fc = 32 Hz: the EEG filter. Its gain is 0.997 at 10 Hz (alpha band),
  0.50 at 32 Hz and 0.008 at 50 Hz (mains).
* set 1 has fc = 14 Hz. It exists so that reconfiguration has somewhere to switch to.

To change a filter, replace the integers in `fir_pkg`, or pass `COEFS` (all sets) and
`FIXED_COEFS` (the MCM filter's taps) to the top. Pass `FIXED_COEFS` as its own
one-dimensional constant, not as a slice of `COEFS`: Verilator does not accept a slice
of an array parameter there. `tb_coefficient_storage_unit` recomputes both sets from the formula above.
Update or remove that check if you change them.

## Interface and timing (`eeg_fir_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset that clears every register |
| `in_valid` | in | 1 | this clock carries an input block |
| `x_blk[L]` | in | DATA_W | `x_blk[j] = x(kL-j)`, index 0 newest |
| `coef_sel` | in | 1 | coefficient set of the reconfigurable filter, read with each block |
| `out_valid` | out | 1 | `y_rfir` / `y_mcm` hold a new block |
| `y_rfir[L]`, `y_mcm[L]` | out | 28 | `y[l] = y(kL-l)` |

* There is no back-pressure. A block can be presented on any clock, and clocks with
  `in_valid` low change nothing. EEG data arrives at 173.6 samples/s, so in practice
  most clocks are idle.
* Output block k appears **two clocks** after the clock that carried input block k in
  both filters. In the reconfigurable filter that is the inner-product register, then
  the adder-chain output register. In the MCM filter it is the input register, then
  the adder-chain output register.
* After `out_valid` falls, the outputs hold their last value.
* Samples before the first block after reset are treated as zero.

## What follows the source design and what is this design's own choice

From the source design:

* block size L = 8;
* the split into coefficient storage, register unit, inner product units/cells and
  pipelined adder unit, and the transposed block formulation;
* the fixed-coefficient path (register unit, eight MCM units, adder network, pipelined
  adder unit), with shift-and-add multiplication;
* the EEG filter specification: Hamming low-pass, 32 Hz cut-off, 173.6 Hz sampling.

This design's own choices:

* filter length N = 16, 12-bit samples and coefficients, and full-precision outputs;
* the reset, the `in_valid` strobe and the two-clock pipelining;
* the second coefficient set and per-block switching;
* the exact adder-chain structure.

**Deliberate departures:**

* The source describes sharing sub-expressions "horizontally and vertically" inside
  the MCM, with a dedicated elimination algorithm. Here the sharing is fixed and
  simple: the 3x/5x digit pairs and whole products of equal-magnitude coefficients.
  Longer common patterns are not searched for, so the adder count is not minimal.
* The source hints that the fixed path works on the full input matrix. This design
  follows its block diagram (one MCM per current-block sample) and moves the block
  delays into the adder chain. The result is the same, and fewer products are computed.
* Area and clock-rate figures for an FPGA have not been reproduced. The widths and
  filter length behind them are not known.

## Verification

Each module has a self-checking testbench in `tb/` that compares against an
independently computed model and prints `TB_RESULT checks=… failures=…`:

| testbench | checks |
|---|---|
| `tb_register_unit` | every matrix entry against a record of all samples sent; holding while `en` is low |
| `tb_coefficient_storage_unit` | both coefficient sets recomputed from the window formula with real arithmetic |
| `tb_inner_product_cell`, `tb_inner_product_unit` | random and full-scale operands against 64-bit sums; register timing |
| `tb_pipelined_adder_unit` | three stages, random partial blocks with idle clocks |
| `tb_mcm_unit` | default coefficients plus an instance with awkward constants (±full scale, alternating bits, equal and opposite pairs) |
| `tb_adder_network` | sums gathered tap by tap instead of lane by lane |
| `tb_rfir_block_filter`, `tb_mcm_block_filter` | 400 random blocks with idle clocks (and set switches for the reconfigurable filter) against direct-form convolution; `out_valid` exactly two clocks after `in_valid` |
| `tb_eeg_fir_top` | full default sizes, one 4104-sample record (see below) |
| `tb_eeg_fir_top_resized` | the top at L = 4, N = 20, 10-bit words and three arbitrary, non-symmetric coefficient sets. It also drives a select value past the last set, which must read set 0. |

**`tb_eeg_fir_top` in detail.**

* The input is a synthetic EEG-like record: a 10 Hz rhythm plus 50 Hz mains, with noise
  added after the first 800 samples. It is delivered in bursts with idle clocks.
* Coefficient sets switch to 1 and back twice.
* Both outputs are checked sample by sample against direct-form convolution.
* Both filters must agree wherever no set-1 term is in flight.
* Over the noise-free part, the output must equal the 10 Hz rhythm, scaled by 0.997 and
  delayed 7.5 samples, within 12 units. This checks that the mains component is gone.
* The run fails if any of these never happened: idle clocks, switches in either
  direction, set-1 blocks, agreement checks, mains checks.

To run one with plain Verilator (the package first):

    verilator --binary --timing --assert -Wno-fatal rtl/fir_pkg.sv rtl/*.sv \
              tb/tb_eeg_fir_top.sv --top-module tb_eeg_fir_top -Mdir obj
    ./obj/Vtb_eeg_fir_top

All testbenches finish in well under a second. Every testbench runs the default
sizes, with three exceptions:

* `tb_pipelined_adder_unit` uses three stages and narrower words;
* `tb_mcm_unit` adds a second instance with its own constants;
* `tb_eeg_fir_top_resized` uses the sizes listed above.

## Files

`rtl/fir_pkg.sv` holds the sizes and coefficient sets. Each other file in `rtl/` holds
one module, named as above. The top is `rtl/eeg_fir_top.sv`.
