# Fault-tolerant parallel matrix-vector multiplication

Many signal-processing systems multiply several matrices by the same
vector at once: `z_p = A_p * u` for `p = 1..P`. MIMO precoding is one
example. If a soft error hits one of these multipliers, its result is wrong.
The usual fix protects each multiplier on its own, and the overhead grows
with P.

This design protects all P multipliers together. It treats each
multiplication as one data bit of a Hamming code. Then it needs:

* a few small check multiplications, one per Hamming check row, to find
  *which* multiplication failed;
* one extra full-size multiplication, to *rebuild* the failed result.

For the default `P = 4` this adds four multiplier units. Three of them have
only 3 rows and one has 20. Any single failed multiplication is found and its
result corrected, in the same cycle the results appear. Nothing is recomputed.

Everything is written in synthesizable SystemVerilog in `rtl/`. The
self-checking testbenches are in `tb/`.

## Default configuration

| Quantity | Value |
|---|---|
| Parallel multiplications `P` | 4 |
| Matrix size `N x M` | 20 x 30 |
| Matrix and vector items | 8-bit two's complement |
| Result items `z_p[i]` | 21 bits |
| Column checksums `c^p_i` | 13 bits |
| Detection-matrix items | 15 bits |
| Check values `S_j` | 28 bits |
| Summed matrix items / its product | 10 / 23 bits |
| Hamming check rows `R` | 3 |

Every width is exact for its operands, so nothing is rounded and no
overflow can happen. The widths are not typed in by hand. They come from the
operand widths, `N`, `M` and `P`, using `ft_mvm_pkg::sum_bits(n) =
ceil(log2 n)`: a sum of `n` values needs that many extra bits. For example,
a result item is `8 + 8 + ceil(log2 30) = 21` bits.

## Finding the failed multiplication

### Checksums of a single product

Let `c^p` be the row vector of column sums of `A_p`. Then `c^p * u` equals
the sum of all N items of `z_p = A_p * u`. `col_sum` forms `c^p_i` for the
column entering in the current cycle.

### Combining checksums with a Hamming code

Each multiplication `p` is given a Hamming column `h(p)`: the p-th integer
(counting from 0) that is 3 or more and not a power of two. For `P = 4` the
columns are 3, 5, 6 and 7, the data columns of the (7,4) Hamming code.

Check row `j` covers every multiplication whose column has bit `j` set:

| Row | Covers multiplications |
|---|---|
| 0 | 0, 1, 3 |
| 1 | 0, 2, 3 |
| 2 | 1, 2, 3 |

`det_mat` builds the detection matrix `D` (R x M) one column per cycle:
`D[j][i]` is the sum of `c^p_i` over the multiplications that row `j` covers.
It then runs `D` through an ordinary multiplier unit to get
`S = D * u`. By linearity, `S_j` is the sum of all result items of the
covered multiplications.

### The syndrome

`error_correction` adds up the items of each result, `T_p = sum_i z_p[i]`.
For each row `j` it compares `S_j` with the sum of `T_p` over the
multiplications that row covers. A mismatch sets syndrome bit `j`.

| Syndrome | Meaning | Action |
|---|---|---|
| 0 | no fault seen | results pass unchanged |
| `h(p)` | multiplication `p` failed | `corrected[p]` = 1, result `p` rebuilt |
| one bit set | one check value is wrong (fault in the check branch) | `check_err` = 1, results pass unchanged |
| anything else | more than one fault | `uncorrectable` = 1, results pass unchanged |

With `P = 4` all seven non-zero syndromes are taken by the first three
rows, so `uncorrectable` can only rise for `P >= 5`.

The number of check rows is the smallest `r` with `2^r - r - 1 >= P`. That
gives 3 rows for `P = 4` and 4 rows for `P = 8`.

## Rebuilding the failed result

`all_sum` adds the P input columns item by item, which gives the summed matrix
`A = A_1 + ... + A_P`. It multiplies `A` by `u` in a full N-row multiplier
unit. So `sum_z[i]` equals `z_1[i] + ... + z_P[i]` when every unit works.

For every row `i`, `error_correction` has a chain of subtractors. It starts
from `sum_z[i]` and subtracts `z_q[i]` for every `q`. A selector in front of
each subtractor feeds 0 instead of the failed unit's value. What remains is
the correct `z_p[i]` of the failed unit `p`.

Each output then has its own selector:
* `y_p[i]` takes the rebuilt value when `p` is the failed unit;
* otherwise it takes `z_p[i]`.

One rebuilt value per row is enough, because only one unit is assumed to
fail.

A fault in a column checksum `c^p_i` shifts every check row that covers `p`.
Its syndrome therefore looks exactly like a failure of unit `p`. The rebuild
then replaces `z_p` with `sum_z - (others)`, which equals the correct `z_p`.
So the output is still right.

### Limits of the scheme

* Two failed units can produce the syndrome of a third unit. With `P = 4`,
  any two data faults give syndrome 7, and unit 3 is then "corrected" by
  mistake. Only single failures are handled.
* A fault in `all_sum` goes unnoticed on its own. That is harmless, because
  `sum_z` is only used for a rebuild. It corrupts a rebuild only when it
  coincides with a data fault.
* Two errors that cancel in the sum of a row escape detection. Example: +d in
  one item and -d in another item of the same result. Checksum methods share
  this blind spot.

## The multiplier unit (`mvm`)

All P data multiplications and the two redundant branches use the same
sequential unit. It has N multipliers, N adders and N accumulator registers.

Each cycle with `in_valid` high, the unit does the following:
* it takes one column `a_col` of the matrix and the matching vector item
  `u_i`;
* it forms the N products in parallel;
* it adds them to the accumulators.

A column counter controls the selector in front of each adder. On the first
column of a product the selector starts a fresh sum. On the other columns it
feeds back the accumulator.

On the M-th column the finished sums go into an output register, and
`out_valid` pulses for one cycle. The output register is separate from the
accumulators, so the next product can start at once. Back to back, a new N x 1
result therefore arrives every M cycles.

## Top level: `ft_pmvm`

```
 a_col[p][*], u_i ──► mvm x P ─────────── z_p ──(^ inj_z)──┐
        │                                                  │
        ├──► col_sum x P ─► det_mat (D built, D*u) ─ S ─(^ inj_s)──► error_correction ─► y, flags
        │                                                  │
        └──► all_sum (sum of A_p, A*u) ──────────── sum_z ─┘
```

### Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `P` | 4 | number of parallel multiplications |
| `N` | 20 | matrix rows |
| `M` | 30 | matrix columns, which is also the vector length |
| `AW`, `UW` | 8 | widths of the matrix and vector items |

`R` and all internal widths are derived from these.

### Inputs

| Port | Meaning |
|---|---|
| `in_valid` | one column of each of the P matrices is presented |
| `a_col[p][r]` | that column |
| `u_i` | the matching vector item |

Columns can come back to back, or with idle cycles between them.

### Outputs

| Port | Meaning |
|---|---|
| `out_valid` | one-cycle pulse in the cycle after the M-th column |
| `y[p][r]` | corrected results; they hold until the next product |
| `syndrome`, `corrected`, `check_err`, `uncorrectable` | describe the product now on `y` |

The correction stage is combinational. It sits behind the registered outputs
of the multiplier units.

### Test inputs

| Port | Meaning |
|---|---|
| `inj_z[p][r]` | XOR mask applied to the unit results |
| `inj_s[j]` | XOR mask applied to the check values |

These two inputs model soft errors for testing. Tie them to zero in normal
use.

### Assertion

A concurrent assertion checks that all branches deliver their results in the
same cycle.

### Other configurations

The design also runs with `P = 8`. That setting uses 4 check rows, 16-bit
detection-matrix items and 29-bit check values.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
through a watchdog. Build and run one like this:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/ft_mvm_pkg.sv tb/tb_ft_pmvm.sv --top-module tb_ft_pmvm -o sim
./obj_dir/sim
```

| Testbench | What it covers |
|---|---|
| `tb_ft_pmvm` | The whole design at the default parameters, end to end. It streams 39 products: fault-free, one flipped bit in each unit, several damaged items in each unit, a damaged check value in each row, and one product with gaps. It compares against integer reference products and checks the latency (1 cycle after the last column) and the rate (one result set every M cycles). It counts how often each case occurred and fails if one never did. |
| `tb_ft_pmvm_p8` | The same, with `P = 8`. It adds a double fault that must raise `uncorrectable`. |
| `tb_mvm` | Products back to back, all -128 items (which give the widest result), gaps, latency and rate. |
| `tb_col_sum`, `tb_det_mat`, `tb_all_sum` | Random and extreme operands, against integer references. |
| `tb_error_correction` | Every single-unit fault and every check-row fault, against reference syndromes written out by hand. |
| `tb_ft_mvm_pkg` | The Hamming column, check-row and cover-table functions, and the widths. |

Each full-size run takes well under a minute in Verilator.

## Departures and own choices

These points follow the original scheme:
* the block structure;
* the sizes (P = 4, 20 x 30 matrices, 8-bit items);
* the exact widths;
* one column per cycle, one result every M cycles;
* the zero-selector subtractor chain.

These points are this implementation's own choices:

* **Which Hamming column each unit gets.** The scheme only says a Hamming
  code is used. The assignment of columns 3, 5, 6, 7, ... to the units is
  chosen here.
* **How the syndrome is formed.** Check values are compared with per-row sums
  of the results.
* **Status flags.** `check_err` and `uncorrectable` are added. Results pass
  unchanged when either is set.
* **Handshake, reset and output register.** The `in_valid` handshake, the
  synchronous active-low reset and the separate output register in `mvm` are
  chosen here. The column inputs are not registered before the multipliers.
* **Combinational correction.** Correction and the status flags are
  combinational, so results appear one cycle after the last column.
* **Error injection.** The `inj_z` and `inj_s` inputs are additions for
  testing.
* **Size limit.** The cover table holds up to `P * R = 1024` entries, so `P`
  can reach about 100.

These parts are not included:
* the BCH-coded variant for several simultaneous failures, which has no
  circuit description to build from;
* the per-multiplication ("separate") protection used only as a baseline.

No timing, area or power figures have been measured for this RTL.
