# Fixed-width Booth multiplier with data scaling

An L×L two's-complement multiplier for DSP datapaths. It returns only
the upper L bits of the 2L-bit product: `pq ≈ round(x·y / 2^L)`. A
fixed-width multiplier saves area by never building the low half of the
partial-product array. The price is a truncation error: the carries that the
discarded columns would have sent upward must be guessed.

This design adds **data scaling (DST)** in front of and behind a low-error
fixed-width Booth core. Many multiplicands carry a redundant sign bit: their
two top bits are equal. Such an operand can be doubled without overflow.
Doubling x moves every partial-product bit one column up, so one more
column of real information lands above the truncation line. A right shift
of the result then undoes the doubling. The cost is one 2-to-1 mux per bit
on each side (2L−1 muxes in all). Exactly half of all L-bit operands
qualify. For them the truncation error falls, and so does the mean-square
error over all inputs:

| L  | MSE without scaling (LSB²) | MSE with scaling (LSB²) | max. error | mean error |
|----|----------------------------|-------------------------|------------|------------|
| 8  | 0.183                      | 0.146                   | 1.5 LSB    | −0.002 LSB |
| 12 | 0.250                      | 0.189                   |            |            |
| 16 | 0.348                      | 0.251                   |            |            |

The L = 8 row is over all 65,536 operand pairs. The L = 12 and L = 16 rows
use 40,000 random pairs each. Errors are measured against the exact
x·y/2^L. For reference, ideal rounding of the exact product gives 0.083 LSB²
at L = 8.

The whole unit is combinational: no clock, no reset, no handshake. A result
is valid one combinational delay after the operands change.

## Datapath

```
            x ──► dst_scaler ──xd──► ┌──────────── fwbm ─────────────┐
                     │ ds            │ booth_encoder (radix-4, on y) │
            y ───────┼──────────────►│ csa_tree  (kept columns only) │──pd──► dst_rescaler ──► pq
                     │               │ prefix_adder (Kogge-Stone)    │          ▲
                     ├──────────────►│ ds = one rounding bit         │          │
                     └───────────────┴───────────────────────────────┴──────────┘ ds
```

| module         | role |
|----------------|------|
| `dst_fwbm`     | top: `x`, `y` in (L bits each), `pq` out (L bits) |
| `dst_scaler`   | `ds = (x[L-1] == x[L-2])`; `xd = ds ? x<<1 : x` (L muxes) |
| `fwbm`         | fixed-width Booth core; returns `pd` = bits 2L−1..L of xd·y plus bias |
| `booth_encoder`| radix-4 recoding of `y`, one (L+1)-bit row per digit, plus `neg` bits |
| `csa_tree`     | Wallace-style 3:2 reduction of the kept rows to sum + carry |
| `prefix_adder` | L-bit Kogge-Stone adder that finishes `pd` |
| `dst_rescaler` | `pq = ds ? pd >>> 1 : pd` (L−1 muxes; the sign bit is wired) |
| `full_adder`, `half_adder` | cells of the tree (a full adder is two half adders and an OR) |
| `fwbm_pkg`     | Booth digit type `booth_sel_t`, `booth_select()`, `trunc_bias()` |

## The fixed-width core, column by column

This is the part that takes the most care. Write the product of xd (L bits)
and y (L bits) as a bit matrix with columns 0..2L−1. Radix-4 Booth recoding
of y gives L/2 digits `d_i ∈ {−2,−1,0,1,2}`, taken from the bits
`y[2i+1], y[2i], y[2i−1]` with `y[−1] = 0`. Row i is the (L+1)-bit word
`d_i·xd`, placed at column 2i:

* `|d| = 1` selects `xd` sign-extended to L+1 bits, and `|d| = 2` selects
  `xd << 1`;
* a negative digit inverts the word. The missing `+1` is the separate bit
  `neg_i`, which belongs at column 2i;
* instead of sign-extending every row to column 2L−1, the top bit of each
  row is inverted. One constant, `−Σ 2^(L+2i)`, is then added. This is the
  usual inverted-sign-bit trick: it leaves one bit per row per column and
  no long sign tails.

The columns are then split three ways (shown for L = 8):

```
column:   15 14 13 12 11 10  9  8 | 7 | 6  5  4  3  2  1  0
          <-------- MP ---------> |TPma| <------ TP_mi ----->
          kept, summed exactly    |kept| never built
```

* **MP**, columns L..2L−1: the bits that form the answer.
* **TP_ma**, column L−1: built and summed. The only thing taken from it is
  its carry into column L.
* **TP_mi**, columns 0..L−2: not built at all. A constant stands in for
  its contribution.

The CSA tree therefore adds, over the L+1 columns L−1..2L−1, these rows:

1. the L/2 Booth rows, clipped to those columns;
2. one row with the `neg_i` bits that fall into those columns, and `ds` in
   column L−1 (column L−1 is odd, so it never collides with a `neg_i`);
3. one constant row: the sign-extension constant plus the bias
   `trunc_bias(L) · 2^(L−1)`, all taken mod 2^2L.

With 6 rows at L = 8, the tree reduces 6 → 4 → 3 → 2. The two remaining
bits of column L−1 give only the carry `s[0] & c[0]`. That carry enters the
L-bit prefix adder over columns L..2L−1, whose sum is `pd`.

### The bias

The bias replaces two things. One is the expected value of the discarded
TP_mi. The other is half an output LSB, so that dropping columns rounds to
nearest instead of flooring. For uniformly random operands a Booth digit is
zero with probability 1/4, so each partial-product bit (and each `neg`
bit) is 1 with probability 3/8. The TP_mi bits of the L/2 rows, together
with their `neg` bits, add up to exactly `(L/2)·2^(L−1)` of weight.
Their expected value is therefore `(3L/16)·2^(L−1)`. With the rounding half
LSB this gives

```
trunc_bias(L) = floor(3L/16) + 1      (units of 2^(L-1))
```

That is 2 for L = 8, 3 for L = 12 and 4 for L = 16. Over all operand pairs
the L = 8 result has a mean error of −0.002 LSB. The bias is a constant
and does not depend on the operands. Adaptive estimators that look at the
TP_ma bits can be more accurate; this core does not use one (see
*Departures*).

### What ds does inside the core

When x was doubled, `pd` is about 2·x·y/2^L and `dst_rescaler` halves it
by dropping its lowest bit. Left alone, that drop would floor and cost half
an output LSB of bias. The scaling select is therefore also fed into the
CSA tree as one extra bit of weight 2^(L−1). In units of the final result
that is exactly the half LSB needed to round the shift. The core cannot
overflow: when ds = 1, |xd| ≤ 2^(L−1), so xd·y still fits in 2L bits.

## Data scaling, exactly

`dst_scaler`: mux k passes `x[k−1]` when `ds` is set and `x[k]` otherwise.
Mux 0 passes `0` or `x[0]`. The select `ds` is 1 when `x[L−1] == x[L−2]`.
That is the condition for 2·x to fit in L signed bits, so it holds for
half of all operands. It covers −2^(L−2) ≤ x < 2^(L−2), including 0.

`dst_rescaler`: `pq[L−1] = pd[L−1]`; for k < L−1, `pq[k] = ds ? pd[k+1] : pd[k]`.
This is an arithmetic right shift by one.

Only one bit of scaling is built. Operands with two or more redundant sign
bits are still doubled only once.

## Parameters and use

`dst_fwbm`, `fwbm`, `booth_encoder`, `dst_scaler` and `dst_rescaler` take
`L` (default 8; it must be even and at least 4). `csa_tree` takes `ROWS`
and `W`. `prefix_adder` takes `W`. The defaults are the sizes used inside
the L = 8 core. Nothing else needs setting: the bias and the sign constant
are computed from `L` at elaboration.

Worked examples at L = 8 (exact product → `pq`):
14·23 = 322 → 1; −23·23 = −529 → −2; −32·13 = −416 → −2; −31·14 = −434 → −2;
−25·75 = −1875 → −7; −35·75 = −2625 → −10; −45·95 = −4275 → −17.

At L = 8 the hardware is the encoder (4 rows of 9 bits), four rows of eight
full adders in the CSA tree (6 → 4 → 3 → 2 rows), a 3-level 8-bit
prefix adder and 15 muxes.

## Simulation

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fwbm_pkg.sv tb/fwbm_ref_pkg.sv tb/tb_dst_fwbm.sv \
    --top-module tb_dst_fwbm -Mdir obj -o sim && obj/sim
```

(substitute any other `tb_*` module; `-I` lets Verilator find the other
files by module name).

* `tb_dst_fwbm` runs the top at its default L = 8. It applies the seven
  worked examples and then all 65,536 operand pairs. Every result must match
  the integer model in `tb/fwbm_ref_pkg.sv` bit for bit and lie within
  1.5 LSB of x·y/256. The mean error must be near zero. The MSE must beat
  an unscaled `fwbm` instance run beside it. It also counts the scaled and
  unscaled operations and fails if either never happens. It runs in well
  under a second.
* `tb_dst_fwbm_sizes` runs L = 4 over all operand pairs, including the
  textbook Booth example 7·3 = 21, which gives round(21/16) = 1. It also runs
  L = 12 and L = 16 with random operands and the extreme values, checked
  against the same model and the same MSE comparison.
* The block testbenches are exhaustive where the input space allows it:
  encoder, scaler, rescaler, the 8-bit adder and the L = 8 core with both
  values of `ds`. The CSA tree testbench is random and covers four tree
  shapes.

`fwbm_ref_pkg::fw_ref` builds the same clipped matrix with integer
arithmetic. So the bit-exact checks test the adders, the tree wiring and
the column bookkeeping. The error-bound and MSE checks test the arithmetic
against the true product.

## Departures and design choices

What is fixed by the architecture this RTL follows: the overall structure
(scaling muxes → Booth encoder → CSA tree → parallel-prefix adder →
rescaling muxes), the 2L−1 muxes and their bit wiring, one bit of scaling,
the split of the truncated matrix into MP, TP_ma and an estimated TP_mi, and
8-bit operands. The column ranges given to the three parts above are this
design's.

Choices made here, where the architecture leaves things open:

* **Compensation.** The architecture allows any of several published
  low-error fixed-width compensation schemes. This core uses the simplest
  one that works: a constant bias derived above, plus the ds rounding bit.
  An adaptive scheme would change only the compensation rows in `fwbm`.
* **Scaling select.** `ds` is computed as "top two bits equal", which is
  the meaning of a redundant sign bit.
* **Radix 4** Booth encoding, the **inverted-sign-bit** sign extension,
  a row-wise **Wallace** tree and a **Kogge-Stone** prefix adder. Any
  other 3:2 tree or prefix network gives bit-identical results. A different
  encoding or sign-extension scheme changes which bits are truncated, and so
  shifts the error statistics slightly.
* **Output width.** The unit returns the L-bit fixed-width product. An
  exact 16-bit-output version of the same multiplier would need the full
  partial-product array. It is a different design and is not provided.
* **No pipeline registers.** The unit is combinational. Registers can be
  added around `dst_fwbm` without changing it.
