# Approximate radix-4 Booth multipliers in majority logic

Several emerging nanotechnologies, such as nanomagnetic logic and spin-transfer-torque
magnetic tunnel junctions, build circuits from one primitive: the 3-input majority gate,
M(x,y,z) = xy + yz + xz, plus inverters. Mapping ordinary AND/OR netlists onto such gates
wastes most of their power. This RTL implements signed 8×8 radix-4 (modified) Booth
multipliers whose every logic function is written as nested majority gates, and cuts gates
from the most expensive part, partial-product generation, by making it approximate in a
controlled way. Four multipliers are provided. They trade accuracy for hardware at four
levels, for error-tolerant uses such as image processing and neural-network inference.

The multiplier is built in three steps:

1. **Partial-product (PP) generation.** Each bit of the Booth PP array comes from a small
   majority-logic cell. The low-order columns use *approximate* cells, which need fewer
   gates but are wrong for a few input patterns.
2. **PP reduction.** A *complementary strategy* offsets the errors those cells make. Either
   the lowest columns are truncated, which pulls the result down, or they are forced to '1',
   which pushes it up.
3. **Compression.** Exact majority-logic full adders sum the array, and a ripple-carry adder
   adds the last two rows.

Everything is combinational: there is no clock and no register.

## The four multipliers

`ml_booth_mult_top` puts the four multipliers side by side on shared operands `a` and `b`.
Both operands are 8-bit two's complement. Each output is a 16-bit two's-complement product.

| output          | PP encoding | error style of the cells   | approx. columns `P` | compensation                         | significant bits | NMED (this RTL) | NMED (published) |
|-----------------|-------------|----------------------------|---------------------|--------------------------------------|------------------|-----------------|------------------|
| `prod_high`     | A (MLGA)    | unbiased (both directions) | 4                   | none; Neg_0 left out                 | 16               | 1.43e-4         | 1.4e-4           |
| `prod_good`     | B (MLGB)    | unbiased                   | 6                   | truncate columns 0..1 (`T=1`)        | 14               | 7.11e-4         | 7.1e-4           |
| `prod_moderate` | classical   | positive single-sided      | 6                   | truncate columns 0..3 (`T=3`)        | 12               | 1.08e-3         | 1.1e-3           |
| `prod_low`      | B (MLGB)    | negative single-sided      | 8                   | force columns 0..5 to '1' (`L=5`)    | 16               | 5.19e-3         | 5.2e-3           |

NMED is the mean absolute error over all 65,536 operand pairs, divided by the largest exact
product magnitude, 2^14. The NMED column "this RTL" is measured by `tb_ml_booth_mult_top`.
Truncated low product bits are present on the ports but always read 0.

The intended uses are:

- high accuracy: a multi-task face-detection CNN;
- good accuracy: an MLP classifier;
- moderate accuracy: Sobel edge detection;
- low accuracy: image multiplication.

`ml_booth_mult` is one parameterised multiplier. The top uses it four times. It can also be
set up as an exact multiplier (`P=0`) with any encoding, or as any other mix of the options
below. For example, classical encoding with unbiased errors, `P=8` and `T=2` gives NMED
3.27e-3; the published value is 3.3e-3.

## Booth partial products and the three encodings

The multiplier `b` is read in overlapping groups g_i = {b[2i+1], b[2i], b[2i-1]}, with
b[-1] = 0. There are four groups for N = 8. Each group selects a multiple of the
multiplicand `a`:

| group | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|-------|-----|-----|-----|-----|-----|-----|-----|-----|
| PP    | 0   | +A  | +A  | +2A | −2A | −A  | −A  | 0   |

PP row i has N+1 bits. Bit j is a[j] for +A and a[j−1] for +2A, with a[−1] = 0 and
a[N] = a[N−1]. Negative multiples invert every bit and add the negation bit Neg_i at the
row's least significant position. Bit pp_ij lands in column 2i + j.

Three encodings differ only in how they code the zero groups:

- **Classical (MLCG):** 000 and 111 give all-zero bits and Neg_i = 0.
  Neg_i = b[2i+1]·(¬b[2i] + ¬b[2i−1]) takes two majority gates.
- **Encoding A (MLGA):** 000 is coded as a *negated zero*: all bits '1' and Neg_i = 1, which
  still sums to 0. Neg_i becomes the single gate M(b[2i+1], ¬b[2i], ¬b[2i−1]).
- **Encoding B (MLGB):** both 000 and 111 are negated zeros. The PP bit is then mostly
  b[2i+1]·m + ¬b[2i+1]·¬m, with one shared gate m = M(b[2i], b[2i−1], ¬a[j]). The exact cell
  takes 10 gates and has a 4-gate critical path.

Each exact cell (`mlcg_ppg`, `mlga_ppg`, `mlgb_ppg`) is a majority-gate network. It splits
the function on b[2i+1] (a Shannon expansion). Most of each half is covered by one majority
gate on b[2i], b[2i−1] and a[j], and a small correction term in a[j−1] covers the rest.
Each cell's header gives its equation and gate count.

## How the approximate cells err

This is the core of the design. The exact PP bit in each encoding is the sum of two terms.
In each term a majority gate is multiplied by a correction factor that involves a[j−1]. The
approximate cells drop that factor or replace it with one in a[j]. Either way they are
wrong only when the group is 011 or 100, the ±2A cases, and only for some values of a[j]
and a[j−1]. That is 4 of the 32 input patterns (12.5 %).

Which way the errors go depends on the equation:

| cell        | mode                      | row 0, bit 0 | row 0, bits j>0              | rows ≥ 1                        |
|-------------|---------------------------|--------------|------------------------------|---------------------------------|
| `amlcg_ppg` | `APPROX_SINGLE`           | (16): 4 errors, all upward, in every position | | |
| `amlcg_ppg` | `APPROX_UNBIASED`         | (16), exact  | (18): 1 up, 1 down           | (17): 2 up, 2 down              |
| `amlga_ppg` | `APPROX_UNBIASED`         | (22), exact  | (23): 1 up, 1 down           | (22): 2 up, 2 down              |
| `amlga_ppg` | `APPROX_SINGLE` (biased)  | (22) in every position | | |
| `amlgb_ppg` | `APPROX_SINGLE`           | (24): 4 errors, all downward, in every position | | |
| `amlgb_ppg` | `APPROX_UNBIASED`         | (22), exact  | (23): 1 up, 1 down           | (25): 2 up, 2 down              |

The equation numbers are labels used in the cell sources. Each cell's header comment gives
the equation itself. Row 0 gets its own equations because b[−1] = 0 there, which halves
the input space. In row 0, equation (22) errs upward only (two errors), so encoding A needs
(23) there. Encoding B has the same row-0 bit as encoding A and reuses (22)/(23).
Classical encoding uses (18) in row 0.

Errors that always point the same way pile up as products are accumulated, which is fatal
for neural networks. Unbiased cells avoid that. Single-sided cells are cheaper and pair
with a compensation step, described next.

A cell is used only in the P least significant columns (column = 2i + j). The "approximation
factor" P is a parameter. All other bits and every Neg_i come from the exact cell.

## Offsetting the errors in the low columns

`booth_pp_array` applies these options, in this order of precedence, column by column:

- **Truncation, `T ≥ 0`.** Columns 0..T are removed, their Neg_i included, and the product
  loses T+1 low bits. Truncation always lowers the result, so it offsets the upward errors
  of positive single-sided cells. With unbiased cells it mainly shortens the result. It
  raises NMED slightly but improves the relative error for small products.
- **Forcing ones, `L ≥ 0`.** Every PP bit in columns 0..L is '1', while Neg_i stays exact.
  This raises the result and offsets the downward errors of the encoding-B single-sided
  cells. In hardware the ones are constants and cost nothing.
- **`DROP_ONE0`.** Leaves out the forced '1' in column 0. It is used by `prod_low`, where it
  simplifies the adder tree at almost no cost in accuracy.
- **`DROP_NEG0`.** Leaves out Neg_0. It is used by `prod_high` to save adders; NMED rises
  from 1.13e-4 to 1.43e-4.

Both `T` and `L` must be below `P`: they only act on approximated columns. The two values
used (`T=3` with `P=6`, `L=5` with `P=8`) keep two approximate columns above the
compensated ones. In the original work these values were chosen by balancing the
probability of carries out of the compensated columns against the probability of errors
in the remaining approximate columns.

## PP array layout and compression

Sign extension is avoided in the standard way. Row i carries its inverted sign bit
¬pp_iN at column 2i+N. One constant row adds −2^N·(1+4+…+4^(N/2−1)) mod 2^(2N), which is
0xAB00 for N = 8. The array therefore has N/2 + 2 rows of 2N bits: the PP rows, a row of
Neg_i bits at columns 2i, and the constant. All sign-handling bits sit in columns ≥ N, so
the approximations never touch them.

`ml_pp_compressor` reduces the rows with a carry-save tree of `ml_full_adder`s: 6 → 4 → 3 → 2
rows. `ml_rca` then adds the last two rows. The full adder is three majority gates:
cout = M(a,b,cin) and sum = M(¬cout, cin, M(a,b,¬cin)). That gives two gate delays for the
sum. Every adder is exact, so the product is exactly the sum of the (approximate) array.

## Module map

```
ml_booth_mult_top                 four configured multipliers
└─ ml_booth_mult                  one multiplier: N, PPG, MODE, P, T, L, DROP_NEG0, DROP_ONE0
   ├─ booth_pp_array              Booth groups, PP cells, Neg_i, sign constant, compensation
   │  ├─ mlcg_ppg / mlga_ppg / mlgb_ppg      exact cells (pp_ij and Neg_i)
   │  └─ amlcg_ppg / amlga_ppg / amlgb_ppg   approximate cells (position as parameters)
   └─ ml_pp_compressor            carry-save tree of full adders
      ├─ ml_full_adder            three maj3
      └─ ml_rca                   ripple-carry adder of ml_full_adder
ml_booth_pkg                      maj() function, ppg_e and approx_e enums
maj3                              the majority gate as a module
```

The `ml_booth_mult` defaults give the good-accuracy setting: N=8, PPG_MLGB,
APPROX_UNBIASED, P=6, T=1, L=−1. `N` may be any even width of at least 4. The sizes quoted
in this README, and the published accuracy values, are for N=8. The testbenches exercise
N=8 only.

## Simulating

Each testbench checks itself and ends with a line `TB_RESULT checks=N failures=M`. Build
and run one with Verilator 5, for example the end-to-end test of the top:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/ml_booth_pkg.sv tb/tb_ref_pkg.sv tb/tb_ml_booth_mult_top.sv \
    --top-module tb_ml_booth_mult_top
./obj_dir/Vtb_ml_booth_mult_top
```

Replace `tb_ml_booth_mult_top` with any other testbench name to run it the same way. Each
run takes well under a minute.

| testbench                 | what it checks |
|---------------------------|----------------|
| `tb_maj3`, `tb_ml_full_adder` | exhaustive truth tables |
| `tb_ml_rca`, `tb_ml_pp_compressor` | random sums against integer addition; 2, 6 and 9 rows |
| `tb_mlcg_ppg`, `tb_mlga_ppg`, `tb_mlgb_ppg` | all 32 inputs against the Booth selection table |
| `tb_amlcg_ppg`, `tb_amlga_ppg`, `tb_amlgb_ppg` | output against a sum-of-products form of each equation, plus the number and direction of errors per position |
| `tb_booth_pp_array`       | all 65,536 operand pairs: rows sum to a·b when exact, and match the reference when approximate; truncated columns empty |
| `tb_ml_booth_mult`        | all 65,536 pairs: exact with each encoding; two approximate settings bit-exact against the reference, with NMED near the published value |
| `tb_ml_booth_mult_top`    | all 65,536 pairs through the four outputs at default parameters: bit-exact against the reference model; NMED within 10 % of the published values; each mechanism (errors up and down, truncation, forced ones, dropped Neg_0 and column-0 one) seen at least once |
| `tb_workload_mlp`         | 20 inferences of a 784-100-10 MLP, all 79,400 products per inference through `prod_good`: hidden sums within 3 % (measured 1.6 %); predicted class matches the exact network in ≥ 90 % of inputs (measured 19 of 20) |
| `tb_workload_cnn`         | 12 windows through the 12×12 proposal stage of a face-detection CNN (3 convolutions, pooling and 1×1 heads; 45,080 products per window) through `prod_high`: first-layer sums within 1 % (measured 0.11 %), head outputs within 5 % (measured 1.1 %), face decision matches the exact network in ≥ 90 % of windows (measured 12 of 12) |
| `tb_workload_image`       | a generated 64×64 image: multiplication through `prod_low` (PSNR 43.3 dB) and Sobel edges through `prod_moderate` (PSNR 38.2 dB) |

`tb/tb_ref_pkg.sv` holds the reference model. It takes the PP bits from the Booth table and
from sum-of-products forms of the equations, not from the majority-gate networks. It adds
the rows as signed integers rather than with the inverted-sign-plus-constant scheme.

Verilator 5.050 mishandles some loops that contain a timing control. It can lose writes made
inside a constant-bound loop of about 64 iterations. Accumulators updated with `+=` inside
such loops can read back stale once the loop ends. The testbenches therefore flatten nested
timed loops into one loop. Results are passed through plainly assigned module variables,
and multiplications are counted as clock cycles.

## Where this RTL departs from the published design

- **Compression.** The published multipliers place each full adder by hand. They skip empty
  and constant positions, swap terms between columns, and size the final adder to 9–13
  bits. This RTL uses a generic carry-save tree over the full 16-bit width and leaves the
  removal of constant logic to synthesis. The product is the same. The published
  majority-gate counts, delays and area-delay products (for example 258 gates and 19 gate
  delays for the low-accuracy design) are therefore not reproduced, and no gate count is
  claimed for this RTL.
- **Sign-extension layout.** The exact placement of the sign-correction bits was chosen
  here. Any correct placement gives the same sum, and all of them lie outside the
  approximated columns.
- **Relative error.** NMED matches the published values for every setting, which pins
  down the arithmetic. The mean relative error (MRED) measured here is 1.5–6 times higher
  than published:

  | multiplier | MRED here | MRED published |
  |------------|-----------|----------------|
  | high       | 3.7e-3    | 6.1e-4         |
  | good       | 1.4e-2    | 3.5e-3         |
  | moderate   | 2.9e-2    | 1.2e-2         |
  | low        | 1.3e-1    | 8.6e-2         |

  The published MRED definition must therefore differ from mean |error| / |exact| over all
  nonzero products. `tb_ml_booth_mult_top` prints MRED but does not check it. Likewise,
  dropping Neg_0 is reported to lower MRED slightly. Here it raises MRED from 2.9e-3 to
  3.7e-3, while NMED rises by the reported 27 %.
- **Not included.** Two alternatives that only served as comparisons are left out: the
  cells for the "new" Booth encoding (MLNG, where only group 111 is a negated zero) and its
  approximate version. Approximate full adders, mentioned as a possible further saving, are
  not used either.
- **Application tests.** The published experiments use real images, a trained MNIST MLP
  and a trained face-detection CNN. The workload testbenches here use only generated data:
  - Pixels are limited to 7 bits (0..127), because the multipliers are signed.
  - Sobel coefficients are scaled by 32 so they use the operand range.
  - MLP weights come from a pseudo-random generator, not from training.
  - Only the first, proposal stage of the face-detection CNN is simulated, on single 12×12
    windows. The later refine and output stages and image pyramids are not.
  These tests show the multipliers behave sensibly in such loops. They do not reproduce
  the published SSIM, PSNR or accuracy results.
- **Operand sharing.** The four multipliers in the top share `a` and `b`. Nothing selects
  between them.
- **Gate-level fidelity.** The majority-gate structure is kept in the source: every
  function is nested `maj()` calls or `maj3` instances. A logic synthesiser will still
  re-map it to ordinary gates unless it is told to keep majority cells.
