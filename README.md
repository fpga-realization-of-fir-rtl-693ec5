# Block FIR filter with multiple constant multiplication

A fixed-coefficient FIR filter that takes **L input samples per clock** and
returns **L output samples per clock**, and that uses **no multipliers**.
Every product of a sample with a coefficient is formed from left shifts,
additions and subtractions. The filter is arranged so that each input sample
is multiplied by the whole set of coefficients it meets at one time, in one
place. A sample multiplied by several constants is the *multiple constant
multiplication* (MCM) problem, and work on that sample can be shared: its
shifts, its negation and, after synthesis, common sub-sums.

The default configuration is a 16-tap filter with a block size of 4, 8-bit
two's-complement samples and coefficients, and a 20-bit full-precision
output.

## The arithmetic

The filter computes

    y(n) = sum_{t=0}^{N-1} h(t) x(n-t)

Samples arrive in blocks of L. Block k holds x(kL), x(kL-1), ..., x(kL-L+1),
and the filter returns y(kL), ..., y(kL-L+1) for it. Split the N coefficients
into M = N/L groups

    c_m = [ h(mL), h(mL+1), ..., h(mL+L-1) ],   m = 0 .. M-1

and let S_k be the L x L matrix of samples with S_k[i][j] = x(kL - i - j).
Then the output block is

    y_k = sum_{m=0}^{M-1} S_{k-m} c_m

Row i of that sum is y(kL-i). The trick is in the index k-m. The product
S_{k-m} c_m is the same as S c_m formed m blocks earlier. So every group's
product can be formed from the **current** block's matrix S_k, and the
results are added after a delay of m blocks. All M coefficient groups work
on the same 2L-1 samples at the same time. For L = 4 those samples are
x(4k) ... x(4k-6). Each of them is multiplied by a fixed set of coefficients:

| sample    | coefficient columns j it meets | coefficients multiplied with it          |
|-----------|--------------------------------|------------------------------------------|
| x(4k)     | 0                              | h0 h4 h8 h12                             |
| x(4k-1)   | 0, 1                           | h0 h4 h8 h12, h1 h5 h9 h13               |
| x(4k-2)   | 0, 1, 2                        | columns 0-2 (12 coefficients)            |
| x(4k-3)   | 0, 1, 2, 3                     | all 16                                   |
| x(4k-4)   | 1, 2, 3                        | columns 1-3 (12 coefficients)            |
| x(4k-5)   | 2, 3                           | h2 h6 h10 h14, h3 h7 h11 h15             |
| x(4k-6)   | 3                              | h3 h7 h11 h15                            |

Column j holds h(j), h(j+4), h(j+8), h(j+12), one coefficient from each group.
Sample x(kL-d) meets column j when 0 <= d-j <= L-1. The products are
x(kL-d) * h(mL+j) for every group m. That gives L x L products per group and
N x L = 64 in all.

## Structure

```
            coef[16] (fixed constants)
               | group c_0  | c_1      | c_2      | c_3
               v            v          v          v
x_blk[4] -> register_unit -> mcm_unit   mcm_unit   mcm_unit   mcm_unit
            (7 samples of S_k, shared by all four MCM units)
                               |          |          |          |
                               v          v          v          v
                         pipelined_adder_unit: row sums, then delay line -> y_blk[4]
```

| file                     | what it is                                                          |
|--------------------------|---------------------------------------------------------------------|
| `fir_mcm_pkg.sv`         | default sizes and width functions                                   |
| `register_unit.sv`       | block register plus the L-1 newest samples of the previous block    |
| `csd_recode.sv`          | signed-digit recoding of one coefficient (helper of `mcm_unit`)     |
| `mcm_unit.sv`            | one coefficient group times the samples, by shift-and-add           |
| `adder_tree_pipe.sv`     | pipelined binary adder tree (helper of `pipelined_adder_unit`)      |
| `pipelined_adder_unit.sv`| row sums per group, then the transposed delay line across groups    |
| `fir_mcm_top.sv`         | the filter                                                          |

There is no coefficient store module. In a fixed filter the coefficients are
constants, so `fir_mcm_top` takes them on its `coef` port (`coef[t] = h(t)`).
The design that instantiates the filter ties that port to its constants.
`coef[mL .. mL+L-1]` goes to MCM unit m.

### MCM unit: multiplying without multipliers

`mcm_unit` m computes `prod[i][j] = s[i+j] * c_m[j]`. It does this in three steps:

1. Each coefficient is rewritten in **canonical signed-digit** form by
   `csd_recode`. The digits are in {-1, 0, +1}, and no two adjacent digits
   are both non-zero. Example: 0x0F = 16 - 1 needs one subtracter instead of
   three adders. The recoding of a coefficient is done once and used by every
   sample it multiplies.
2. Each sample is negated once. That negation is used by every coefficient
   the sample meets.
3. A product is the sum of `x << b` for each +1 digit at position b, plus
   `(-x) << b` for each -1 digit.

The recoder and the digit selection are logic. When `coef` is a constant
they fold away, and each product becomes a fixed network with one adder or
subtracter per extra non-zero digit. Example coefficient set: h0..h8 =
1, 3, 5, ..., 17 and h9..h15 = 0x10, 0x11, 0x14, 0x15, 0x20, 0x12, 0x22. With
that set, coarse synthesis of the whole filter leaves 100 adder/subtracter
cells and no multiplier:

- 48 are in the adder trees;
- 12 are in the delay line;
- the rest are in the MCM units.

The same filter with `coef` left as a live input is about 3,500 cells.

The unit does **not** search for common sub-expressions between different
coefficient values. One example of that sharing is building `x + (x<<2)`
once for every coefficient that contains the pattern 101. Whatever of this
the synthesis tool does is all there is. A hand-built, coefficient-specific
adder graph would save more adders. Such a graph can only be built once the
coefficient values are known.

### Pipelined adder unit

For each group m and row i, a pipelined adder tree adds the L products of
that row (one register per tree level, log2(L) levels). This gives
`r^m[i]`, row i of `S_k c_m`. The trees' results then enter a transposed
delay line:

    acc[M-1] <= r^{M-1}
    acc[m]   <= r^m + acc[m+1]      (m < M-1)
    y_blk    =  acc[0]

After block k, `acc[0] = r^0_k + r^1_{k-1} + ... + r^{M-1}_{k-M+1}`, which
is `y_k`. All sums are carried at the full output width, so nothing can
overflow.

## Interface and timing

| port        | dir | width           | meaning                                             |
|-------------|-----|-----------------|-----------------------------------------------------|
| `clk`       | in  | 1               | clock, rising edge                                  |
| `rst`       | in  | 1               | synchronous, active high; clears the filter history |
| `coef`      | in  | N x COEF_W      | `coef[t] = h(t)`; constant while running            |
| `in_valid`  | in  | 1               | `x_blk` holds a block this clock                    |
| `x_blk`     | in  | L x IN_W        | `x_blk[i] = x(kL - i)`; index 0 is the newest       |
| `out_valid` | out | 1               | `y_blk` holds an output block                       |
| `y_blk`     | out | L x OUT_W       | `y_blk[i] = y(kL - i)`                              |

- **Throughput.** One block per clock while `in_valid` stays high.
- **Latency.** `3 + log2(L)` clocks: 5 for L = 4. The stages are:
  1. the register unit;
  2. the MCM product register;
  3. the log2(L) tree levels;
  4. the delay line.
- **Gaps.** A clock with `in_valid` low takes nothing and disturbs nothing.
  Every register stage loads only when the valid bit that travels with its
  data is set. The delay line therefore counts blocks, not clocks. The gap
  comes out as one clock of `out_valid` low, LATENCY clocks later. `y_blk`
  holds its last value during that clock.
- **Reset.** Reset clears the sample history and the delay line. The first
  blocks after reset are filtered as if all earlier samples were zero.
- **Coefficients.** `coef` is meant to be constant. If it changes, outputs
  are wrong until the pipeline and history have been flushed. Reset after a
  change.
- **Widths.** Samples and coefficients are two's complement. The output is
  exact: `OUT_W = IN_W + COEF_W + log2(N)`. With all samples and all
  coefficients at -128, the output reaches 16 x 16384 = 262144, which fits.

Parameters of `fir_mcm_top`:

| name     | default | meaning                                  |
|----------|---------|------------------------------------------|
| `N`      | 16      | taps; must be a multiple of `L`          |
| `L`      | 4       | block size, samples per clock            |
| `IN_W`   | 8       | sample width                             |
| `COEF_W` | 8       | coefficient width                        |
| `OUT_W`  | 20      | output width (computed)                  |

## Where this design makes its own choices

The following come from the structure this RTL implements:

- the four units;
- their connection, with all MCM units fed from the one register unit and
  each MCM unit fed one coefficient group;
- the sample-to-coefficient assignment in the table above;
- the default sizes N = 16 and L = 4;
- the 8-bit widths.

These are choices made here, because nothing was specified:

- the valid handshake and its gap behaviour;
- the synchronous reset and the zero initial history;
- full-precision output, with no rounding;
- the product register in the MCM units and a register per adder-tree level.
  These fix the latency at 5 clocks;
- the transposed delay line as the way the groups are combined;
- signed-digit recoding as the shift/add/subtract scheme;
- `coef` as a port rather than a coefficient memory;
- the example coefficient set used in the tests. h9..h15 are the values
  shown on a published simulation of the original. h0..h8 were chosen here.

A published FPGA implementation of this structure (N = 16, L = 4) reported
834 flip-flops, 46 multipliers and 49 adders. This RTL is not tuned to those
numbers, and how they were counted is not known. Coarse synthesis with a
live `coef` port gives 2,045 flip-flop bits and 320 memory bits.

- The flip-flops are mostly the product registers (64 x 16 bits) and the
  adder-tree registers (20 bits wide).
- The memory bits are the delay line, 16 x 20 bits, which the synthesis
  tool keeps as a register array.

Some of these are trimmed once the coefficients are constants. If the clock
rate allows it, removing the MCM product register is the simplest way to
save flip-flops.

## Verification

Every testbench checks itself and prints `TB_RESULT checks=<n> failures=<n>`.

| testbench                     | what it checks |
|-------------------------------|----------------|
| `tb_register_unit`            | presented samples against a reference history; random gaps; one-clock latency |
| `tb_csd_recode`               | all 256 coefficients: digits add up to the coefficient, canonical form (no adjacent non-zero digits) |
| `tb_mcm_unit`                 | 2,000 random and extreme sample/coefficient sets against ordinary products; latency; hold on invalid |
| `tb_pipelined_adder_unit`     | row sums and the block delay line against a reference, with gaps, on every clock |
| `tb_fir_mcm_top`              | the whole filter at its default size against direct convolution (see below) |

`tb_fir_mcm_top` leaves every parameter at its default. It makes six runs,
each starting with a reset:

- one with the example coefficient set;
- one with every sample and coefficient at -128, which gives a full-scale
  output;
- four with random coefficients.

Each run streams 400 clocks of random blocks. The first half has random gaps
and the second half is gap-free, so one output block must appear on every
clock. The testbench checks `out_valid` and `y_blk` on every clock against
the block that entered 5 clocks earlier. It counts the gaps, resets,
back-to-back stretch and full-scale outputs, and fails if any of them never
happened.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/fir_mcm_pkg.sv \
    tb/tb_fir_mcm_top.sv --top-module tb_fir_mcm_top -o sim
./obj_dir/sim
```

Replace the testbench name to run the others. Every testbench finishes in
well under a second.

## Changing the design

- **Other coefficients:** drive `coef` with the new constants. Nothing else
  changes.
- **Other sizes:** override `N`, `L`, `IN_W` and `COEF_W` on `fir_mcm_top`.
  - `N` must be a multiple of `L`; elaboration stops with an error otherwise.
  - `L` need not be a power of two. The adder trees pad with zeros.
  - The latency becomes `3 + ceil(log2(L))`.
- **Fewer registers:** the product register in `mcm_unit` and the
  per-level registers in `adder_tree_pipe` can be removed. Each one removed
  shortens the latency by one clock. The valid chain must then be shortened
  to match, and the testbenches' `LATENCY` changed with it.
