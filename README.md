# Transpose-form block FIR filter with Vedic multipliers

This is a reconfigurable FIR filter that takes **L = 8 input samples per clock**
and delivers **8 outputs per clock**. Transpose-form FIR filters are attractive
for high sample rates: their adder chain is pipelined by construction. They do
not lend themselves to block (parallel) processing as easily as the direct form
does. This design rewrites the filter so that both hold at once. The N taps are
cut into M = N/L groups of L. Each group multiplies the same L x L matrix of
recent samples. The M partial results are then added through a transpose-form
register chain. Every product comes from an unsigned 8x8 multiplier built on the
Vedic "vertically and crosswise" (Urdhva Tiryagbhyam) scheme. Several filters
are stored at once, and a select input picks which one is applied, block by
block.

Default configuration: 8-bit unsigned samples, 8-bit unsigned coefficients,
block size L = 8, filter length N = 32 (so M = 4), 4 stored filters, and 16-bit
accumulation.

## The block formulation

Samples are grouped into blocks of L. Inside a block the newest sample comes
first:

    x_k = [ x(kL), x(kL-1), ..., x(kL-L+1) ]      (port x_blk[l] = x(kL-l))
    y_k = [ y(kL), y(kL-1), ..., y(kL-L+1) ]      (port y_blk[l] = y(kL-l))

Define the L x L sample matrix S_k with row l

    S_k[l][j] = x(kL - l - j),   j = 0..L-1

so row l runs from x(kL-l) back through L samples. Rows l > 0 reach into the
previous block. Cut the coefficients into short-weight vectors

    c_m = [ h(mL), h(mL+1), ..., h(mL+L-1) ],   m = 0..M-1

Then the FIR sum y(n) = sum_i h(i) x(n-i) becomes, for a whole block,

    y_k = S_k c_0 + S_{k-1} c_1 + ... + S_{k-M+1} c_{M-1}

Note what this form does not need. It never needs S_{k-1}, S_{k-2}, ... at the
same time. Each matrix-vector product is computed while S is current. The
delay happens in the sum, after the products:

    r_k^m = S_k c_{M-1-m}                    (inner-product unit m+1)
    p^0   = r^0
    p^m   = r^m + D(p^{m-1})                 (D = one block of delay)
    y_k   = p^{M-1}

Unrolling the chain gives y_k = sum_m r_{k-(M-1-m)}^m = sum_j S_{k-j} c_j, which
is the formula above. This is the transpose form, applied to blocks instead of
to single samples. All M inner-product units share one S_k. Each unit also sees
one fixed coefficient vector. Because of that, the multipliers could be replaced
by constant multipliers with shared subexpressions for a fixed filter. This RTL
does not do that; it keeps general multipliers so the coefficients can be
reconfigured.

## Units

```
            sel ──► coef_storage_unit ──► c_{M-1} ... c_0
                                            │          │
 x_blk[L] ──► register_unit ── S_k ──┬──► ipu #1 ... ipu #M     (each = L icu cells)
                                     │      │ r^0        │ r^{M-1}
                                     └──────▼────────────▼
                                       pipelined_adder_unit ──► y_blk[L]
```

| module | role |
|---|---|
| `block_fir_top` | wires the units together; valid in, valid out |
| `register_unit` (RU) | keeps the current block and the newest L-1 samples of the previous one (2L-1 samples in all); S_k is pure wiring from these |
| `coef_storage_unit` (CSU) | N small ROMs, one per tap, each NFILT words deep, all read with one registered select; gives the whole coefficient set in one cycle |
| `ipu` | L inner cells sharing one weight vector: r = S_k c |
| `icu` | one row: L Vedic multipliers and an adder tree, kept to ACC_W bits |
| `pipelined_adder_unit` (PAU) | L(M-1) adders and L(M-1) registers in the transpose chain above |
| `vedic_mul8x8` | 8x8 product from four 4x4 Vedic multipliers and three 8-bit adders |
| `vedic_mul4x4` | 4x4 product, column by column (vertically and crosswise) |
| `fir_pkg` | default sizes, the coefficient-table type and the default table |

At the defaults the filter holds N·L = 256 multipliers. That is L multipliers
per cell, L cells per IPU and M IPUs.

## The 8x8 Vedic multiplier

Split a = {aH, aL} and b = {bH, bL} into nibbles. Four 4x4 units give

    m1 = aL*bL   m2 = aH*bL   m3 = aL*bH   m4 = aH*bH

Their weights are 1, 16, 16 and 256. Three 8-bit adders combine them:

    ADDER 1:  {C, m5}  = m3 + m2              (C has weight 2^12)
    ADDER 2:  {C2, m6} = m5 + m1[7:4]
    p[3:0]  = m1[3:0]
    p[7:4]  = m6[3:0]
    ADDER 3:  p[15:8] = m4 + {000, C|C2, m6[7:4]}

Carry C2 of ADDER 2 can be set, for example for 0xF2 x 0xFF. It has the same
weight as C. The two carries never occur together: when C = 1, m5 is at most
194, so m5 + 15 < 256. So both carries enter ADDER 3 at bit 4 through an OR. An
assertion checks that they are exclusive. The use of C2 is this design's
addition to the published multiplier structure. Leave it out and 524 of the
65536 products come out 4096 too small.

The 4x4 unit computes each product column k = 0..6 as the sum of all a[i]&b[j]
with i + j = k, plus the carry from column k-1. Bit 0 of that sum is product bit
k; the remaining bits carry on. The carry left after column 6 is bit 7.

## Timing and interface

`block_fir_top` ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `in_valid` | in | 1 | `x_blk` and `sel` are taken on this clock edge |
| `sel` | in | clog2(NFILT) | filter to apply to this block |
| `x_blk` | in | L x B | `x_blk[l] = x(kL-l)` |
| `out_valid` | out | 1 | `y_blk` holds the result of the block taken on the last edge |
| `y_blk` | out | L x ACC_W | `y_blk[l] = y(kL-l)` mod 2^ACC_W |

- **Throughput.** The filter takes one block per clock: L samples per cycle.
- **Latency.** The latency is one clock. The RU and the CSU register the block
  and the select. y_k then settles through the multipliers, the cell adder trees
  and the last PAU adder. No register sits at the output. The long
  combinational path (multiplier, 8-input adder tree, PAU adder) is the price of
  that latency.
- **Gaps.** When `in_valid` is low, every register holds. `y_blk` keeps its
  value and `out_valid` drops. Outputs follow accepted blocks, not clock cycles.
- **Reset.** Reset clears the sample history and the PAU chain, and selects
  filter 0. The filter then behaves as if all earlier samples were zero.
- **Switching filters.** A new `sel` applies from the block it arrives with. A
  transpose form applies c_m to the block that arrived m blocks earlier, so
  block k uses c_m as selected with block k-m. For the M-1 blocks after a switch
  the output therefore mixes the old and the new filter; after that it is clean.
  The testbench reference models this exactly.

## Arithmetic width

The accumulation registers are B + B' = 16 bits wide, as in the architecture.
Each product (16 bits), each sum of a row (L products) and each PAU sum is taken
modulo 2^16. Wraparound is exact modular arithmetic, so `y_blk` equals the true
FIR output mod 2^16. With 8-bit full-scale data and coefficients the true sum
needs up to 16 + log2(N) = 21 bits. To get the full result, raise `ACC_W`, for
example to 21; nothing else needs to change (`tb_fir_full_precision` runs
that configuration).

Samples and coefficients are unsigned because the Vedic multiplier is unsigned.
Signed data would need an offset or a signed multiplier; neither is provided.

## Parameters

| parameter | default | origin |
|---|---|---|
| `B` | 8 | sample width; the multiplier is 8x8 (at most 8) |
| `BC` | 8 | coefficient width B' (at most 8) |
| `L` | 8 | block size, from the architecture |
| `N` | 32 | filter length; a multiple of L, at most 128; this design's choice |
| `ACC_W` | 16 | B + B', from the architecture |
| `NFILT` | 4 | number of stored filters, at most 8; this design's choice |
| `COEFS` | `fir_pkg::default_coefs()` | table `[filter][tap]` of 16-bit entries; the low BC bits are used |

The default table is only a placeholder:
h_f(i) = (37·(f+1)·(i+1) + 11·f) mod 256. It gives four distinct, non-trivial
filters for testing. Pass real coefficient sets through `COEFS`.

## What follows the architecture and what is this design's own

Taken from the architecture:
- the block formulation and its unit split (RU, CSU, M IPUs of L cells, PAU);
- the order in which IPU m+1 receives c_{M-1-m};
- a PAU with L(M-1) adders and L(M-1) registers of width B+B';
- a CSU made of one ROM per tap, read in one cycle;
- L = 8;
- the 8x8 Vedic multiplier built from four 4x4 units and three adders.

Chosen here:
- N = 32 and NFILT = 4;
- the coefficient values;
- the newest-first order inside a block;
- registering the input block and the select;
- the valid handshake, and reset to zero;
- no output register;
- the adder tree inside a cell;
- the column formulation of the 4x4 Vedic unit;
- the ADDER 2 carry in the 8x8 multiplier;
- unsigned arithmetic.

Not provided: a multiplier-less variant for fixed coefficients. It would use
multiple constant multiplication with shared subexpressions. It needs a known
coefficient set and its own adder network.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_vedic_mul4x4`, `tb_vedic_mul8x8`: exhaustive over all operand pairs. The
  8x8 test also confirms that both middle carries (ADDER 1 and ADDER 2) occur.
- `tb_icu`, `tb_ipu`: random rows, matrices and weights, plus all-ones corners,
  against integer inner products mod 2^16.
- `tb_register_unit`: every matrix entry after every clock, against a sample
  history, with idle cycles and a mid-stream reset.
- `tb_coef_storage_unit`: all taps of every filter, against the table formula,
  with selects offered while `en` is low.
- `tb_pipelined_adder_unit`: random r streams with gaps, against
  y_k = sum_m r_{k-(M-1-m)}^m.
- `tb_block_fir_top`: the whole filter at its default parameters. The reference
  is a direct FIR convolution at full precision, compared mod 2^16. It covers
  impulse responses, random data, 11 filter switches, idle cycles, wrapped sums
  and a reset. It checks the one-cycle latency through `out_valid`, and it
  counts each of these events, failing if any never happened.
- `tb_fir_8tap`: the same test with N = L = 8. That is a single IPU with no
  adder chain.
- `tb_fir_full_precision`: the same test with `ACC_W` = 21. Outputs that need
  more than 16 bits must come out whole.

What is not verified: timing closure, and signed data (not supported).

Simulate one testbench with Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/fir_pkg.sv tb/tb_block_fir_top.sv --top-module tb_block_fir_top -o sim
    ./obj_dir/sim

Use the same command with another `tb_*` file and top module for the other
testbenches. The end-to-end test builds in about a minute and runs in well under
a second.
