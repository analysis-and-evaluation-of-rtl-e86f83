# Fused add-multiply (FAM) operator with S-MB recoding, and an FFT butterfly built on it

Many DSP kernels compute a product of a sum, `Z = X * (A + B)`. The radix-2
FFT butterfly is the classic case: its lower output is `(A - B) * W`. The
straightforward circuit adds `A + B` in a carry-propagate adder and then feeds
the sum to a modified Booth (MB) multiplier. That adder's carry chain sits in
series with the multiplier and grows with the word length.

The fused add-multiply (FAM) operator here removes that adder. The sum is
never formed in binary. Instead the two addends are **recoded straight into
radix-4 modified Booth digits** by a row of small signed-digit adders (the
*S-MB recoder*), whose carries travel at most one bit pair. The rest is a
normal Booth multiplier:

```
 A ─┐
    ├─ smb_recoder ─► MB digits ─► mb_pp_gen ─► partial product rows ─┐
 B ─┘   (signed HA/FA cells)           ▲              │                ├─ csa_tree ─► cla_adder ─► Z
cin                                    X              └─ neg ─► mb_correction ─┘  (4:2 compressors)
```

The only carry-propagate adder is the final carry-lookahead adder.

`fft_butterfly` is the top. It uses four FAM units to build a radix-2
decimation-in-frequency butterfly on complex 16-bit data.

Everything is SystemVerilog-2017 and synthesizable. It is parameterised by the
operand width `N` (default 16) and by `SIGNED` (default two's complement).

## The S-MB recoder (`smb_recoder`)

This is the part that needs the most explanation.

A radix-4 MB digit is usually formed from three multiplier bits
`(y2j+1, y2j, y2j-1)` and has the value `-2*y2j+1 + y2j + y2j-1`:

| y2j+1 y2j y2j-1 | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|-----------------|-----|-----|-----|-----|-----|-----|-----|-----|
| digit           | 0   | +1  | +1  | +2  | -2  | -1  | -1  | 0   |

So a digit needs one bit of weight **-2** and two bits of weight **+1**. The
recoder's job is to produce, for every bit pair `j` of `A + B`, exactly such a
triplet (`mb_digit_t` in `fam_pkg`: `y_hi`, `y_mid`, `y_lo`). Then
`sum_j digit_j * 4^j == A + B + cin`, and it must do so without a carry chain.

It does this with bit-level adders whose inputs and outputs may have
**negative weight**:

| cell | equation | outputs |
|------|----------|---------|
| `full_adder`    | `a + b + ci = s + 2*co`       | ordinary full adder |
| `signed_ha_pp`  | `a + b = 2*c - s`             | `s = a^b`, `c = a\|b` |
| `signed_ha_pn`  | `p - n = 2*c - s`             | `s = p^n`, `c = p&~n` |
| `signed_fa_pnn` | `p - n1 - n2 = -s + 2*(cp - cn)` | `s = p^n1^n2`, `cp = p&~n1&~n2`, `cn = ~p&n1&n2` |

For bit pair `j` (bits `2j` and `2j+1` of both operands):

1. `full_adder(a2j, b2j, c2j)`. Its sum `s2j` has weight +1 and becomes the
   digit's `y_mid`. Its carry `c2j+1` has weight 2.
2. `signed_ha_pp(a2j+1, b2j+1)`. Its carry `c2j+2` goes to the full adder of
   the next pair. Its sum `s2j+1` has weight **-2**.
3. `signed_ha_pn(c2j+1, s2j+1)`. It merges the positive and the negative
   weight-2 bits. Its sum becomes the digit's `y_hi` (weight -2). Its carry,
   of weight 4, becomes the next digit's `y_lo`.

Adding up, pair `j` contributes `s2j - 2*y_hi + 4*(carries out)`, which is
exactly the MB digit plus what the next pair picks up. Each carry depends
only on the four input bits of one pair plus one carry from the pair below.
That carry-in enters a full adder whose carry-out goes to a *different*
cell, not onward. So the recoder's depth is constant: about one full adder
and two half adders, whatever `N` is.

`c0` is the operator's `cin` input, and the lowest digit's `y_lo` is 0.

**Sign bits.** In two's complement the top bits `a[N-1]`, `b[N-1]` have
negative weight. On the top pair the two half adders are replaced by
`signed_fa_pnn`. It takes the positive carry from the full adder and the two
negative sign bits, and produces `y_hi` of that digit plus a signed carry in
`{-1, 0, +1}`. That carry becomes one extra digit, encoded as
`(cn, cn, cp)`. So an `N`-bit sum (`N` even) gives `N/2 + 1` digits. That is
enough to hold the exact `N+1`-bit value of `A + B + cin`, including
`-2^N` and `2^N - 1`.

**Unsigned operands** (`SIGNED = 0`). The top pair uses the same half adders
as the rest. The extra digit is the top pair's two positive carries, `c + w`,
which lies in `{0, 1, 2}`.

**Odd widths.** Operands of odd width are sign- or zero-extended by one bit.
The width used inside is `NE = N + N%2`.

## Partial products and the correction term (`mb_pp_gen`, `mb_correction`)

Each digit is decoded with the table above into `one`, `two` and `neg`:

- `one = y_mid ^ y_lo`
- `two = y_hi&~y_mid&~y_lo | ~y_hi&y_mid&y_lo`
- `neg = y_hi`

The row is `|digit| * X` as an `(NE+2)`-bit word. When `neg` is set it is
inverted (one's complement). Its sign bit is inverted too, so no row needs
sign extension. Row `j` is shifted left by `2j` inside a
`PW = 2*NE + 2`-bit word. Its value is therefore:

```
row_j = digit_j*X*4^j - neg_j*4^j + 2^(NE+1+2j)   (mod 2^PW)
```

`mb_correction` builds one more row to cancel the two error terms. It adds the
`+1` of every negation (`neg_j` at bit `2j`) and the constant
`-sum_j 2^(NE+1+2j)`. The constant has no bits below `NE+1` and the `neg` bits
lie at or below bit `NE`, so the two are merged by OR. Negative digits of value
0 (triplet `111`) produce an all-ones row plus `neg = 1`. This adds up to
zero, as it should.

## Reduction tree and final adder (`compressor_4_2`, `csa_tree`, `cla_adder`)

The `NE/2 + 2` rows (10 for `N = 16`) are reduced to two by `csa_tree`. Each
level groups the words by four into rows of 4:2 compressors. Three leftover
words go through a full-adder row, and one or two pass through unchanged.
For 10 rows the levels go `10 → 6 → 4 → 2`.

The 4:2 compressor uses XORs and two multiplexers, with three XOR delays
instead of the four of two chained full adders:

```
cout  = (x1^x2) ? x3 : x1          -- does not depend on cin
sum   = x1^x2^x3^x4^cin
carry = (x1^x2^x3^x4) ? cin : x4
```

Because `cout` ignores `cin`, the `cout → cin` links along a compressor row
never ripple.

`cla_adder` adds the two remaining words. It uses 4-bit groups with full
lookahead inside each group. The carry between groups is `GG | GP & c`, from
each group's generate and propagate. All arithmetic is modulo `2^PW`. The
result `z = X*(A+B+cin)` is the low `2N+1` bits, which is exact for both
signed and unsigned operands.

## The FFT butterfly (`fft_butterfly`, top)

```
P  = A + B
Qr = Wr*(Ar-Br) - Wi*(Ai-Bi)
Qi = Wi*(Ar-Br) + Wr*(Ai-Bi)
```

Each of the four products is a FAM with `b = ~B` and `cin = 1`. The recoder
forms `A + ~B + 1 = A - B` with no extra subtractor. Two `cla_adder`s combine
the products, and two more form `P`. Results keep full precision: `P` is
`N+1` bits and `Q` is `2N+2` bits. Rounding and scaling are left to the FFT
around it.

**Timing.** The datapath is combinational, followed by one register stage. A
sample presented with `in_valid = 1` at a rising edge appears on the outputs,
with `out_valid = 1`, right after that edge. The butterfly accepts one
sample per clock. When `in_valid = 0` the outputs hold their value and
`out_valid` drops. `rst_n` is an asynchronous, active-low reset that clears
`out_valid` and the outputs.

| port | width | meaning |
|------|-------|---------|
| `clk`, `rst_n`, `in_valid` | 1 | clock, async active-low reset, input strobe |
| `ar ai br bi wr wi` | N | complex inputs A, B and twiddle W, two's complement |
| `out_valid` | 1 | outputs belong to the sample of the previous edge |
| `pr pi` | N+1 | A + B |
| `qr qi` | 2N+2 | (A - B) * W |

`fam` on its own is purely combinational: `x`, `a`, `b` (N bits), `cin`, and
`z` (2N+1 bits).

## What comes from the operator's description and what is this design's own

These parts follow the published description of the operator:

- the fused structure, with the sum recoded directly into MB form by signed
  half and full adders;
- the Booth table;
- the correction term added in the CSA tree;
- a CSA tree built from 4:2 compressors with the three-XOR-delay multiplexer
  structure;
- a carry-lookahead final adder;
- support for signed and unsigned operands of odd or even width;
- the operand lengths 8, 16 and 32 bits.

These are this design's own choices:

- **The recoder's cell arrangement.** The description names three S-MB
  schemes built from conventional and signed half and full adders, but does
  not give their netlists. The arrangement above is an S-MB scheme built
  from those cells. It is not claimed to match any one of the three
  gate-for-gate, and only this one arrangement is provided. The three schemes
  have the same function. They differ only in delay, area and power.
- The signed full adder on the sign pair and the extra top digit.
- The row format (inverted sign bits) and the contents of the correction row.
- The tree's grouping and the 4-bit CLA groups.
- `N = 16` as the default width. The description evaluates 8, 16 and 32 bits
  and does not name a main one.
- The whole FFT butterfly. The operator is presented for FFT computation,
  but no butterfly, FFT size or twiddle format is given. The radix-2 DIF
  butterfly is the simplest FFT element that maps onto `X*(A+B)`.
- Full-precision outputs, one register stage, valid/reset handshake.
- No pipelining inside the operator.

This design has no accumulator. Despite the "MAC" name, the operator
described is add-multiply. The conventional designs it is compared with
(adder plus Booth multiplier, and other recoders) are not included.

## Sizes

| N | MB digits | rows into the tree | tree levels | PW | z bits |
|---|-----------|--------------------|-------------|----|--------|
| 8  | 5  | 6  | 2 | 18 | 17 |
| 16 | 9  | 10 | 3 | 34 | 33 |
| 32 | 17 | 18 | 4 | 66 | 65 |

At the default `N = 16`, 8-bit data fit by sign extension. 32-bit operands
need `fam #(.N(32))`, which is simulated and exact.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. References are
computed independently in wide integer arithmetic.

| testbench | what it checks |
|-----------|----------------|
| `tb_compressor_4_2` | all 32 input combinations; `cout` independent of `cin` |
| `tb_cla_adder` | exhaustive at W=5; random and corner cases at W=34 |
| `tb_csa_tree` | 10, 3, 5 and 7 rows: output words add up to the sum of the inputs |
| `tb_smb_recoder` | exhaustive signed and unsigned at N=5; random and corner cases at N=16; all digit values -2..+2 occur |
| `tb_mb_pp_gen` | every Booth triplet against the row formula, including X = -2^15 |
| `tb_mb_correction` | all 512 patterns of `neg` |
| `tb_fam` | exhaustive signed and unsigned at N=4; random and corner cases at N=7 and N=16, signed and unsigned |
| `tb_fam_workloads` | N=8, 16 and 32 with corner and random operands, 66-bit reference |
| `tb_fft_butterfly` | 6000 cycles at the default N=16 (details below) |
| `tb_fft8_workload` | 43 frames of an 8-point radix-2 DIF FFT through the butterfly, Q2.14 twiddles, compared with a double-precision DFT (within 4 LSB) |

`tb_fft_butterfly` also checks:

- valid and idle cycles;
- that outputs hold while idle;
- the one-cycle latency;
- an asynchronous reset in mid-stream;
- extreme operands, where `|A-B| = 2^16-1`.

It counts each of these events and fails if any never happens.

All of these pass. Every testbench was also run against a copy of its module
with one deliberate bug, and it reported failures.

## Simulating

With Verilator 5, from the folder holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fam_pkg.sv \
          tb/tb_fft_butterfly.sv --top-module tb_fft_butterfly
./obj_dir/Vtb_fft_butterfly
```

Replace the testbench name to run any other. The package `rtl/fam_pkg.sv`
must come first. The other modules are found through `-Irtl`, one module per
file. To change the width, set `N` on `fft_butterfly` or `fam`. To use
unsigned operands, set `SIGNED` on `fam`. The size functions in `fam_pkg`
(`num_digits`, `pp_width`) derive every internal width.
