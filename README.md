# Floating-point FFT butterfly with binary signed-digit significands

A radix-2 FFT butterfly computes `A + B·W` and `A − B·W` for complex
samples `A`, `B` and a twiddle factor `W`. In floating point, each of those
outputs is a complex multiply followed by an add. That normally means four
products, several adders, and a normalisation and rounding after every
operation. Most of that time goes into carry propagation.

This design removes carry propagation from the datapath:

* **Redundant significands.** Significands are held as *binary signed
  digit* (BSD) numbers. Each digit is −1, 0 or +1. Two BSD numbers are
  added in constant time, because a carry never moves more than one
  position.
* **Booth-coded twiddles.** The twiddle significand is held in Modified
  Booth (MBE) form. Each radix-4 digit is 0, ±1 or ±2. A partial product is
  therefore only a shift and/or a negation of `B`, and an n-by-n product
  needs only about n/2 additions.
* **Fused dot product add (FDPA).** One unit computes
  `X·W1 + Y·W2 ± A` and rounds only once. Its two multipliers keep their
  products unrounded and redundant, and a three-operand floating-point
  adder adds them to `+A` and to `−A`.

Two FDPA units form the butterfly. One handles the real part and one the
imaginary part.

Beside the butterfly, and independent of it, the top level also contains
an 8×8 signed Modified Booth multiplier with a Wallace tree and a
carry-lookahead adder. It shows the encoder, decoder, tree and final-adder
structure in conventional two's-complement form.

## Number formats

**BSD number.** A BSD number of W digits travels as two W-bit vectors:

* `p`, the posibits;
* `n`, the negabits.

Digit `i` is worth `p[i] − n[i]`, and the number is
`Σ (p[i] − n[i])·2^i`. The code `p = n = 1` is another zero, and every
block accepts it.

* The number's sign lives in its digits, so there is no sign bit and no
  sign logic.
* Negation is free: swap `p` and `n`.
* A BSD number is zero exactly when all of its digits are zero. This holds
  because the top non-zero digit outweighs all the digits below it.

**`bsd_fp_t`** (package `bsd_pkg`) is the floating-point format used
between blocks:

| field | width | meaning |
|---|---|---|
| `e` | 8 | biased exponent, bias 127; `e = 0` means zero |
| `p`, `n` | 24 each | significand digits |

Value = `(p − n) · 2^(e − 127 − 23)`.

Results from the butterfly are normalised:

* the top digit (position 23) is non-zero;
* all non-zero digits have the same sign.

A result can therefore feed a following butterfly directly as `A` or `B`.

**Twiddle significand, `mbe_fp_t`.** The twiddle significand has 26 binary
positions (13 radix-4 digits for a 24-bit significand). Each position
carries two flags:

| `w−` `w+` | position value |
|---|---|
| 0 0 | 0 |
| 0 1 | +1 |
| 1 1 | −1 |

In every pair of positions (2j+1, 2j), at most one is non-zero. A ±2 sits
in the upper position of the pair and a ±1 in the lower one. The module
`booth_recoder` produces this form from a binary significand and a sign.

**IEEE 754 inputs.** The top level accepts IEEE 754 single-precision
inputs:

* `fp_to_bsd` turns `1.f` into the posibits of a positive number, or the
  negabits of a negative one.
* `booth_recoder` recodes the twiddle significand.
* Zeros and subnormals become zero.
* Infinities and NaNs are not special-cased.

## The carry-limited BSD adder (`bsd_adder`)

Each digit slice has two full adders.

1. **FA1** adds `xp[i] + yp[i] + ~xn[i]`. The result is
   `xp + yp − xn + 1 = 2·c[i+1] + s1[i]`. So FA1 leaves:
   * a posibit `c[i+1]` for the position above;
   * an (inverted) negabit `~s1[i]` in place.
2. **FA2** adds `s1[i] + ~yn[i] + c[i]`, where `c[i]` comes from FA1 of the
   digit below. The result is `2·cc[i+1] + sp[i]`. So FA2 leaves:
   * the result posibit `sp[i]`;
   * a negabit `~cc[i+1]` for the position above.
3. The result digit `i` is `sp[i] − ~cc[i]`.

Each carry crosses exactly one position and stops there, so the delay is
two full adders for any width.

The sum has W+1 digits. If both operands' top digits are zero, the top sum
digit is also zero. The multiplier's reduction tree relies on this when it
drops that digit: it pads its operands with enough zero digits.

## Redundant floating-point multiplier (`fp_bsd_mult`, `bsd_ppg`)

**Partial products.** `B` has 24 BSD digits. `W` has 26 MBE positions,
which form 13 pairs. Each pair `(i+1, i)` selects one partial product
(`bsd_ppg`):

| w−/w+ at i+1 | w−/w+ at i | PP_i |
|---|---|---|
| 00 | 00 | 0 |
| 00 | 01 | B |
| 00 | 11 | −B |
| 01 | 00 | 2B |
| 11 | 00 | −2B |

* `2B` is a one-digit left shift of `B`.
* Negation swaps the posibits and negabits.
* A multiplexer steered by `w+` at `i+1` chooses between the 2B path and
  the B path.
* Each partial product has 25 digits.

**Reduction.** The 13 partial products, shifted by 2j, go into a balanced
pairwise tree of BSD adders: 12 adders in 4 levels (13 → 7 → 4 → 2 → 1).
No carry-propagate adder follows. The product stays redundant, 54 digits
wide, with 46 fraction digits. The tree is sized from `N`. With `N = 14`
there are eight partial products, which take three levels of 4, 2 and 1
adders (seven in all). The multiplier testbench also runs this size.

**Exponent.** The product exponent is `b_e + w_e − 127`. It is kept 10
bits wide and signed, because it may fall outside the 8-bit range before
the adder renormalises it.

The product is exact: no digit is discarded.

## Three-operand floating-point adder (`fp3_bsd_adder`)

The adder computes `X + Y + A`, where `X` and `Y` are redundant products
and `A` is a `bsd_fp_t` operand. It works in six steps.

1. **Exponent comparison.** Three signed subtractions
   (`ex − ey`, `ex − ea`, `ey − ea`) select the largest exponent.
   Operands whose significand is zero do not take part, so a zero with a
   large exponent cannot push the others out of the window.
2. **Alignment.** All three significands are placed in a common 57-digit
   window:
   * the 54 product digits;
   * G = 3 guard digits below them, the lowest of which is a sticky digit;
   * `A` is moved up to the same binary point.

   Each operand is then shifted right by its distance to the largest
   exponent. Digits pushed past the two upper guard digits are not added
   in; instead, the sticky digit records their sign as −1, 0 or +1. The
   sign of a BSD string is the sign of its leading non-zero digit, so it
   needs no carries. Because the sticky digit sits below every digit that
   survives, a value just above or below a rounding tie rounds the right
   way even when the rest of the operand is gone.
3. **Addition.** A first BSD adder forms `SUM = X + Y` (57 → 58 digits). A
   second adder, 58 digits wide, adds the aligned `A`. There is no
   carry-save stage, no carry-propagate adder and no sign logic.
4. **Normalisation.** A redundant number can carry leading non-zero digits
   that add up to nothing; for example, `1 −1` is `0 1`. In general a
   leading digit `d` followed by a run of `r` digits equal to `−d` has the
   value of a single `d` placed `r` positions lower. The 59-digit sum is
   normalised in the order the architecture gives, without carries up to
   the shift:
   * a prefix OR finds the leading non-zero digit and its sign `d`;
   * every lower position whose digit is not `−d` is marked, so a
     divide-and-conquer leading-zero detector (`lzd`) on the marks counts
     the leading zeros and the run of insignificant digits together;
   * a barrel shifter moves the significant leading digit to the top,
     where it is rewritten as `d`;
   * the shifted string is converted to a magnitude by one subtraction.
     The digit after the leading one is `0` or `d`, so the leading one of
     the magnitude is in one of the top two places, and a one-place shift
     corrects it.

   `lzd` builds its count from 2-bit cells. Each cell gives D (a one is
   present) and P (its position), and cells merge pairwise until one
   remains.
5. **Rounding.** The result is rounded to nearest, ties to even, using the
   round bit and the sticky OR of all lower bits. If rounding carries out,
   the significand is renormalised.
6. **Exponent adjustment.** The exponent is corrected for the
   normalisation shift and any rounding carry.

The result is written back as BSD digits that all carry the sign:

* A zero sum returns `e = 0` and no digits.
* An exponent ≤ 0 flushes the result to zero and raises `unf`.
* An exponent ≥ 255 saturates to `e = 255` with significand 1.0 and raises
  `ovf`.

**Accuracy.** When no digit is shifted out of the window, the result is
the exactly rounded sum. The testbench checks this bit for bit. Otherwise,
the only extra error comes from replacing shifted-out digits by a sticky
digit. That error is below three units of the window's last digit, about
`2^−49` of the largest operand's scale. When only one operand loses
digits, the sticky digit keeps their sign, so rounding is still correct.

## FDPA and butterfly (`fdpa`, `fft_butterfly`)

`fdpa` has:

* two `fp_bsd_mult` multipliers, shared by both outputs;
* two `fp3_bsd_adder` adders, one per output.

Its outputs are:

* `plus = X·W1 + Y·W2 + A`;
* `minus = X·W1 + Y·W2 − A`.

`fft_butterfly` uses two FDPA units:

| unit | X | W1 | Y | W2 | A |
|---|---|---|---|---|---|
| real | Bre | Wre | Bim | −Wim | Are |
| imag | Bre | Wim | Bim | Wre  | Aim |

* `−Wim` flips the `w−` flag at every non-zero position of `Wim`.
* `A + BW` is each unit's `plus` output.
* `A − BW` is its `minus` output (`BW − A`) negated by a swap of
  posibits and negabits.

**Timing.**

* The datapath is a single combinational path. Outputs, flags and
  `out_valid` are registered.
* An input sampled with `in_valid` high appears on the outputs right after
  that same clock edge, with `out_valid` high. That is a latency of one
  clock and a throughput of one butterfly per clock.
* `rst_n` is a synchronous, active-low reset.
* The handshake has no back-pressure.

## Booth / Wallace multiplier (`mbe_wallace_mult`)

The ports are `clock`, `x[7:0]`, `y[7:0]` and `product[15:0]`. The
operands and the product are two's complement. The multiplier works in
four stages:

1. **Booth encoder.** Turns `y` into four radix-4 digits.
2. **Booth decoder.** Selects 0, `x` or `2x` for each digit and inverts it
   for a negative digit.
3. **Wallace tree.** The four sign-extended rows, plus one row of +1
   corrections for the negative digits, pass through three levels of 3:2
   carry-save adders.
4. **CLA.** A 16-bit carry-lookahead adder, built from four 4-bit groups,
   produces the product.

The product is registered on the rising edge, with no reset.

## Hierarchy

```
fft_bfly_top
├── fp_to_bsd ×4            IEEE single → bsd_fp_t (A, B)
├── booth_recoder ×2        twiddle significand → MBE
├── fft_butterfly
│   └── fdpa ×2
│       ├── fp_bsd_mult ×2
│       │   ├── bsd_ppg ×13
│       │   └── bsd_adder ×12
│       └── fp3_bsd_adder ×2
│           ├── bsd_adder ×2
│           └── lzd
└── mbe_wallace_mult
```

Shared types and sizes live in `rtl/bsd_pkg.sv`:

* `SIG_W = 24`;
* `EXP_W = 8`;
* `BIAS = 127`;
* `MBE_W = 26`;
* the structs `bsd_fp_t` and `mbe_fp_t`.

The lower blocks take their widths as parameters (`N`, `EW`, `PW`, `G`,
`W`).

## Simulating

Every testbench in `tb/` checks its own results and ends with a line
`TB_RESULT checks=<n> failures=<n>`. The reference arithmetic is in
`tb/tb_util_pkg.sv`: digit-by-digit integer values of BSD and MBE strings,
and double-precision reals. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bsd_pkg.sv tb/tb_util_pkg.sv tb/tb_fft_bfly_top.sv \
    --top-module tb_fft_bfly_top -o sim
./obj_dir/sim
```

Replace `tb_fft_bfly_top` with any other testbench name. To lint the top:
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/bsd_pkg.sv rtl/fft_bfly_top.sv`.

| testbench | what it checks |
|---|---|
| `tb_bsd_adder` | 20 000 random 8-digit and 5 000 random 54-digit sums against integer sums; headroom property; extremes |
| `tb_lzd` | every leading-zero count of a 64-bit input, all 256 8-bit inputs, all-zero flag |
| `tb_booth_recoder` | value, one non-zero per pair, sign flags only on non-zero positions |
| `tb_bsd_ppg` | the five table rows on random multiplicands |
| `tb_fp_to_bsd` | random IEEE patterns, zeros and subnormals |
| `tb_fp_bsd_mult` | exact product value and exponent, random and extreme operands; the same for a 14-digit instance whose eight partial products reduce in three levels |
| `tb_fp3_bsd_adder` | bit-exact round-to-nearest-even when exponents are equal (incl. cancellation to zero); error bound with random exponents; normalised output; leading digits of no significance, with coverage of that path and of the one-place correction; sticky digit deciding a rounding tie; overflow, underflow |
| `tb_fdpa` | both outputs against double precision |
| `tb_fft_butterfly` | a stream of random butterflies with gaps; all four results; `out_valid` timing |
| `tb_fft_bfly_top` | end to end at full size, IEEE inputs; also counts that each mechanism occurred at least once (see below); Booth/Wallace multiplier every clock |
| `tb_mbe_wallace_mult` | all 65 536 operand pairs, one per clock |
| `tb_fft8_workload` | six 8-point FFTs (3 stages × 4 butterflies) on one `fft_butterfly`, stage results fed back in BSD form; every bin against a double-precision DFT |

`tb_fft_bfly_top` requires each of these mechanisms to occur at least
once:

* rounding up;
* rounding down;
* a normalisation shift of more than 20 after cancellation;
* an operand aligned out of the window;
* a non-zero sticky digit;
* leading digits of no significance being dropped;
* a zero operand;
* an exact zero result;
* overflow;
* underflow;
* back-to-back inputs;
* gaps between inputs.

The end-to-end test runs 4 000 cycles at the default sizes in well under a
minute.

## Departures from the source architecture and limits

* **Normalisation.** The insignificant leading digits and the leading
  zeros are counted by one leading-zero detector over a marked string.
  This design chose that; the architecture only names the two steps. The
  conversion to a magnitude uses a conventional subtraction after the
  shift.
* **SUM width.** The source architecture keeps a 33-digit `SUM` after the
  first adder. Here `SUM` keeps all 58 digits. The second adder has the
  architecture's 58-digit width.
* **Alignment.** Digits shifted out of the window become one signed sticky
  digit per operand. This is this design's reading of "round, guard, and
  sticky" for redundant operands. When two operands both lose digits and
  their sticky digits have opposite signs, they cancel, and a tie can then
  round the wrong way.
* **Overlapped stages.** The architecture overlaps alignment with exponent
  comparison in time. That is a property of its gate-level timing and is
  not modelled: the datapath here is one combinational stage in front of
  one register.
* **BSD slice.** The slice reproduces the architecture's ingredients: full
  adders, inverted negabits, and carries `c` and `C` that move one
  position. Its exact equations are this design's own.
* **Multiplier structure.** The multipliers are shared by the two FDPA
  outputs. The reduction tree is pairwise: 13 partial products take 12
  adders in 4 levels.
* **Own choices.** These are not specified by the architecture:
  * the rounding mode (nearest even);
  * flush-to-zero and saturation on exponent range errors;
  * no handling of infinities and NaNs;
  * the valid handshake;
  * the reset;
  * the signed operands of the 8×8 multiplier.
* **Twiddles.** No twiddle-factor store or FFT address sequencing is
  included. Twiddles arrive as IEEE numbers and are recoded on the fly.
