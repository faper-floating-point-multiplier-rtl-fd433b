# Floating-point multiplier with concurrent error detection by partial duplication

An IEEE 754 binary multiplier that checks its own result on every operation.
It does not duplicate the whole multiplier. Only the small parts are duplicated:
the sign XOR and the exponent adder. The significand is checked with a
**truncated multiplier**, which sums only the upper part of the partial-product
array. The truncated result is rounded, then nudged onto the normal result using
a single bit of that result, its last bit. A two-rail checker then compares the
full normal result with the checking result.

What this buys:

* Any wrong product that is off by **more than one unit in the last place
  (ulp)** of the significand is flagged, in every IEEE rounding mode.
  Residue (mod-3 / mod-15) checking can miss an error that is a multiple of the
  modulus, however large; this scheme cannot.
* Any wrong exponent is flagged. The two exponent adders get separate
  increment signals, `delta` and `delta'`, computed in separate significand circuits.
* About half of the 1-ulp errors are flagged as well.
* The checking circuit is well under a full copy. The original proposal reports
  an area overhead of about 78 % (single precision) and 65 % (double precision),
  against about 105 % for full duplication.

The design fits uses that accept a small error but must not pass a large one,
such as image and video processing or neural-network arithmetic in
safety-related systems.

## Structure

```
             x ─┬──────────────────────────────┬─ y          rnd_mode
                │  normal calculation circuit  │  calculation circuit for checking
   fpm_sign ────┤ z_s                          │  z'_s         fpm_sign (duplicate)
   fpm_sig_normal: full multiplier, normalizer,│  fpm_sig_check: truncated multiplier,
      rounding bit, incrementer ── Z_m, delta ─┼─ w_l ──►      normalizer, rounding bit,
                                               │               incrementer+adjuster ── Z'_m, delta'
   fpm_exponent(delta) ── Z_e                  │  fpm_exponent(delta') ── Z'_e
                │                              │
                └──── {z_s,Z_e,Z_m} ──► fpm_two_rail_checker ◄── {z'_s,Z'_e,Z'_m}
                                               │
                                      err_rail[1:0], error
```

| file | role |
|---|---|
| `rtl/fpmul_ced.sv` | top: wires the normal circuit, the checking circuit and the checker |
| `rtl/fpm_pkg.sv` | rounding-mode enum, round-bit struct, `trunc_drop_cols()` |
| `rtl/fpm_sign.sv` | z_s = x_s ^ y_s (two instances) |
| `rtl/fpm_exponent.sv` | Z_e = X_e + Y_e − bias + delta (two instances) |
| `rtl/fpm_sig_normal.sv` | full significand multiplier, normalizer, rounding bit, incrementer |
| `rtl/fpm_sig_check.sv` | checking significand circuit |
| `rtl/fpm_trunc_mult.sv` | truncated multiplier |
| `rtl/fpm_normalizer.sv` | selects V from U and extracts the rounding bits (used by both paths) |
| `rtl/fpm_round_bit.sv` | rounding bit r for the four IEEE modes (used by both paths) |
| `rtl/fpm_inc_adjust.sv` | merged incrementer and adjuster of the checking path |
| `rtl/fpm_two_rail_checker.sv` | two-rail checker tree |

Everything is combinational. There is no clock, register or handshake.
`error` settles once both paths and the checker have settled.

## Notation

The fraction width is `l` (23 for single precision, 52 for double). The exact
significand product is `U = [1.X_m]·[1.Y_m] = [u_-1 u_0 . u_1 … u_2l]`, which lies
in [1, 4). The normalizer keeps `l` fraction bits:

* `V = [1.u_0 … u_(l-1)]` if `u_-1 = 1`
* `V = [1.u_1 … u_l]` otherwise

Rounding adds a bit `r` at the last place: `W = V + r·2^-l = [w_-1 w_0 . w_1 … w_l]`.
The result fraction is `Z_m = [.w_1 … w_l]`. The exponent increment is
`delta = u_-1 | w_-1`. When rounding carries to `[10.0…0]`, the fraction bits are
already zero, so that case needs nothing extra.

The rounding bit (`fpm_round_bit`) uses `st = u_(l+2) | … | u_2l`:

| mode | u_-1 = 1 | u_-1 = 0 |
|---|---|---|
| ties to even | `u_l & (u_(l-1) \| u_(l+1) \| st)` | `u_(l+1) & (u_l \| st)` |
| toward ±∞ | `pol & (u_l \| u_(l+1) \| st)` | `pol & (u_(l+1) \| st)` |
| toward zero | 0 | 0 |

`pol` is `~z_s` when rounding toward +∞ and `z_s` when rounding toward −∞.

## Why the check works

This is the part that needs care.

**The truncation bound.** The truncated multiplier returns a value `U'` with

    U − 2^-l  <  U'  ≤  U .

Rounding is monotone, so rounding `U'` in any mode gives a result `W'` that is
either `W` or one last-place unit below it. The worst case is a product just under
2.0: `U'` normalizes with the other shift from `U`, but the relation still holds
for the fraction bits that are compared.

**The adjuster.** The checking path gets one bit from the normal path, the LSB
`w_l` of `Z_m`. If the LSB of `W'` differs from `w_l`, then `W'` must be one unit
low, so it is incremented:

* `W'' = W'` when the LSBs agree
* `W'' = W' + 2^-l` when they differ

With a fault-free normal path, `W'' = W` exactly. A wrong `Z_m` that keeps its
true LSB gives `W'' = W`, which differs from the wrong value. So does a wrong
`Z_m` whose LSB changed but which is off by more than 1 ulp, because `W''`
can only move by one unit. In both cases the checker fires.

**What can be missed.** An error that only flips `w_l` is followed by the
adjuster, so the checking path copies it. It is still caught when the two paths
land on opposite sides of the true result: one path is 1 ulp high and the other
1 ulp low. The exhaustive reduced-precision test below flags about half of all
1-ulp errors and misses the other half. It never misses a larger one.

**Exponent errors.** `delta'` comes from the checking path's own
`u'_-1 | w''_-1`. A wrong increment in either path therefore shows up as an
exponent mismatch.

## Truncated multiplier (`fpm_trunc_mult`)

The integer product has columns `p = 0 … 2l`. Column `p` holds `p+1` partial-product
bits when `p ≤ l`. Dropping the `d` lowest columns loses at most
`(d−1)·2^d + 1` units of `2^-2l`. `fpm_pkg::trunc_drop_cols(l)` returns the largest
`d` that keeps this loss below `2^l` units, i.e. below `2^-l`:

| precision | columns dropped | partial-product bits summed |
|---|---|---|
| single, l = 23 | 18 of 47 | 405 of 576 |
| double, l = 52 | 46 of 105 | 1728 of 2809 |

No correction constant is added, so `U' ≤ U` always holds. The dropped positions
read as zero, and `U'` goes through the same normalizer and rounding-bit
generator as `U`.

The original proposal sums "about the upper half" of the bits using a hand-drawn
region. This whole-column cut is a simpler, safe choice that keeps more bits.
A finer region that respects the same bound would save area and leave the
behaviour unchanged.

The summation is written as a sum of masked rows. The adder structure is left
to synthesis, as is the normal path's full multiplier (a plain `*`).

## Merged incrementer and adjuster (`fpm_inc_adjust`)

A naive checking path would need two incrementers, one for `+r'` and one for the
adjustment. Written in `r'`, `w_l` and the LSB `v'_l` of `V'`:

* `W'' = V'` if `r' = 0` and `w_l = v'_l`
* `W'' = V' + 2^(-l+1)` if `r' = 1` and `w_l = v'_l`
* `W'' = V' + 2^-l` otherwise

`V' + 2^-l` is either `T' = V' + 2^(-l+1)` with its LSB cleared (when `v'_l = 1`),
or `V'` with its LSB set. So one incrementer and a multiplexer are enough:

    sel = (~w_l & v'_l) | (v'_l & r') | (r' & ~w_l)
    W'' = sel ? [T' without its LSB, w_l] : [01 . v'_1 … v'_(l-1), w_l]

The LSB of `T'` always equals `v'_l`, so the RTL increments only the upper
`l+1` bits of `V'`.

## Two-rail checker (`fpm_two_rail_checker`)

Bit `i` of the normal word and the *inverted* bit `i` of the checking word form a
pair. The pair is a valid code word (01 or 10) exactly when the two bits agree.
A balanced tree of the standard cell reduces all pairs to one output pair:

    f = x0·x1 + y0·y1,   g = x0·y1 + y0·x1

`err_rail` is that pair. `error = ~(err_rail[1] ^ err_rail[0])`.

The tree is self-checking: a stuck-at fault inside it shows up as a non-code
output for some fault-free input. A plain XOR comparator would not give that.
Leaves beyond a power of two are padded with the code word (1,0).

## Interface

```
module fpmul_ced #(EXP_W = 8, FRAC_W = 23)   // 11 / 52 for double precision
  input  [EXP_W+FRAC_W:0] x, y      // {sign, biased exponent, fraction}
  input  fpm_pkg::rnd_mode_e rnd_mode
  output [EXP_W+FRAC_W:0] z         // product from the normal path
  output [1:0]            err_rail  // 01/10 = consistent, 00/11 = error
  output                  error
```

The rounding-mode encoding is this design's own:

| code | mode |
|---|---|
| `2'b00` | ties to even |
| `2'b01` | toward zero |
| `2'b10` | toward +∞ |
| `2'b11` | toward −∞ |

## Limits and departures

* **Normalized operands only.** Zeros, subnormals, infinities and NaNs are not
  recognised. Exponent overflow and underflow wrap modulo `2^EXP_W`, with no flag.
  The scheme is defined for normalized multiplication and adds nothing for these cases.
* **Purely combinational.** Pipelining and the timing targets used to size the
  original circuits (300 ps single, 400 ps double in a 15 nm library) are not
  modelled.
* The shape of the truncated region, the checker's cell and tree structure, the
  rounding-mode encoding and the extra `error` output are choices made here
  (see above).
* The defaults give single precision. Double precision is the same RTL with
  `EXP_W = 11, FRAC_W = 52`.
* Only the merged incrementer/adjuster is built. The two-incrementer form is
  only a stepping stone to it.
* The published fault-detection figures come from gate-level stuck-at fault
  simulation of a synthesized netlist (about 91 % of erroneous outputs detected,
  all missed errors exactly 1 ulp). The tests here inject faults at RT level, so
  their ratios are not comparable. The property behind those figures, that a miss
  is never larger than 1 ulp, is tested directly.

## Verification

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|---|---|
| `fpm_sign_tb`, `fpm_round_bit_tb` | exhaustive |
| `fpm_exponent_tb` | 8- and 11-bit exponents against integer arithmetic |
| `fpm_normalizer_tb` | V and the rounding bits against shift/remainder arithmetic |
| `fpm_sig_normal_tb` | normal path against an integer reference (the remainder is compared with half an ulp); all modes, products next to 2.0 |
| `fpm_trunc_mult_tb` | `U − 2^-l < U' ≤ U` and that low columns are really dropped, single and double, including all-ones operands |
| `fpm_inc_adjust_tb` | merged circuit against the two-step definition |
| `fpm_sig_check_tb` | checking path equals the exact result whenever `w_l` is right, in all modes, single and double; it follows an inverted `w_l` |
| `fpm_two_rail_checker_tb` | equal words give code words, any difference gives a non-code word (N = 32 and a padded N = 5) |
| `fpmul_ced_tb` | full single-precision design, see below |
| `fpmul_ced_dp_tb` | the same test in double precision |
| `fpmul_ced_small_tb` | exhaustive at EXP_W = 5, FRAC_W = 6, see below |

**`fpmul_ced_tb`** (default parameters) runs three phases:

1. 20,000 fault-free products with no false alarm.
2. Each bit of the full product stuck at 0 and at 1, 300 random operand pairs
   each. In one run, about 97 % of the wrong outputs were flagged and every
   missed one was 1 ulp off.
3. Injected errors on `delta`, on `Z_m` and on the checking result.

The test also counts that each mechanism occurred at least once:

* each rounding mode
* a product ≥ 2
* a rounding carry
* an adjuster increment
* both multiplexer legs
* a detected error and a missed 1-ulp error
* a wrong exponent

**`fpmul_ced_small_tb`** takes every operand pair, mode and sign. It replaces
`Z_m` with every other value: about 2 million errors larger than 1 ulp, all
flagged. The 1-ulp errors split roughly 50/50 between flagged and missed.

Fault injection uses `force`/`release` on internal nets (`dut.u_sig_n.u`,
`dut.z_m`, `dut.delta`, `dut.zc_m`). If you rename those nets, update the
testbenches.

### Running

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/fpm_pkg.sv tb/fpm_ref_pkg.sv tb/fpmul_ced_tb.sv \
    --top-module fpmul_ced_tb -Mdir obj && ./obj/Vfpmul_ced_tb
```

Any other testbench runs the same way: substitute its name. `tb/fpm_ref_pkg.sv`
holds the integer reference model and is needed by the arithmetic testbenches.
Each testbench finishes in well under a second.
