// fpm_ref_pkg -- reference arithmetic for the multiplier testbenches.
//
// Works on plain integers, not on the bit formulas of the design: the exact
// significand product is scaled and rounded by comparing the discarded
// remainder with half a unit in the last place. Sizes up to double precision
// (fraction of up to 60 bits) fit the 128-bit vectors used here.
package fpm_ref_pkg;

  typedef logic [127:0] wide_t;

  typedef struct {
    wide_t p;       // exact integer product (1.X)(1.Y) * 2^(2l)
    logic  delta;   // exponent increment
    wide_t frac;    // rounded fraction, l bits
    logic  norm2;   // product was in [2,4)
    logic  carry;   // rounding carried the significand up to 2.0
  } ref_t;

  // mode: 0 ties-to-even, 1 toward zero, 2 toward +inf, 3 toward -inf
  function automatic ref_t ref_round(input wide_t p, input int l, input int mode,
                                     input logic sign);
    ref_t  res;
    int    sh;
    wide_t q, rem, half;
    logic  up;
    res.p     = p;
    res.norm2 = ((p >> (2 * l + 1)) & 1) != 0;
    sh        = l + (res.norm2 ? 1 : 0);
    q         = p >> sh;
    rem       = p - (q << sh);
    half      = wide_t'(1) << (sh - 1);
    case (mode)
      0:       up = (rem > half) || (rem == half && q[0]);
      2:       up = (rem != 0) && !sign;
      3:       up = (rem != 0) && sign;
      default: up = 1'b0;
    endcase
    q         = q + wide_t'(up);
    res.carry = (q >> (l + 1)) != 0;
    res.delta = res.norm2 | res.carry;
    res.frac  = q & ((wide_t'(1) << l) - 1);
    return res;
  endfunction

  function automatic ref_t ref_mul(input wide_t xm, input wide_t ym, input int l,
                                   input int mode, input logic sign);
    wide_t a, b;
    a = (wide_t'(1) << l) | xm;
    b = (wide_t'(1) << l) | ym;
    return ref_round(a * b, l, mode, sign);
  endfunction

  // random fraction of l bits
  function automatic wide_t rand_frac(input int l);
    wide_t v;
    v = {$urandom, $urandom, $urandom, $urandom};
    return v & ((wide_t'(1) << l) - 1);
  endfunction

  // fraction ym such that (1.xm)(1.ym) is just below 2.0 (within 1.xm * 2^-2l):
  // 1.ym = floor((2^(2l+1) - 1) / 1.xm). Rounding such products up carries the
  // significand to 2.0. xm must be non-zero.
  function automatic wide_t near_two_partner(input wide_t xm, input int l);
    wide_t a;
    a = (wide_t'(1) << l) | xm;
    return (((wide_t'(1) << (2 * l + 1)) - 1) / a) & ((wide_t'(1) << l) - 1);
  endfunction

endpackage
