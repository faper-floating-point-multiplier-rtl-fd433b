// fpm_pkg -- shared types and constants of the error-detecting floating-point
// multiplier.
//
// rnd_mode_e   : the four IEEE 754 rounding modes. The 2-bit encoding is this
//                design's own choice.
// round_bits_t : the bits of a significand product that the rounding bit
//                generator needs, named after the product U = [u_-1 u_0 . u_1 ... u_2l]:
//                u_m1 = u_-1, u_lm1 = u_(l-1), u_l, u_lp1 = u_(l+1) and the sticky
//                bit st = u_(l+2) | ... | u_(2l).
// trunc_drop_cols(l) : how many low-order columns of the (l+1)x(l+1) partial
//                product array the truncated multiplier may leave out. Column p
//                (weight 2^p in the integer product) holds p+1 bits for p <= l, so
//                dropping the columns 0..d-1 loses at most
//                sum_{p<d} (p+1) 2^p = (d-1) 2^d + 1 units of 2^-2l. The function
//                returns the largest d for which that is below 2^l units, i.e. below
//                2^-l, which is the bound U - 2^-l < U' <= U the checking circuit
//                relies on. It gives 18 for l = 23 and 46 for l = 52.
package fpm_pkg;

  typedef enum logic [1:0] {
    RND_NE = 2'b00,  // round ties to even
    RND_TZ = 2'b01,  // round toward zero
    RND_UP = 2'b10,  // round toward positive
    RND_DN = 2'b11   // round toward negative
  } rnd_mode_e;

  typedef struct packed {
    logic u_m1;   // u_-1: product is in [2,4)
    logic u_lm1;  // u_(l-1)
    logic u_l;    // u_l
    logic u_lp1;  // u_(l+1)
    logic st;     // OR of u_(l+2) .. u_(2l)
  } round_bits_t;

  function automatic int trunc_drop_cols(input int l);
    int d;
    d = 0;
    // (d)*2^(d+1) + 1 is the worst-case loss when one more column is dropped
    while ((d + 1) < l &&
           (longint'(d) * (longint'(1) << (d + 1)) + 1) < (longint'(1) << l))
      d = d + 1;
    return d;
  endfunction

endpackage
