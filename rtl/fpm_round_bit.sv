// fpm_round_bit -- rounding bit generator for the four IEEE 754 rounding modes.
//
// From the bits of the significand product (see fpm_pkg::round_bits_t) it forms
// the bit r that is added at the last place of V:
//   ties to even:  u_-1 = 1: r = u_l & (u_(l-1) | u_(l+1) | st)
//                  u_-1 = 0: r = u_(l+1) & (u_l | st)
//   toward +/-:    u_-1 = 1: r = pol & (u_l | u_(l+1) | st)
//                  u_-1 = 0: r = pol & (u_(l+1) | st)
//                  with pol = ~z_s toward positive and z_s toward negative
//   toward zero:   r = 0
// These are the rounding equations for normalized products; the mode encoding
// is this design's own (fpm_pkg::rnd_mode_e). Purely combinational.
module fpm_round_bit
  import fpm_pkg::*;
(
  input  round_bits_t rb,        // u_-1, u_(l-1), u_l, u_(l+1), st
  input  rnd_mode_e   rnd_mode,  // rounding mode
  input  logic        z_s,       // sign of the result
  output logic        r          // rounding bit
);
  logic pol;

  always_comb begin
    pol = 1'b0;
    r   = 1'b0;
    unique case (rnd_mode)
      RND_NE: r = rb.u_m1 ? (rb.u_l & (rb.u_lm1 | rb.u_lp1 | rb.st))
                          : (rb.u_lp1 & (rb.u_l | rb.st));
      RND_UP, RND_DN: begin
        pol = (rnd_mode == RND_UP) ? ~z_s : z_s;
        r   = rb.u_m1 ? (pol & (rb.u_l | rb.u_lp1 | rb.st))
                      : (pol & (rb.u_lp1 | rb.st));
      end
      default: r = 1'b0;  // RND_TZ
    endcase
  end
endmodule
