// fpm_normalizer -- normalizer of a significand product.
//
// Input U = [u_-1 u_0 . u_1 ... u_2l] is the product of two significands
// [1.X_m] x [1.Y_m] in [1,4), held as an integer of 2l+2 bits (bit 2l+1 is u_-1,
// bit 2l-k is u_k). The output V = [1.v_1 ... v_l] is
//   [1.u_0 ... u_(l-1)]  when u_-1 = 1,
//   [1.u_1 ... u_l]      otherwise,
// together with the bits the rounding bit generator reads: u_-1, u_(l-1), u_l,
// u_(l+1) and the sticky OR of u_(l+2) .. u_(2l).
//
// The same module serves the normal circuit (U from the full multiplier) and the
// checking circuit (U' from the truncated multiplier, whose dropped low bits are
// zero). Purely combinational.
module fpm_normalizer
  import fpm_pkg::*;
#(
  parameter int unsigned FRAC_W = 23  // l
) (
  input  logic [2*FRAC_W+1:0] u,   // significand product U
  output logic [FRAC_W:0]     v,   // normalized significand V (bit FRAC_W is the leading 1)
  output round_bits_t         rb   // bits for the rounding bit generator
);
  localparam int unsigned L = FRAC_W;

  always_comb begin
    rb.u_m1  = u[2*L+1];
    rb.u_lm1 = u[L+1];
    rb.u_l   = u[L];
    rb.u_lp1 = u[L-1];
    rb.st    = |u[L-2:0];
    v        = rb.u_m1 ? u[2*L+1:L+1] : u[2*L:L];
  end
endmodule
