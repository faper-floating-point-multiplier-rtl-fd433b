// fpm_sig_normal -- significand calculation circuit of the normal path.
//
// Multiplies the significands [1.X_m] x [1.Y_m] with a full (l+1)x(l+1)
// multiplier into U = [u_-1 u_0 . u_1 ... u_2l], normalizes U to V, forms the
// rounding bit r for the selected mode and adds it at the last place
// (Incrementer_m): W = V + r*2^-l = [w_-1 w_0 . w_1 ... w_l].
// Outputs are the result fraction Z_m = [.w_1 ... w_l] and the exponent
// increment delta = u_-1 | w_-1. When rounding carries out (W = [10.0...0]) the
// fraction bits are already all zero, so no extra step is needed.
// The structure of the integer multiplier is left to synthesis (a plain *).
// The LSB z_m[0] (w_l) is what the checking circuit aligns its result to.
// Purely combinational.
module fpm_sig_normal
  import fpm_pkg::*;
#(
  parameter int unsigned FRAC_W = 23  // l
) (
  input  logic [FRAC_W-1:0] x_m,       // fraction of X
  input  logic [FRAC_W-1:0] y_m,       // fraction of Y
  input  rnd_mode_e         rnd_mode,  // rounding mode
  input  logic              z_s,       // sign of the result (normal sign sub-circuit)
  output logic [FRAC_W-1:0] z_m,       // fraction of Z
  output logic              delta      // exponent increment
);
  localparam int unsigned L = FRAC_W;

  logic [2*L+1:0] u;
  logic [L:0]     v;
  round_bits_t    rb;
  logic           r;
  logic [L+1:0]   w;

  assign u = (2*L+2)'({1'b1, x_m}) * (2*L+2)'({1'b1, y_m});

  fpm_normalizer #(.FRAC_W(L)) u_norm (.u(u), .v(v), .rb(rb));

  fpm_round_bit u_rbit (.rb(rb), .rnd_mode(rnd_mode), .z_s(z_s), .r(r));

  // Incrementer_m
  assign w     = {1'b0, v} + (L+2)'(r);
  assign z_m   = w[L-1:0];
  assign delta = rb.u_m1 | w[L+1];
endmodule
