// fpm_sig_check -- significand calculation circuit of the checking path.
//
// Replaces a duplicate of the full significand circuit with a smaller one:
//   truncated multiplier  U' with U - 2^-l < U' <= U  (fpm_trunc_mult)
//   normalizer            V' from U'                  (fpm_normalizer)
//   rounding bit gen.     r' for the selected mode     (fpm_round_bit)
//   incrementer+adjuster  W'' aligned to the normal LSB w_l (fpm_inc_adjust)
//   OR gate               delta' = u'_-1 | w''_-1
// Outputs are Z'_m = [.w''_1 ... w''_l] and delta'. When the normal circuit is
// fault-free, Z'_m = Z_m and delta' = delta for every rounding mode; an error of
// the normal significand larger than one last-place unit always produces a
// mismatch. Only an inverted w_l can pass unnoticed, since the adjuster copies it.
// Purely combinational; w_l arrives from the normal path.
module fpm_sig_check
  import fpm_pkg::*;
#(
  parameter int unsigned FRAC_W = 23  // l
) (
  input  logic [FRAC_W-1:0] x_m,       // fraction of X
  input  logic [FRAC_W-1:0] y_m,       // fraction of Y
  input  rnd_mode_e         rnd_mode,  // rounding mode
  input  logic              z_s,       // sign from the checking sign sub-circuit
  input  logic              w_l,       // LSB of the normal result fraction Z_m
  output logic [FRAC_W-1:0] z_m,       // Z'_m
  output logic              delta      // delta'
);
  localparam int unsigned L = FRAC_W;

  logic [2*L+1:0] u_t;
  logic [L:0]     v;
  round_bits_t    rb;
  logic           r;
  logic [L+1:0]   w;

  fpm_trunc_mult #(.FRAC_W(L)) u_tmul (.x_m(x_m), .y_m(y_m), .u_t(u_t));

  fpm_normalizer #(.FRAC_W(L)) u_norm (.u(u_t), .v(v), .rb(rb));

  fpm_round_bit u_rbit (.rb(rb), .rnd_mode(rnd_mode), .z_s(z_s), .r(r));

  fpm_inc_adjust #(.FRAC_W(L)) u_adj (.v(v), .r(r), .w_l(w_l), .w(w));

  assign z_m   = w[L-1:0];
  assign delta = rb.u_m1 | w[L+1];
endmodule
