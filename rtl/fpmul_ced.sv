// fpmul_ced -- IEEE 754 binary floating-point multiplier with concurrent error
// detection by partial duplication.
//
// Normal calculation circuit:   sign (fpm_sign), exponent (fpm_exponent) and a
//                               full significand circuit (fpm_sig_normal).
// Checking calculation circuit: duplicated sign and exponent sub-circuits and a
//                               significand circuit built around a truncated
//                               multiplier (fpm_sig_check), which is aligned to
//                               the normal result through its LSB w_l.
// Checker:                      two-rail checker over {z_s, Z_e, Z_m} of both
//                               circuits (fpm_two_rail_checker).
// Any error of the product larger than one unit in the last place of the
// significand is flagged, for every rounding mode; errors of exactly 1 ulp are
// caught in about half the cases, and any exponent error is caught because the
// two exponent sub-circuits get independent increments delta and delta'.
//
// Interface: x, y and z are packed {sign, exponent, fraction} words; rnd_mode
// selects the rounding mode (fpm_pkg::rnd_mode_e, encoding is this design's
// own). err_rail is the checker's two-rail output (01/10 fine, 00/11 error) and
// error is 1 when err_rail is not a code word.
// Only normalized operands are handled: zeros, subnormals, infinities, NaN and
// exponent overflow/underflow are outside the design (the exponent wraps).
// Timing: purely combinational, no clock; the checker output settles after both
// results.
// Defaults are single precision; EXP_W = 11, FRAC_W = 52 gives double precision.
module fpmul_ced
  import fpm_pkg::*;
#(
  parameter int unsigned EXP_W  = 8,   // exponent bits
  parameter int unsigned FRAC_W = 23,  // fraction bits l
  localparam int unsigned W     = 1 + EXP_W + FRAC_W
) (
  input  logic [W-1:0] x,         // multiplicand X
  input  logic [W-1:0] y,         // multiplier Y
  input  rnd_mode_e    rnd_mode,  // rounding mode
  output logic [W-1:0] z,         // product Z (normal circuit)
  output logic [1:0]   err_rail,  // two-rail checker output
  output logic         error      // err_rail is not a code word
);
  logic              x_s, y_s;
  logic [EXP_W-1:0]  x_e, y_e;
  logic [FRAC_W-1:0] x_m, y_m;

  assign {x_s, x_e, x_m} = x;
  assign {y_s, y_e, y_m} = y;

  // ---- normal calculation circuit ----
  logic              z_s, delta;
  logic [EXP_W-1:0]  z_e;
  logic [FRAC_W-1:0] z_m;

  fpm_sign u_sign_n (.x_s(x_s), .y_s(y_s), .z_s(z_s));

  fpm_sig_normal #(.FRAC_W(FRAC_W)) u_sig_n (
    .x_m(x_m), .y_m(y_m), .rnd_mode(rnd_mode), .z_s(z_s), .z_m(z_m), .delta(delta));

  fpm_exponent #(.EXP_W(EXP_W)) u_exp_n (.x_e(x_e), .y_e(y_e), .delta(delta), .z_e(z_e));

  // ---- calculation circuit for checking ----
  logic              zc_s, delta_c;
  logic [EXP_W-1:0]  zc_e;
  logic [FRAC_W-1:0] zc_m;

  fpm_sign u_sign_c (.x_s(x_s), .y_s(y_s), .z_s(zc_s));

  fpm_sig_check #(.FRAC_W(FRAC_W)) u_sig_c (
    .x_m(x_m), .y_m(y_m), .rnd_mode(rnd_mode), .z_s(zc_s), .w_l(z_m[0]),
    .z_m(zc_m), .delta(delta_c));

  fpm_exponent #(.EXP_W(EXP_W)) u_exp_c (.x_e(x_e), .y_e(y_e), .delta(delta_c), .z_e(zc_e));

  // ---- checker ----
  fpm_two_rail_checker #(.N(W)) u_chk (
    .a({z_s, z_e, z_m}), .b({zc_s, zc_e, zc_m}), .rail(err_rail));

  assign z     = {z_s, z_e, z_m};
  assign error = ~(err_rail[1] ^ err_rail[0]);
endmodule
