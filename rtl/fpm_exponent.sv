// fpm_exponent -- exponent sub-circuit: Z_e = X_e + Y_e - bias + delta.
//
// delta (0 or 1) is the increment reported by a significand circuit: the
// significand product was in [2,4) or rounding carried out of it. The normal
// exponent sub-circuit takes delta from the normal significand circuit; its
// duplicate in the checking circuit takes delta' from the checking significand
// circuit, so an error on either increment signal makes the two exponents differ.
//
// bias = 2^(EXP_W-1) - 1 (127 single, 1023 double). Only normalized operands are
// considered: zeros, subnormals, infinities and NaN are not treated and the
// result wraps modulo 2^EXP_W on overflow or underflow (this design's choice; no
// flag is raised). Purely combinational.
module fpm_exponent #(
  parameter int unsigned EXP_W = 8
) (
  input  logic [EXP_W-1:0] x_e,    // biased exponent of X
  input  logic [EXP_W-1:0] y_e,    // biased exponent of Y
  input  logic             delta,  // increment from the significand circuit
  output logic [EXP_W-1:0] z_e     // biased exponent of Z
);
  localparam logic [EXP_W-1:0] BIAS = EXP_W'((1 << (EXP_W - 1)) - 1);

  // modulo 2^EXP_W arithmetic: carries out of the top bit are dropped
  assign z_e = x_e + y_e + EXP_W'(delta) - BIAS;
endmodule
