// fpm_sign -- sign sub-circuit of the multiplier: z_s = x_s XOR y_s.
//
// The error-detecting multiplier instantiates it twice, once in the normal
// calculation circuit and once, as a plain duplicate, in the checking circuit,
// so that a fault in either copy shows up as a sign mismatch at the checker.
// Purely combinational.
module fpm_sign (
  input  logic x_s,  // sign of the multiplicand X
  input  logic y_s,  // sign of the multiplier Y
  output logic z_s   // sign of the product Z
);
  assign z_s = x_s ^ y_s;
endmodule
