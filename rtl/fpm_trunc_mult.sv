// fpm_trunc_mult -- truncated significand multiplier of the checking circuit.
//
// Forms the (l+1)x(l+1) partial-product array of [1.X_m] x [1.Y_m] but sums only
// the bits in columns DROP_COLS and above; the DROP_COLS lowest columns are left
// out. The result U' is returned in the same 2l+2-bit format as the full
// product U (dropped positions read as zero) and satisfies
//     U - 2^-l < U' <= U,
// which is all the checking circuit needs: rounding U' lands on the same result
// as rounding U or one unit in the last place below it.
//
// The shape of the kept region is this design's own choice: whole columns are
// dropped, with DROP_COLS = fpm_pkg::trunc_drop_cols(l) the largest count whose
// worst-case loss stays below 2^-l (18 of 47 columns for l = 23, i.e. 405 of
// 576 partial-product bits kept; 46 of 105 columns for l = 52). No correction
// constant is added, so U' never exceeds U. Summation is left to synthesis.
// Purely combinational.
module fpm_trunc_mult
  import fpm_pkg::*;
#(
  parameter int unsigned FRAC_W = 23  // l
) (
  input  logic [FRAC_W-1:0]   x_m,  // fraction of X
  input  logic [FRAC_W-1:0]   y_m,  // fraction of Y
  output logic [2*FRAC_W+1:0] u_t   // truncated product U'
);
  localparam int unsigned L         = FRAC_W;
  localparam int unsigned PW        = 2 * L + 2;
  localparam int unsigned DROP_COLS = trunc_drop_cols(L);
  // columns DROP_COLS and up are kept
  localparam logic [PW-1:0] KEEP    = ~(((PW)'(1) << DROP_COLS) - (PW)'(1));

  logic [L:0] a, b;

  assign a = {1'b1, x_m};
  assign b = {1'b1, y_m};

  always_comb begin
    u_t = '0;
    for (int i = 0; i <= int'(L); i++)
      u_t = u_t + (((PW)'(b & {(L+1){a[i]}}) << i) & KEEP);
  end
endmodule
