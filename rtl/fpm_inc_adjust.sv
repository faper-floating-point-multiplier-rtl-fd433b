// fpm_inc_adjust -- merged incrementer and adjuster of the checking circuit.
//
// The checking significand V' = [1.v'_1 ... v'_l] with rounding bit r' rounds to
// W' = V' + r'*2^-l, which is either the normal result W or one last-place unit
// below it. The adjuster brings W' onto W using only the normal result's LSB w_l:
//     W'' = W'          if the LSBs of W' and W agree
//     W'' = W' + 2^-l   otherwise.
// Written out in r', w_l and v'_l this is
//     W'' = V'              if r' = 0 and w_l = v'_l
//     W'' = V' + 2^-l+1     if r' = 1 and w_l = v'_l
//     W'' = V' + 2^-l       otherwise,
// and since V' + 2^-l is either T' = V' + 2^-l+1 with its LSB cleared (v'_l = 1)
// or V' with its LSB set (v'_l = 0), one incrementer T' and a 2-way multiplexer
// suffice. In all cases the LSB of W'' is w_l:
//     W'' = [t'_-1 t'_0 . t'_1 ... t'_(l-1) w_l]    if sel = 1
//     W'' = [0 1 . v'_1 ... v'_(l-1) w_l]          otherwise,
//     sel = (~w_l & v'_l) | (v'_l & r') | (r' & ~w_l).
// Purely combinational.
module fpm_inc_adjust #(
  parameter int unsigned FRAC_W = 23  // l
) (
  input  logic [FRAC_W:0]   v,    // V' (bit FRAC_W is the leading 1, bit 0 is v'_l)
  input  logic              r,    // rounding bit r'
  input  logic              w_l,  // LSB of the normal result fraction
  output logic [FRAC_W+1:0] w     // W'' = [w''_-1 w''_0 . w''_1 ... w''_l]
);
  localparam int unsigned L = FRAC_W;

  // T' = V' + 2^-l+1 (Incrementer'_m). Its LSB always equals v'_l and is
  // replaced by w_l, so only the upper l+1 bits are computed:
  // t = [t'_-1 t'_0 . t'_1 ... t'_(l-1)] = [1.v'_1 ... v'_(l-1)] + 1 ulp.
  logic [L:0] t;
  logic       sel;

  always_comb begin
    t   = {1'b0, v[L:1]} + (L+1)'(1);
    sel = (~w_l & v[0]) | (v[0] & r) | (r & ~w_l);
    w   = sel ? {t, w_l} : {2'b01, v[L-1:1], w_l};
  end
endmodule
