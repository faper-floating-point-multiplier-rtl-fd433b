// fpm_two_rail_checker -- two-rail checker comparing two N-bit words.
//
// Bit i of the normal word a and the inverted bit i of the checking word b form a
// two-rail pair (a_i, ~b_i), which is a code word (01 or 10) exactly when
// a_i = b_i. A balanced tree of the classic two-rail checker cell
//     f = x0 & x1 | y0 & y1,   g = x0 & y1 | y0 & x1
// reduces the pairs to one pair (f, g) = rail. rail is 01 or 10 when every pair
// is a code word and 00 or 11 as soon as one is not, and a stuck-at fault inside
// the tree also shows up as a non-code output for some fault-free input, which is
// why this structure, and not a plain comparator, is used.
// The cell equations and tree shape are this design's own choice; unused leaves
// are padded with the code word (1,0). Purely combinational.
module fpm_two_rail_checker #(
  parameter int unsigned N = 32  // bits compared
) (
  input  logic [N-1:0] a,     // normal result
  input  logic [N-1:0] b,     // checking result
  output logic [1:0]   rail   // {f, g}: complementary when a == b
);
  localparam int unsigned LEAVES = 1 << $clog2(N);

  // heap-ordered tree: node k has children 2k and 2k+1; leaves at LEAVES+i
  logic [2*LEAVES-1:1] f, g;

  for (genvar i = 0; i < int'(LEAVES); i++) begin : g_leaf
    if (i < int'(N)) begin : g_pair
      assign f[LEAVES+i] = a[i];
      assign g[LEAVES+i] = ~b[i];
    end else begin : g_pad
      assign f[LEAVES+i] = 1'b1;
      assign g[LEAVES+i] = 1'b0;
    end
  end

  for (genvar k = 1; k < int'(LEAVES); k++) begin : g_cell
    assign f[k] = (f[2*k] & f[2*k+1]) | (g[2*k] & g[2*k+1]);
    assign g[k] = (f[2*k] & g[2*k+1]) | (g[2*k] & f[2*k+1]);
  end

  assign rail = {f[1], g[1]};
endmodule
