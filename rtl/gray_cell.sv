// Gray cell of a parallel prefix tree.
//
// Like the black cell but computes only the group generate:
//   G_{i:0} = G_{i:k} | (P_{i:k} & G_{k-1:0})
// It is placed where the combined span reaches bit 0, so the result is the
// carry into bit i+1 and no group propagate is ever needed from it. This is
// what makes it smaller than a black cell. Combinational: one AND-OR.
//
// Interface: hi is the pair of the upper span; g_lo is the generate of the
// lower span (already a carry); g is the carry out of the combined span.
module gray_cell
  import toa_pkg::*;
(
  input  pg_t  hi,
  input  logic g_lo,
  output logic g
);

  always_comb g = hi.g | (hi.p & g_lo);

endmodule
