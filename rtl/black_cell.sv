// Black cell of a parallel prefix tree.
//
// Combines the pair of a higher span (hi = G_{i:k}, P_{i:k}) with the pair of
// the adjacent lower span (lo = G_{k-1:j}, P_{k-1:j}) into the pair of the
// whole span i..j:
//   G_{i:j} = G_{i:k} | (P_{i:k} & G_{k-1:j})
//   P_{i:j} = P_{i:k} & P_{k-1:j}
// Used where the resulting span does not yet reach bit 0, so its propagate is
// still needed further down the tree. Combinational: one AND-OR and one AND.
module black_cell
  import toa_pkg::*;
(
  input  pg_t hi,
  input  pg_t lo,
  output pg_t o
);

  always_comb begin
    o.g = hi.g | (hi.p & lo.g);
    o.p = hi.p & lo.p;
  end

endmodule
