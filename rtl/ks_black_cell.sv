// ks_black_cell: the full prefix operator of the Kogge-Stone carry tree.
//
// It merges an upper group i:k with the adjacent lower group k-1:j into
// the group i:j:
//   P[i:j] = P[i:k] & P[k-1:j]
//   G[i:j] = G[i:k] | (P[i:k] & G[k-1:j])
// i.e. two AND gates and one OR gate. The black cell is used wherever the
// merged group does not yet reach bit 0, so that its propagate is still
// needed by a later level of the tree.
//
// The equations are the standard ones of the original description.
//
// Interface: hi = (P,G) of the upper group, lo = (P,G) of the lower group,
// y = (P,G) of the merged group. Purely combinational.
module ks_black_cell
  import ks_pkg::*;
(
  input  pg_t hi,
  input  pg_t lo,
  output pg_t y
);

  always_comb begin
    y.p = hi.p & lo.p;
    y.g = hi.g | (hi.p & lo.g);
  end

endmodule
