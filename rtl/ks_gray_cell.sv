// ks_gray_cell: the reduced prefix operator of the Kogge-Stone carry tree.
//
// It computes only the group generate of the merged group i:j:
//   G[i:j] = G[i:k] | (P[i:k] & G[k-1:j])
// one AND gate and one OR gate. It is used where the merged group reaches
// bit 0 (or the carry-in): its generate is then the final carry of bit i
// and no later level needs its propagate.
//
// The equation is the standard one of the original description.
//
// Interface: hi = (P,G) of the upper group i:k, g_lo = G of the lower group
// k-1:j, g = G[i:j]. Purely combinational.
module ks_gray_cell
  import ks_pkg::*;
(
  input  pg_t  hi,
  input  logic g_lo,
  output logic g
);

  always_comb g = hi.g | (hi.p & g_lo);

endmodule
