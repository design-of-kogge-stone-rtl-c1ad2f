// ks_pkg: types and helpers shared by the Kogge-Stone adder modules.
//
// A prefix adder carries, for every bit position and for every group of
// bits, a pair of signals: the group propagate P (a carry entering the group
// leaves it) and the group generate G (the group makes a carry by itself).
// pg_t bundles that pair so the cells and the network pass one value per
// position instead of two parallel vectors.
//
// ks_levels(width) gives the depth of a Kogge-Stone tree: ceil(log2(width))
// levels of prefix cells (4 for 16 bits, 5 for 32 bits).
package ks_pkg;

  typedef struct packed {
    logic p;  // propagate
    logic g;  // generate
  } pg_t;

  function automatic int unsigned ks_levels(input int unsigned width);
    int unsigned n;
    n = 0;
    while ((1 << n) < width) n++;
    return n;
  endfunction

endpackage
