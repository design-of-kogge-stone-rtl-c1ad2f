// ks_carry_network: Kogge-Stone parallel-prefix carry tree.
//
// Given the bit propagates/generates (p_i, g_i) and the carry-in, it
// computes the carry out of every bit position in ceil(log2(WIDTH)) levels
// of prefix cells, all positions in parallel.
//
// Structure. Level l (l = 1..LEVELS) works at distance D = 2^(l-1): every
// position i >= D merges its current group with the group that ends just
// below it, at position i-D, so each group doubles in span per level.
//   * i <  D      : the group already reaches bit 0, the signal passes down
//                   unchanged (a plain wire here; a buffer in a layout).
//   * D <= i < 2D : the merged group reaches bit 0, so only its generate is
//                   needed: gray cell.
//   * i >= 2D     : the merged group is still incomplete: black cell
//                   (propagate and generate).
// For 16 bits this gives 15+14+12+8 cells on four levels, of which
// 1+2+4+8 are gray. Every position has fan-out of at most two per level and
// wiring runs at a fixed distance on each level.
//
// Carry-in. The carry-in is treated as an extra group below bit 0 with
// generate = cin and propagate = 0. One gray cell ahead of the tree merges
// it into position 0 (G[0:-1] = g_0 | p_0 & cin). From then on each group
// that reaches bit 0 includes the carry-in, so the tree's final generates
// are the carries C_i = G[i:0] | (P[i:0] & cin) without needing P[i:0].
// Groups that reach the carry-in have propagate 0, which is what their
// propagate field is set to.
//
// The tree shape and the black/gray cell placement are those of the
// original Kogge-Stone description; folding the carry-in in through an
// extra gray cell, and using wires where a layout would place buffers, are
// this design's choices.
//
// Interface: pg[i] = (p_i, g_i) from pre-processing, cin = carry-in,
// c[i] = carry out of bit i. Purely combinational; depth is one gray cell
// plus LEVELS prefix cells.
module ks_carry_network
  import ks_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  pg_t  [WIDTH-1:0] pg,
  input  logic             cin,
  output logic [WIDTH-1:0] c
);

  localparam int unsigned LEVELS = ks_levels(WIDTH);

  // stage[l][i]: (P,G) of the group ending at bit i after level l
  pg_t [WIDTH-1:0] stage [LEVELS+1];

  // level 0: the bit signals, with the carry-in merged into position 0
  logic g0_cin;
  ks_gray_cell u_cin_cell (.hi(pg[0]), .g_lo(cin), .g(g0_cin));
  assign stage[0][0] = '{p: 1'b0, g: g0_cin};
  for (genvar i = 1; i < WIDTH; i++) begin : g_in
    assign stage[0][i] = pg[i];
  end

  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    localparam int unsigned D = 1 << (l - 1);
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      if (i < D) begin : g_pass
        assign stage[l][i] = stage[l-1][i];
      end else if (i < 2 * D) begin : g_gray
        logic g;
        ks_gray_cell u_cell (.hi(stage[l-1][i]), .g_lo(stage[l-1][i-D].g), .g(g));
        assign stage[l][i] = '{p: 1'b0, g: g};
      end else begin : g_black
        ks_black_cell u_cell (.hi(stage[l-1][i]), .lo(stage[l-1][i-D]), .y(stage[l][i]));
      end
    end
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_out
    assign c[i] = stage[LEVELS][i].g;
  end

endmodule
