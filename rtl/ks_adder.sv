// ks_adder: WIDTH-bit Kogge-Stone adder (32 bits by default).
//
// sum/cout = a + b + cin, computed in three combinational stages:
//   1. ks_preprocess    : bit propagate p_i = a_i ^ b_i, generate g_i = a_i & b_i
//   2. ks_carry_network : Kogge-Stone prefix tree of black and gray cells,
//                         ceil(log2(WIDTH)) levels, giving every carry C_i
//   3. ks_postprocess   : s_i = p_i ^ C_(i-1) (C_(-1) = cin), cout = C_(WIDTH-1)
// The critical path is one XOR/AND level, one gray cell for the carry-in,
// LEVELS prefix cells and one XOR, so delay grows with log2(WIDTH) instead
// of WIDTH as in a ripple-carry adder.
//
// The carry-in and carry-out ports are this design's choice of interface;
// the widths 2, 4, 8 and 16 are the smaller configurations of the same tree.
// There is no clock: the result settles one combinational delay after the
// inputs change.
module ks_adder
  import ks_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  pg_t  [WIDTH-1:0] pg;
  logic [WIDTH-1:0] p;
  logic [WIDTH-1:0] c;

  ks_preprocess #(.WIDTH(WIDTH)) u_pre (.a(a), .b(b), .pg(pg));

  ks_carry_network #(.WIDTH(WIDTH)) u_net (.pg(pg), .cin(cin), .c(c));

  always_comb begin
    for (int i = 0; i < WIDTH; i++) p[i] = pg[i].p;
  end

  ks_postprocess #(.WIDTH(WIDTH)) u_post (.p(p), .c(c), .cin(cin), .sum(sum), .cout(cout));

endmodule
