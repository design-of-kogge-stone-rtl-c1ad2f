// ks_preprocess: pre-processing stage of the parallel-prefix adder.
//
// For every bit position i it forms the bit propagate and bit generate
//   p_i = a_i ^ b_i
//   g_i = a_i & b_i
// which are the inputs of the carry network (the p_i are also reused by the
// post-processing stage for the sum).
//
// The equations follow the original description; bundling (p, g) in the
// ks_pkg::pg_t struct is this design's choice.
//
// Interface: a, b are the WIDTH-bit operands; pg[i] holds (p_i, g_i).
// Purely combinational, one gate level.
module ks_preprocess
  import ks_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output pg_t  [WIDTH-1:0] pg
);

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      pg[i].p = a[i] ^ b[i];
      pg[i].g = a[i] & b[i];
    end
  end

endmodule
