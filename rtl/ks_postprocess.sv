// ks_postprocess: post-processing stage of the parallel-prefix adder.
//
// With c[i] the carry out of bit i (delivered by the carry network, carry-in
// already included), the sum and carry out are
//   s_0 = p_0 ^ cin
//   s_i = p_i ^ c[i-1]      for i > 0
//   cout = c[WIDTH-1]
// one XOR per bit.
//
// The sum equation follows the original description; taking cin as the
// carry into bit 0 is this design's reading of it.
//
// Interface: p = bit propagates from pre-processing, c = carries from the
// carry network, cin = adder carry-in; sum and cout are the adder outputs.
// Purely combinational.
module ks_postprocess #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH-1:0] c,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  // carry into each bit: cin for bit 0, the carry out of bit i-1 above it
  logic [WIDTH:0] c_into;

  always_comb begin
    c_into = {c, cin};
    sum    = p ^ c_into[WIDTH-1:0];
    cout   = c_into[WIDTH];
  end

endmodule
