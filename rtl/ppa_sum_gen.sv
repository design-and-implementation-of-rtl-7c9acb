// ppa_sum_gen: post-processing stage of the parallel prefix adders.
//
// Inputs are the bit propagates p and the prefix tree's carries c, where
// c[i] = G[i:0] is the carry out of bit i (carry in already included).
// sum[i] = p[i] xor c[i-1], sum[0] = p[0] xor cin, cout = c[WIDTH-1].
// Combinational.
module ppa_sum_gen #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH-1:0] c,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  assign sum  = p ^ {c[WIDTH-2:0], cin};
  assign cout = c[WIDTH-1];

endmodule
