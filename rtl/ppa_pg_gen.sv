// ppa_pg_gen: pre-processing stage of the parallel prefix adders.
//
// Forms the bit propagate p[i] = a[i] xor b[i] and generate g[i] = a[i] and
// b[i]. The carry in is folded into bit 0, g[0] = a[0]b[0] | (a[0]^b[0])cin,
// so that the prefix tree that follows needs no column for it and its group
// generate G[i:0] is directly the carry out of bit i. That folding is this
// design's choice; the P/G equations are the standard ones. Combinational.
module ppa_pg_gen #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] p,
  output logic [WIDTH-1:0] g
);

  logic [WIDTH-1:0] g_raw;

  assign p     = a ^ b;
  assign g_raw = a & b;
  assign g     = {g_raw[WIDTH-1:1], g_raw[0] | (p[0] & cin)};

endmodule
