// black_cell: prefix operator of the parallel prefix adders.
//
// Combines the group (generate, propagate) of bits i..k with that of bits
// k-1..j into the group of bits i..j:
//   G[i:j] = G[i:k] | (P[i:k] & G[k-1:j])
//   P[i:j] = P[i:k] & P[k-1:j]
// Used wherever a later level still needs the group propagate. Combinational.
module black_cell (
  input  logic g_ik,
  input  logic p_ik,
  input  logic g_kj,
  input  logic p_kj,
  output logic g_ij,
  output logic p_ij
);

  assign g_ij = g_ik | (p_ik & g_kj);
  assign p_ij = p_ik & p_kj;

endmodule
