// gray_cell: reduced prefix operator that forms only the group generate.
//
//   G[i:j] = G[i:k] | (P[i:k] & G[k-1:j])
// Used where the group reaches bit 0: G[i:0] is then the carry out of bit i
// and no later cell needs P[i:0]. Combinational.
module gray_cell (
  input  logic g_ik,
  input  logic p_ik,
  input  logic g_kj,
  output logic g_ij
);

  assign g_ij = g_ik | (p_ik & g_kj);

endmodule
