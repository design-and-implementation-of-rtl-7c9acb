// cla4: 4-bit carry look-ahead adder block.
//
// Bit propagate P_i = A_i xor B_i and generate G_i = A_i and B_i. The carries
// into bits 1..3 are formed in two logic levels straight from P, G and the
// carry in C0, e.g. C2 = G1 + P1 G0 + P1 P0 C0, and S_i = P_i xor C_i.
// Instead of its own carry out the block reports the group propagate
// P3P2P1P0 and group generate G3 + P3G2 + P3P2G1 + P3P2P1G0, from which the
// look-ahead carry unit forms the carries between blocks. The equations and
// the block's S/p/g outputs follow the 4-bit look-ahead block of the
// 16-bit adder this design implements. Combinational.
module cla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] sum,
  output logic       grp_p,
  output logic       grp_g
);

  logic [3:0] p, g;
  logic [3:0] c;  // c[i] = carry into bit i

  assign p = a ^ b;
  assign g = a & b;

  assign c[0] = cin;
  assign c[1] = g[0] | (p[0] & cin);
  assign c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
  assign c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);

  assign sum   = p ^ c;
  assign grp_p = &p;
  assign grp_g = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);

endmodule
