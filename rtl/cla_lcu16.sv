// cla_lcu16: look-ahead carry unit of the 16-bit carry look-ahead adder.
//
// Takes the group propagate p[k] and generate g[k] of the four 4-bit blocks
// (k = 0 for bits 3:0 ... k = 3 for bits 15:12) and the carry in c0, and forms
// the carries into blocks 1..3 (c4, c8, c12, returned as c[0..2]) and the
// carry out c16 with the same two-level look-ahead equations a 4-bit block
// uses for its bits, one level up. pg and gg are the propagate and generate of
// the whole 16-bit word, for a further look-ahead level. Its pins follow the
// block diagram of the 16-bit look-ahead adder; its insides, the 4-bit
// equations reused one level up, are this design's choice. Combinational.
module cla_lcu16 (
  input  logic [3:0] p,
  input  logic [3:0] g,
  input  logic       c0,
  output logic [2:0] c,    // c[0] = c4, c[1] = c8, c[2] = c12
  output logic       c16,
  output logic       pg,
  output logic       gg
);

  assign c[0] = g[0] | (p[0] & c0);
  assign c[1] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & c0);
  assign c[2] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & c0);

  assign pg  = &p;
  assign gg  = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
  assign c16 = gg | (pg & c0);

endmodule
