// bka_adder16: 16-bit Brent-Kung parallel prefix adder.
//
// Three stages: ppa_pg_gen forms the bit propagate/generate (carry in folded
// into bit 0), a Brent-Kung prefix tree forms every carry G[i:0], and
// ppa_sum_gen forms the sum bits and the carry out.
//
// The tree has 12 black and 15 gray cells in 6 levels (2*log2(16)-2):
//   level 1: black 15:14 13:12 11:10 9:8 7:6 5:4 3:2,  gray 1:0
//   level 2: black 15:12 11:8 7:4,                     gray 3:0
//   level 3: black 15:8 11:4,                          gray 7:0
//   level 4: gray 15:0 11:0
//   level 5: gray 13:0 9:0 5:0
//   level 6: gray 14:0 12:0 10:0 8:0 6:0 4:0 2:0
// Levels 1-3 build power-of-two groups upward; levels 4-6 distribute the
// carries back to the columns in between. The cell positions follow the
// 16-bit Brent-Kung tree this design is built from; the extra black cell 11:4
// at level 3 lets carry 11 finish together with carry 15 at level 4.
// Combinational; no clock.
module bka_adder16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] sum,
  output logic        cout
);

  logic [15:0] p, g;
  logic [15:0] c;  // c[i] = G[i:0], the carry out of bit i

  // Intermediate group signals, named by span: gX_Y = G[X:Y], pX_Y = P[X:Y].
  logic g15_14, p15_14, g13_12, p13_12, g11_10, p11_10, g9_8, p9_8;
  logic g7_6, p7_6, g5_4, p5_4, g3_2, p3_2;
  logic g15_12, p15_12, g11_8, p11_8, g7_4, p7_4;
  logic g15_8, p15_8, g11_4, p11_4;

  ppa_pg_gen #(.WIDTH(16)) u_pre (
    .a(a), .b(b), .cin(cin), .p(p), .g(g)
  );

  // Level 1
  black_cell u_l1_15 (.g_ik(g[15]), .p_ik(p[15]), .g_kj(g[14]), .p_kj(p[14]), .g_ij(g15_14), .p_ij(p15_14));
  black_cell u_l1_13 (.g_ik(g[13]), .p_ik(p[13]), .g_kj(g[12]), .p_kj(p[12]), .g_ij(g13_12), .p_ij(p13_12));
  black_cell u_l1_11 (.g_ik(g[11]), .p_ik(p[11]), .g_kj(g[10]), .p_kj(p[10]), .g_ij(g11_10), .p_ij(p11_10));
  black_cell u_l1_9  (.g_ik(g[9]),  .p_ik(p[9]),  .g_kj(g[8]),  .p_kj(p[8]),  .g_ij(g9_8),   .p_ij(p9_8));
  black_cell u_l1_7  (.g_ik(g[7]),  .p_ik(p[7]),  .g_kj(g[6]),  .p_kj(p[6]),  .g_ij(g7_6),   .p_ij(p7_6));
  black_cell u_l1_5  (.g_ik(g[5]),  .p_ik(p[5]),  .g_kj(g[4]),  .p_kj(p[4]),  .g_ij(g5_4),   .p_ij(p5_4));
  black_cell u_l1_3  (.g_ik(g[3]),  .p_ik(p[3]),  .g_kj(g[2]),  .p_kj(p[2]),  .g_ij(g3_2),   .p_ij(p3_2));
  gray_cell  u_l1_1  (.g_ik(g[1]),  .p_ik(p[1]),  .g_kj(g[0]),  .g_ij(c[1]));

  // Level 2
  black_cell u_l2_15 (.g_ik(g15_14), .p_ik(p15_14), .g_kj(g13_12), .p_kj(p13_12), .g_ij(g15_12), .p_ij(p15_12));
  black_cell u_l2_11 (.g_ik(g11_10), .p_ik(p11_10), .g_kj(g9_8),   .p_kj(p9_8),   .g_ij(g11_8),  .p_ij(p11_8));
  black_cell u_l2_7  (.g_ik(g7_6),   .p_ik(p7_6),   .g_kj(g5_4),   .p_kj(p5_4),   .g_ij(g7_4),   .p_ij(p7_4));
  gray_cell  u_l2_3  (.g_ik(g3_2),   .p_ik(p3_2),   .g_kj(c[1]),   .g_ij(c[3]));

  // Level 3
  black_cell u_l3_15 (.g_ik(g15_12), .p_ik(p15_12), .g_kj(g11_8), .p_kj(p11_8), .g_ij(g15_8), .p_ij(p15_8));
  black_cell u_l3_11 (.g_ik(g11_8),  .p_ik(p11_8),  .g_kj(g7_4),  .p_kj(p7_4),  .g_ij(g11_4), .p_ij(p11_4));
  gray_cell  u_l3_7  (.g_ik(g7_4),   .p_ik(p7_4),   .g_kj(c[3]),  .g_ij(c[7]));

  // Level 4
  gray_cell  u_l4_15 (.g_ik(g15_8), .p_ik(p15_8), .g_kj(c[7]), .g_ij(c[15]));
  gray_cell  u_l4_11 (.g_ik(g11_4), .p_ik(p11_4), .g_kj(c[3]), .g_ij(c[11]));

  // Level 5
  gray_cell  u_l5_13 (.g_ik(g13_12), .p_ik(p13_12), .g_kj(c[11]), .g_ij(c[13]));
  gray_cell  u_l5_9  (.g_ik(g9_8),   .p_ik(p9_8),   .g_kj(c[7]),  .g_ij(c[9]));
  gray_cell  u_l5_5  (.g_ik(g5_4),   .p_ik(p5_4),   .g_kj(c[3]),  .g_ij(c[5]));

  // Level 6
  gray_cell  u_l6_14 (.g_ik(g[14]), .p_ik(p[14]), .g_kj(c[13]), .g_ij(c[14]));
  gray_cell  u_l6_12 (.g_ik(g[12]), .p_ik(p[12]), .g_kj(c[11]), .g_ij(c[12]));
  gray_cell  u_l6_10 (.g_ik(g[10]), .p_ik(p[10]), .g_kj(c[9]),  .g_ij(c[10]));
  gray_cell  u_l6_8  (.g_ik(g[8]),  .p_ik(p[8]),  .g_kj(c[7]),  .g_ij(c[8]));
  gray_cell  u_l6_6  (.g_ik(g[6]),  .p_ik(p[6]),  .g_kj(c[5]),  .g_ij(c[6]));
  gray_cell  u_l6_4  (.g_ik(g[4]),  .p_ik(p[4]),  .g_kj(c[3]),  .g_ij(c[4]));
  gray_cell  u_l6_2  (.g_ik(g[2]),  .p_ik(p[2]),  .g_kj(c[1]),  .g_ij(c[2]));

  assign c[0] = g[0];

  ppa_sum_gen #(.WIDTH(16)) u_post (
    .p(p), .c(c), .cin(cin), .sum(sum), .cout(cout)
  );

endmodule
