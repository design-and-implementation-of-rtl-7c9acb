// ksa_adder: Kogge-Stone parallel prefix adder.
//
// Three stages: ppa_pg_gen forms the bit propagate/generate (carry in folded
// into bit 0), a Kogge-Stone prefix tree forms every carry G[i:0], and
// ppa_sum_gen forms the sum bits and the carry out.
//
// The tree has LEVELS = clog2(WIDTH) levels. At level l (distance d = 2^(l-1))
// every column i >= d combines its group with the group of column i-d. A cell
// whose result reaches bit 0 (i < 2d) only needs the generate and is a gray
// cell; the others are black cells. Columns i < d pass through. For the
// 16-bit default this gives 34 black and 15 gray cells, n*log2(n)-n+1 = 49
// nodes, and a logic depth of log2(n) cells, the structure of the 16-bit
// Kogge-Stone adder this design follows. WIDTH may be any value >= 2.
// Combinational; no clock.
module ksa_adder #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int LEVELS = $clog2(WIDTH);

  logic [WIDTH-1:0] p, g;
  // Group generate/propagate of each column after each level.
  logic [WIDTH-1:0] gl [LEVELS+1];
  logic [WIDTH-1:0] pl [LEVELS+1];

  ppa_pg_gen #(.WIDTH(WIDTH)) u_pre (
    .a(a), .b(b), .cin(cin), .p(p), .g(g)
  );

  assign gl[0] = g;
  assign pl[0] = p;

  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    localparam int D = 1 << (l - 1);
    for (genvar i = 0; i < WIDTH; i++) begin : g_col
      if (i < D) begin : g_pass
        assign gl[l][i] = gl[l-1][i];
        assign pl[l][i] = pl[l-1][i];
      end else if (i < 2 * D) begin : g_gray
        gray_cell u_gray (
          .g_ik(gl[l-1][i]), .p_ik(pl[l-1][i]), .g_kj(gl[l-1][i-D]),
          .g_ij(gl[l][i])
        );
        // Span now reaches bit 0; the propagate is never read again.
        assign pl[l][i] = pl[l-1][i];
      end else begin : g_black
        black_cell u_black (
          .g_ik(gl[l-1][i]), .p_ik(pl[l-1][i]),
          .g_kj(gl[l-1][i-D]), .p_kj(pl[l-1][i-D]),
          .g_ij(gl[l][i]), .p_ij(pl[l][i])
        );
      end
    end
  end

  ppa_sum_gen #(.WIDTH(WIDTH)) u_post (
    .p(p), .c(gl[LEVELS]), .cin(cin), .sum(sum), .cout(cout)
  );

endmodule
