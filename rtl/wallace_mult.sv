// wallace_mult: unsigned N x N Wallace tree multiplier, 2N-bit product.
//
// Three steps: wallace_pp_gen forms the N partial-product rows with AND
// gates, wallace_reduce compresses them with full and half adders to two rows
// in log-depth carry-save stages (8 -> 6 -> 4 -> 3 -> 2 for N = 8), and a
// 2N-bit adder adds the two rows. FINAL_ADDER selects that adder: a ripple of
// full adders, the carry look-ahead adder, or the Kogge-Stone or Brent-Kung
// parallel prefix adder. CLA and BKA exist only at 16 bits, so they need
// N = 8. The default N = 8 (a 16-bit product) follows the multiplier this
// design is built from; the default Kogge-Stone final adder is this design's
// choice, as the fastest of the three prefix adders. Operands are unsigned.
// Purely combinational: the product follows the inputs after the
// propagation delay, with no clock and no latency in cycles.
module wallace_mult
  import arith_pkg::*;
#(
  parameter int          N           = 8,
  parameter adder_kind_e FINAL_ADDER = ADD_KSA
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] pr
);

  localparam int W = 2 * N;

  logic [N-1:0][W-1:0] pp;
  logic [W-1:0]        row_s, row_c;
  logic                carry_unused;  // always 0: the product fits in 2N bits

  wallace_pp_gen #(.N(N)) u_pp (.a(a), .b(b), .pp(pp));

  wallace_reduce #(.N(N)) u_tree (.pp(pp), .row_s(row_s), .row_c(row_c));

  if (FINAL_ADDER == ADD_RIPPLE) begin : g_rca
    rca_adder #(.WIDTH(W)) u_add (
      .a(row_s), .b(row_c), .cin(1'b0), .sum(pr), .cout(carry_unused)
    );
  end else if (FINAL_ADDER == ADD_KSA) begin : g_ksa
    ksa_adder #(.WIDTH(W)) u_add (
      .a(row_s), .b(row_c), .cin(1'b0), .sum(pr), .cout(carry_unused)
    );
  end else if (W != 16) begin : g_bad_width
    $error("wallace_mult: the CLA and BKA final adders need N = 8");
  end else if (FINAL_ADDER == ADD_CLA) begin : g_cla
    logic pg_unused, gg_unused;
    cla_adder16 u_add (
      .a(row_s), .b(row_c), .cin(1'b0), .sum(pr), .cout(carry_unused),
      .grp_p(pg_unused), .grp_g(gg_unused)
    );
  end else begin : g_bka
    bka_adder16 u_add (
      .a(row_s), .b(row_c), .cin(1'b0), .sum(pr), .cout(carry_unused)
    );
  end

endmodule
