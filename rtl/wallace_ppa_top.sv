// wallace_ppa_top: the Wallace tree multiplier and the three 16-bit adders
// side by side.
//
// The four arithmetic units of this design are independent; each has its own
// ports, prefixed mul_, cla_, ksa_ and bka_:
//   - an unsigned 8 x 8 Wallace tree multiplier with a 16-bit product whose
//     final addition uses the adder selected by MUL_FINAL_ADDER,
//   - the 16-bit carry look-ahead adder (also bringing out the word's group
//     propagate and generate),
//   - the 16-bit Kogge-Stone parallel prefix adder,
//   - the 16-bit Brent-Kung parallel prefix adder.
// Placing the four units side by side in one top is this design's choice:
// they are four separately evaluated circuits, not one datapath.
// Everything is combinational: outputs follow the inputs after the
// propagation delay. There is no clock or reset.
module wallace_ppa_top
  import arith_pkg::*;
#(
  parameter adder_kind_e MUL_FINAL_ADDER = ADD_KSA
) (
  input  logic [7:0]  mul_a,
  input  logic [7:0]  mul_b,
  output logic [15:0] mul_pr,

  input  logic [15:0] cla_a,
  input  logic [15:0] cla_b,
  input  logic        cla_cin,
  output logic [15:0] cla_sum,
  output logic        cla_cout,
  output logic        cla_pg,
  output logic        cla_gg,

  input  logic [15:0] ksa_a,
  input  logic [15:0] ksa_b,
  input  logic        ksa_cin,
  output logic [15:0] ksa_sum,
  output logic        ksa_cout,

  input  logic [15:0] bka_a,
  input  logic [15:0] bka_b,
  input  logic        bka_cin,
  output logic [15:0] bka_sum,
  output logic        bka_cout
);

  wallace_mult #(.N(8), .FINAL_ADDER(MUL_FINAL_ADDER)) u_mult (
    .a(mul_a), .b(mul_b), .pr(mul_pr)
  );

  cla_adder16 u_cla (
    .a(cla_a), .b(cla_b), .cin(cla_cin), .sum(cla_sum), .cout(cla_cout),
    .grp_p(cla_pg), .grp_g(cla_gg)
  );

  ksa_adder #(.WIDTH(16)) u_ksa (
    .a(ksa_a), .b(ksa_b), .cin(ksa_cin), .sum(ksa_sum), .cout(ksa_cout)
  );

  bka_adder16 u_bka (
    .a(bka_a), .b(bka_b), .cin(bka_cin), .sum(bka_sum), .cout(bka_cout)
  );

endmodule
