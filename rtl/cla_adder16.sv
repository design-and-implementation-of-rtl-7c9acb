// cla_adder16: 16-bit carry look-ahead adder.
//
// Four cla4 blocks add bits 3:0, 7:4, 11:8 and 15:12. Each reports its group
// propagate/generate to the look-ahead carry unit cla_lcu16, which returns
// the carry into each block (c4, c8, c12) and forms the carry out C16. No
// carry ripples between blocks: every carry is two look-ahead levels from the
// inputs. grp_p/grp_g are the whole word's propagate (PG) and generate (GG);
// bringing them out as ports, so that adders can be cascaded, is this design's
// choice. The block structure follows the 16-bit look-ahead adder it implements.
// Combinational; no clock.
module cla_adder16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] sum,
  output logic        cout,
  output logic        grp_p,
  output logic        grp_g
);

  logic [3:0] bp, bg;   // group propagate/generate of each 4-bit block
  logic [3:0] bc;       // carry into each block

  assign bc[0] = cin;

  for (genvar k = 0; k < 4; k++) begin : g_blk
    cla4 u_cla4 (
      .a(a[4*k +: 4]), .b(b[4*k +: 4]), .cin(bc[k]),
      .sum(sum[4*k +: 4]), .grp_p(bp[k]), .grp_g(bg[k])
    );
  end

  cla_lcu16 u_lcu (
    .p(bp), .g(bg), .c0(cin), .c(bc[3:1]), .c16(cout), .pg(grp_p), .gg(grp_g)
  );

endmodule
