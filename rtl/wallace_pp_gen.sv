// wallace_pp_gen: partial product generation of the Wallace tree multiplier.
//
// One AND gate per pair of multiplicand and multiplier bits. Row i of pp is
// a AND b[i], placed at bits i+N-1..i of a 2N-bit row (the shift by i is pure
// wiring); the other bits of the row are zero. Combinational.
module wallace_pp_gen #(
  parameter int N = 8
) (
  input  logic [N-1:0]            a,
  input  logic [N-1:0]            b,
  output logic [N-1:0][2*N-1:0]   pp
);

  for (genvar i = 0; i < N; i++) begin : g_row
    logic [N-1:0] bits;
    assign bits  = a & {N{b[i]}};
    assign pp[i] = (2*N)'(bits) << i;
  end

endmodule
