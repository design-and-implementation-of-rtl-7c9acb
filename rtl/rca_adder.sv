// rca_adder: ripple-carry adder built from full adders.
//
// Bit i's full adder takes the carry out of bit i-1, so the carry ripples
// through all WIDTH stages. It is the slowest of the final-adder choices of
// the Wallace tree multiplier and is kept as its plain full-adder reference.
// Combinational.
module rca_adder #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end

  assign cout = c[WIDTH];

endmodule
