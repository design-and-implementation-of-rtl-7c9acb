// full_adder: one-bit full adder written in propagate/generate form.
//
// The bit propagate p = a xor b and generate g = a and b give
// sum = p xor cin and cout = g or (p and cin), the same expressions the
// carry look-ahead and prefix adders start from. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic p, g;

  assign p    = a ^ b;
  assign g    = a & b;
  assign sum  = p ^ cin;
  assign cout = g | (p & cin);

endmodule
