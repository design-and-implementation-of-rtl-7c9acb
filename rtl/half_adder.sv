// half_adder: one-bit half adder.
//
// sum = a xor b, carry = a and b. Used by the Wallace reduction tree in the
// columns where only two bits remain to be added. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  assign sum   = a ^ b;
  assign carry = a & b;

endmodule
