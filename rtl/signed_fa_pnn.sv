// Signed full adder with one positive input p and two negative inputs n1, n2
// (the sign bits of two's complement operands):
//   p - n1 - n2 = -s + 2*(cp - cn)
// The sum s is negatively weighted; the carry is a signed digit in {-1,0,1},
// given as the two bits cp (+1) and cn (-1), which are never both set.
module signed_fa_pnn (
  input  logic p,
  input  logic n1,
  input  logic n2,
  output logic s,
  output logic cp,
  output logic cn
);
  assign s  = p ^ n1 ^ n2;
  assign cp = p & ~n1 & ~n2;
  assign cn = ~p & n1 & n2;
endmodule
