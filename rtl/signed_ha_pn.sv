// Signed half adder with one positive input p and one negative input n:
// p - n = 2*c - s, with a negatively weighted sum s and a positive carry c.
module signed_ha_pn (
  input  logic p,   // weight +1
  input  logic n,   // weight -1
  output logic s,   // weight -1
  output logic c    // weight +2
);
  assign s = p ^ n;
  assign c = p & ~n;
endmodule
