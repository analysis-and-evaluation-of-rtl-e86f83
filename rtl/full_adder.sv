// Conventional full adder: a + b + ci = s + 2*co, all bits positively
// weighted. Used by the S-MB recoder on the even bit positions.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (ci & (a ^ b));
endmodule
