// Signed half adder with two positively weighted inputs, a negatively
// weighted sum and a positively weighted carry: a + b = 2*c - s.
// The sum keeps the weight of its inputs with a minus sign, so that bit can
// become the negatively weighted top bit of a modified Booth digit.
module signed_ha_pp (
  input  logic a,
  input  logic b,
  output logic s,   // weight -1 (relative to a and b)
  output logic c    // weight +2
);
  assign s = a ^ b;
  assign c = a | b;
endmodule
