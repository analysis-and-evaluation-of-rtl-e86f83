// A row of W 4:2 compressors reducing four W-bit words to two, modulo 2^W:
//   x1 + x2 + x3 + x4 == s + c  (mod 2^W)
// The cout of bit i feeds the cin of bit i+1; the carry output of bit i is
// placed at bit i+1 of c. Carries out of bit W-1 are dropped.
module compressor_4_2_row #(
  parameter int W = 34
) (
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  input  logic [W-1:0] x3,
  input  logic [W-1:0] x4,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W:0]   chain;
  logic [W-1:0] carry;

  assign chain[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_bit
    compressor_4_2 u_c42 (
      .x1(x1[i]), .x2(x2[i]), .x3(x3[i]), .x4(x4[i]),
      .cin(chain[i]), .sum(s[i]), .carry(carry[i]), .cout(chain[i+1])
    );
  end

  assign c = {carry[W-2:0], 1'b0};
endmodule
