// 4:2 compressor: x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout).
//
// Built from XOR gates and two 2:1 multiplexers instead of two chained full
// adders, so the longest path is three XOR delays rather than four:
//   cout  = (x1 ^ x2) ? x3 : x1
//   sum   = x1 ^ x2 ^ x3 ^ x4 ^ cin
//   carry = (x1 ^ x2 ^ x3 ^ x4) ? cin : x4
// cout does not depend on cin, so in a row of compressors the cout -> cin
// link between neighbouring bits never ripples.
//
// Interface: combinational, one bit. The three-XOR-delay multiplexer form
// follows the operator's published description; the exact equations are the standard ones for it.
module compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic x12, x1234;

  assign x12   = x1 ^ x2;
  assign x1234 = x12 ^ x3 ^ x4;
  assign cout  = x12 ? x3 : x1;
  assign sum   = x1234 ^ cin;
  assign carry = x1234 ? cin : x4;
endmodule
