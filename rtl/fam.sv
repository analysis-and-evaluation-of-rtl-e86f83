// Fused add-multiply (FAM) operator: z = x * (a + b + cin), all operands
// N-bit two's complement, z exact in 2N+1 bits.
//
// Instead of an adder followed by a Booth multiplier, the sum a + b + cin is
// recoded straight into modified Booth digits by the S-MB recoder, so the
// only carry-propagate adder is the final one:
//   smb_recoder   a, b, cin -> NE/2+1 MB digits (no carry chain)
//   mb_pp_gen     digit * x partial product rows, inverted sign bits
//   mb_correction sign-extension constant + negation bits, one extra row
//   csa_tree      4:2 compressor tree, NE/2+2 rows -> 2 rows
//   cla_adder     carry-lookahead final addition
// cin = 1 with b inverted gives x * (a - b), which the FFT butterfly uses.
// SIGNED selects two's complement (1, default) or unsigned (0) operands; z is
// then read as a signed or an unsigned 2N+1-bit number.
//
// Interface: purely combinational, no clock. The structure follows the
// block diagram in the operator's published description; the widths and the row format are this design's.
module fam
  import fam_pkg::*;
#(
  parameter int N      = 16,
  parameter bit SIGNED = 1'b1
) (
  input  logic [N-1:0]  x,
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  input  logic          cin,
  output logic [2*N:0]  z
);
  localparam int D  = num_digits(N);
  localparam int PW = pp_width(N);

  mb_digit_t [D-1:0] digits;
  logic [PW-1:0]     pp [D];
  logic [PW-1:0]     rows [D+1];
  logic [D-1:0]      neg;
  logic [PW-1:0]     corr, sum_row, carry_row, total;
  logic              unused_cout;

  smb_recoder #(.N(N), .SIGNED(SIGNED)) u_recoder (
    .a(a), .b(b), .cin(cin), .y(digits)
  );

  mb_pp_gen #(.N(N), .SIGNED(SIGNED)) u_ppgen (
    .x(x), .y(digits), .rows(pp), .neg(neg)
  );

  mb_correction #(.N(N)) u_corr (
    .neg(neg), .row(corr)
  );

  for (genvar j = 0; j < D; j++) begin : g_rows
    assign rows[j] = pp[j];
  end
  assign rows[D] = corr;

  csa_tree #(.ROWS(D + 1), .W(PW)) u_tree (
    .rows(rows), .sum_row(sum_row), .carry_row(carry_row)
  );

  cla_adder #(.W(PW)) u_cla (
    .a(sum_row), .b(carry_row), .cin(1'b0), .s(total), .cout(unused_cout)
  );

  assign z = total[2*N:0];
endmodule
