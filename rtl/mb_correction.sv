// Correction term of the modified Booth partial products: one extra row for
// the compressor tree.
//
// Each partial product row from mb_pp_gen carries +2^(NE+1+2j) from its
// inverted sign bit and lacks the +1 (at bit 2j) of a two's complement
// negation. This row adds the constant -sum_j 2^(NE+1+2j) (mod 2^PW) and the
// negation bits neg_j at bits 2j. The constant has no set bits below NE+1 and
// the negation bits sit at or below bit NE, so the two are merged by OR
// without an adder.
//
// Interface: combinational. The operator's published description names the correction term and says
// it is added in the CSA tree; its contents follow from the row format.
module mb_correction
  import fam_pkg::*;
#(
  parameter int N = 16
) (
  input  logic [num_digits(N)-1:0] neg,
  output logic [pp_width(N)-1:0]   row
);
  localparam int NE = even_width(N);
  localparam int D  = num_digits(N);
  localparam int PW = pp_width(N);

  function automatic logic [PW-1:0] sign_constant();
    logic [PW-1:0] acc;
    acc = '0;
    for (int j = 0; j < D; j++) acc = acc - (PW'(1) << (NE + 1 + 2*j));
    return acc;
  endfunction

  localparam logic [PW-1:0] SIGN_CONST = sign_constant();

  always_comb begin
    row = SIGN_CONST;
    for (int j = 0; j < D; j++) row[2*j] = row[2*j] | neg[j];
  end

endmodule
