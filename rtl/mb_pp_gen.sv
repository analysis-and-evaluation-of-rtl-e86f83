// Modified Booth encoder and partial product generator.
//
// Each MB digit (y_hi, y_mid, y_lo) is decoded per the radix-4 Booth table
// into one (|digit| = 1), two (|digit| = 2) and neg (digit negative). The
// row is |digit| * X, inverted when neg is set, as an (NE+2)-bit word whose
// sign bit is inverted so that no sign extension is needed; the row is placed
// at bit 2j of a pp_width(N)-bit word.
//
// Row j therefore holds digit*X*4^j - neg_j*4^j + 2^(NE+1+2j) (mod 2^PW).
// The missing +neg_j*4^j and the -2^(NE+1+2j) are returned to the sum by the
// correction term (mb_correction), which takes the neg outputs.
//
// With SIGNED = 0, X is unsigned and is zero-extended instead.
//
// Interface: combinational. The operator's published description gives the encoding table and the
// block's place in the datapath; the inverted-sign-bit row format is this
// design's choice.
module mb_pp_gen
  import fam_pkg::*;
#(
  parameter int N      = 16,
  parameter bit SIGNED = 1'b1
) (
  input  logic [N-1:0]                  x,
  input  mb_digit_t [num_digits(N)-1:0] y,
  output logic [pp_width(N)-1:0]        rows [num_digits(N)],
  output logic [num_digits(N)-1:0]      neg
);
  localparam int NE = even_width(N);
  localparam int D  = num_digits(N);
  localparam int PW = pp_width(N);

  logic [NE+1:0] xe;
  if (SIGNED) begin : g_sext
    assign xe = (NE+2)'($signed(x));
  end else begin : g_zext
    assign xe = (NE+2)'(x);
  end

  for (genvar j = 0; j < D; j++) begin : g_row
    logic one, two;
    logic [NE+1:0] mag, p;

    always_comb begin
      one = y[j].y_mid ^ y[j].y_lo;
      two = ( y[j].y_hi & ~y[j].y_mid & ~y[j].y_lo) |
            (~y[j].y_hi &  y[j].y_mid &  y[j].y_lo);
      if (one)      mag = xe;
      else if (two) mag = {xe[NE:0], 1'b0};
      else          mag = '0;
      p = mag ^ {(NE+2){y[j].y_hi}};
    end

    assign neg[j]  = y[j].y_hi;
    assign rows[j] = PW'({~p[NE+1], p[NE:0]}) << (2*j);
  end

endmodule
