// S-MB recoder: recodes the sum A + B + cin of two N-bit two's complement
// numbers directly into modified Booth (radix-4) digits, without first
// forming A + B in a carry-propagate adder.
//
// Each digit j covers bit pair (2j, 2j+1) of both operands:
//   * a full adder adds a[2j], b[2j] and the carry c[2j] from the pair below,
//     giving the digit's middle bit s[2j] and a carry c[2j+1] (weight 2);
//   * a signed half adder (HA*) turns a[2j+1] + b[2j+1] into a carry c[2j+2]
//     for the next pair and a negatively weighted sum bit s[2j+1];
//   * a second signed half adder (HA**) merges c[2j+1] (positive) and s[2j+1]
//     (negative) into the digit's top bit y_hi (weight -2) and a positive bit
//     w[2j+2] that becomes the low bit y_lo of the next digit.
// Every carry depends only on the inputs of one bit pair, so the delay does
// not grow with N. For the pair holding the sign bits a signed full adder
// (one positive, two negative inputs) replaces the two half adders, and its
// signed carry forms one extra digit in {-1,0,+1}. Operands of odd width are
// sign-extended by one bit first.
//
// With SIGNED = 0 the operands are unsigned: they are zero-extended, the top
// pair uses the same half adders as the others, and the extra top digit is
// c + w in {0,1,2} from that pair's two carries.
//
// Interface: combinational. y[j] has value -2*y_hi + y_mid + y_lo and
// sum_j y[j] * 4^j == A + B + cin exactly. cin gives A - B from A + ~B + 1.
//
// The operator's published description names the approach (signed half/full adders recoding the
// sum straight into MB form); the particular cell arrangement here is this
// design's own.
module smb_recoder
  import fam_pkg::*;
#(
  parameter int N      = 16,
  parameter bit SIGNED = 1'b1
) (
  input  logic [N-1:0]                     a,
  input  logic [N-1:0]                     b,
  input  logic                             cin,
  output mb_digit_t [num_digits(N)-1:0]    y
);
  localparam int NE = even_width(N);
  localparam int D  = num_digits(N);   // NE/2 + 1
  localparam int P  = NE / 2;          // bit pairs

  logic [NE-1:0] ae, be;
  if (SIGNED) begin : g_sext
    assign ae = NE'($signed(a));
    assign be = NE'($signed(b));
  end else begin : g_zext
    assign ae = NE'(a);
    assign be = NE'(b);
  end

  logic [P:0]   c_even;   // carry into the full adder of pair j
  logic [P:0]   w;        // positive low bit of digit j

  assign c_even[0] = cin;
  assign w[0]      = 1'b0;

  for (genvar j = 0; j < P; j++) begin : g_pair
    logic s_even, c_odd, y_hi;

    full_adder u_fa (
      .a (ae[2*j]), .b (be[2*j]), .ci(c_even[j]),
      .s (s_even),  .co(c_odd)
    );

    if (j < P - 1 || !SIGNED) begin : g_mid
      logic s_odd;
      signed_ha_pp u_hap (
        .a(ae[2*j+1]), .b(be[2*j+1]), .s(s_odd), .c(c_even[j+1])
      );
      signed_ha_pn u_han (
        .p(c_odd), .n(s_odd), .s(y_hi), .c(w[j+1])
      );
    end else begin : g_sign
      logic zp, zn;
      assign c_even[j+1] = 1'b0;
      signed_fa_pnn u_sfa (
        .p(c_odd), .n1(ae[2*j+1]), .n2(be[2*j+1]),
        .s(y_hi), .cp(zp), .cn(zn)
      );
      assign w[j+1] = 1'b0;
      // extra top digit: -2*zn + zn + zp = zp - zn
      assign y[D-1] = '{y_hi: zn, y_mid: zn, y_lo: zp};
    end

    assign y[j] = '{y_hi: y_hi, y_mid: s_even, y_lo: w[j]};
  end

  if (!SIGNED) begin : g_utop
    // extra top digit: carry of the top pair's HA* (weight 1) plus w
    assign y[D-1] = '{y_hi: 1'b0, y_mid: c_even[P], y_lo: w[P]};
  end

endmodule
