// Shared types and size functions of the fused add-multiply (FAM) datapath.
//
// A modified Booth (MB) digit is carried as the usual radix-4 triplet
// (y_hi, y_mid, y_lo) with value -2*y_hi + y_mid + y_lo, the same form as the
// three multiplier bits of the radix-4 Booth table. The S-MB recoder produces
// digits in this form straight from the two addends, so the partial product
// generator can decode them exactly as it would decode multiplier bits.
//
// Size rules (N = operand width): operands are sign-extended to an even width
// NE, the sum A+B+cin is NE/2+1 MB digits long, and partial products are
// summed modulo 2^(2*NE+2), which holds the full 2N+1-bit product.
package fam_pkg;

  typedef struct packed {
    logic y_hi;   // weight -2
    logic y_mid;  // weight +1
    logic y_lo;   // weight +1
  } mb_digit_t;

  // Operand width rounded up to an even number of bits.
  function automatic int even_width(input int n);
    return n + (n % 2);
  endfunction

  // Number of MB digits of the sum of two n-bit signed numbers.
  function automatic int num_digits(input int n);
    return even_width(n) / 2 + 1;
  endfunction

  // Width in which the partial products are reduced and added.
  function automatic int pp_width(input int n);
    return 2 * even_width(n) + 2;
  endfunction

endpackage
