// Correction term test at N=16: the row must equal the negation bits at
// positions 2j plus -sum_j 2^(NE+1+2j), modulo 2^PW, for all 512 patterns
// of the nine negation bits.
module tb_mb_correction;
  import fam_pkg::*;
  localparam int N  = 16;
  localparam int NE = even_width(N);
  localparam int D  = num_digits(N);
  localparam int PW = pp_width(N);
  int checks = 0, failures = 0;

  logic [D-1:0]  neg;
  logic [PW-1:0] row;

  mb_correction dut (.neg(neg), .row(row));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << D); v++) begin
      longint expv;
      logic [63:0] m;
      neg = D'(v);
      #1;
      expv = 0;
      for (int j = 0; j < D; j++)
        expv += longint'(neg[j]) * (longint'(1) << (2 * j)) - (longint'(1) << (NE + 1 + 2 * j));
      m = 64'(expv);
      checks++;
      if (row != m[PW-1:0]) begin
        failures++;
        $display("FAIL neg=%b: expected %h got %h", neg, m[PW-1:0], row);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
