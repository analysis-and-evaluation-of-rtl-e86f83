// Partial product generator test at N=16: for random MB digits (all eight
// triplets of the radix-4 Booth table) and random X, each row must equal
// digit*X*4^j - neg_j*4^j + 2^(NE+1+2j) modulo 2^PW, and neg_j must flag
// exactly the triplets with a set top bit.
module tb_mb_pp_gen;
  import fam_pkg::*;
  localparam int N  = 16;
  localparam int NE = even_width(N);
  localparam int D  = num_digits(N);
  localparam int PW = pp_width(N);
  int checks = 0, failures = 0;

  logic [N-1:0]      x;
  mb_digit_t [D-1:0] y;
  logic [PW-1:0]     rows [D];
  logic [D-1:0]      neg;

  mb_pp_gen dut (.x(x), .y(y), .rows(rows), .neg(neg));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Table I of the radix-4 Booth encoding
  function automatic longint booth(input logic [2:0] t);
    case (t)
      3'b000, 3'b111: return 0;
      3'b001, 3'b010: return 1;
      3'b011:         return 2;
      3'b100:         return -2;
      default:        return -1;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 4000; n++) begin
      x = (n < 8) ? ((n % 2) ? 16'h8000 : 16'h7FFF) : 16'($urandom);
      for (int j = 0; j < D; j++) y[j] = (n < 8) ? mb_digit_t'(3'(n)) : mb_digit_t'(3'($urandom));
      #1;
      for (int j = 0; j < D; j++) begin
        longint expv;
        logic [63:0] m;
        expv = booth(y[j]) * longint'($signed(x)) * (longint'(1) << (2 * j))
             - longint'(y[j].y_hi) * (longint'(1) << (2 * j))
             + (longint'(1) << (NE + 1 + 2 * j));
        m = 64'(expv);
        checks += 2;
        if (rows[j] != m[PW-1:0]) begin
          failures++;
          $display("FAIL row %0d digit %b x=%0d: expected %h got %h", j, y[j], $signed(x), m[PW-1:0], rows[j]);
        end
        if (neg[j] != y[j].y_hi) begin
          failures++;
          $display("FAIL neg %0d", j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
