// 4:2 compressor tree test: the two output words must add up (mod 2^W) to
// the sum of all input words. Checked for 10 rows (the 16-bit operator), and
// for 3, 5 and 7 rows, which exercise the full-adder and pass-through paths.
module tb_csa_tree;
  localparam int W = 34;
  int checks = 0, failures = 0;

  logic [W-1:0] r10 [10];
  logic [W-1:0] r3 [3];
  logic [W-1:0] r5 [5];
  logic [W-1:0] r7 [7];
  logic [W-1:0] s10, c10, s3, c3, s5, c5, s7, c7;

  csa_tree                        dut10 (.rows(r10), .sum_row(s10), .carry_row(c10));
  csa_tree #(.ROWS(3), .W(W))     dut3  (.rows(r3),  .sum_row(s3),  .carry_row(c3));
  csa_tree #(.ROWS(5), .W(W))     dut5  (.rows(r5),  .sum_row(s5),  .carry_row(c5));
  csa_tree #(.ROWS(7), .W(W))     dut7  (.rows(r7),  .sum_row(s7),  .carry_row(c7));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd(input int mode);
    case (mode)
      0: return '1;
      1: return '0;
      default: return W'({$urandom, $urandom});
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [W-1:0] e10, e3, e5, e7;
      int mode;
      mode = (n < 10) ? (n % 2) : 2;
      e10 = '0; e3 = '0; e5 = '0; e7 = '0;
      for (int r = 0; r < 10; r++) begin r10[r] = rnd(mode); e10 += r10[r]; end
      for (int r = 0; r < 3; r++)  begin r3[r]  = rnd(mode); e3  += r3[r];  end
      for (int r = 0; r < 5; r++)  begin r5[r]  = rnd(mode); e5  += r5[r];  end
      for (int r = 0; r < 7; r++)  begin r7[r]  = rnd(mode); e7  += r7[r];  end
      #1;
      checks += 4;
      if (W'(s10 + c10) != e10) begin failures++; $display("FAIL 10 rows"); end
      if (W'(s3 + c3) != e3)    begin failures++; $display("FAIL 3 rows"); end
      if (W'(s5 + c5) != e5)    begin failures++; $display("FAIL 5 rows"); end
      if (W'(s7 + c7) != e7)    begin failures++; $display("FAIL 7 rows"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
