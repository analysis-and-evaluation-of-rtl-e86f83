// S-MB recoder test: the digits, weighted by 4^j, must add up to
// A + B + cin. Exhaustive at N=5 (odd width, sign-extended internally) and
// random plus corner operands at the default N=16, for two's complement
// operands; exhaustive at N=5 for unsigned operands. Also checks that every
// digit value -2..+2 occurs.
module tb_smb_recoder;
  import fam_pkg::*;
  int checks = 0, failures = 0;
  int seen [-2:2];

  localparam int N1 = 16, D1 = num_digits(N1);
  localparam int N2 = 5,  D2 = num_digits(N2);

  logic [N1-1:0] a1, b1;
  logic [N2-1:0] a2, b2;
  logic          c1, c2;
  mb_digit_t [D1-1:0] y1;
  mb_digit_t [D2-1:0] y2;

  smb_recoder            dut1 (.a(a1), .b(b1), .cin(c1), .y(y1));
  smb_recoder #(.N(N2))  dut2 (.a(a2), .b(b2), .cin(c2), .y(y2));

  mb_digit_t [D2-1:0] yu;
  smb_recoder #(.N(N2), .SIGNED(1'b0)) dut_u (.a(a2), .b(b2), .cin(c2), .y(yu));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int digit_value(input mb_digit_t d);
    return -2 * int'(d.y_hi) + int'(d.y_mid) + int'(d.y_lo);
  endfunction

  task automatic check16(input logic [N1-1:0] ta, input logic [N1-1:0] tb_, input logic tc);
    longint expv, got;
    a1 = ta; b1 = tb_; c1 = tc;
    #1;
    expv = longint'($signed(ta)) + longint'($signed(tb_)) + longint'(tc);
    got = 0;
    for (int j = D1 - 1; j >= 0; j--) begin
      got = got * 4 + digit_value(y1[j]);
      seen[digit_value(y1[j])]++;
    end
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL N=16 a=%0d b=%0d cin=%b: expected %0d got %0d",
               $signed(ta), $signed(tb_), tc, expv, got);
    end
  endtask

  initial begin
    foreach (seen[k]) seen[k] = 0;
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++)
        for (int k = 0; k < 2; k++) begin
          longint expv, got;
          a2 = 5'(i); b2 = 5'(j); c2 = 1'(k);
          #1;
          expv = longint'($signed(a2)) + longint'($signed(b2)) + longint'(k);
          got = 0;
          for (int d = D2 - 1; d >= 0; d--) got = got * 4 + digit_value(y2[d]);
          checks++;
          if (got != expv) begin
            failures++;
            $display("FAIL N=5 a=%0d b=%0d cin=%0d: expected %0d got %0d",
                     $signed(a2), $signed(b2), k, expv, got);
          end
          expv = longint'(i) + longint'(j) + longint'(k);
          got = 0;
          for (int d = D2 - 1; d >= 0; d--) got = got * 4 + digit_value(yu[d]);
          checks++;
          if (got != expv) begin
            failures++;
            $display("FAIL unsigned N=5 a=%0d b=%0d cin=%0d: expected %0d got %0d",
                     i, j, k, expv, got);
          end
        end
    check16(16'h7FFF, 16'h7FFF, 1'b1);
    check16(16'h8000, 16'h8000, 1'b0);
    check16(16'h8000, 16'h7FFF, 1'b1);
    check16(16'hFFFF, 16'h0001, 1'b0);
    check16(16'h5555, 16'h5555, 1'b1);
    check16(16'hAAAA, 16'hAAAA, 1'b0);
    for (int n = 0; n < 5000; n++) check16(16'($urandom), 16'($urandom), 1'($urandom));
    for (int v = -2; v <= 2; v++) begin
      checks++;
      if (seen[v] == 0) begin
        failures++;
        $display("FAIL digit value %0d never produced", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
