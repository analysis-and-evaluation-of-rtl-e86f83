// Carry-lookahead adder test: exhaustive at W=5 (including carry-in and
// carry-out), random and corner operands at the operator's width W=34.
module tb_cla_adder;
  int checks = 0, failures = 0;

  logic [4:0]  a5, b5, s5;
  logic        c5, co5;
  logic [33:0] a, b, s;
  logic        ci, co;

  cla_adder #(.W(5))  dut5 (.a(a5), .b(b5), .cin(c5), .s(s5), .cout(co5));
  cla_adder           dut  (.a(a), .b(b), .cin(ci), .s(s), .cout(co));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_wide(input logic [33:0] ta, input logic [33:0] tb_, input logic tc);
    logic [34:0] ref_sum;
    a = ta; b = tb_; ci = tc;
    #1;
    ref_sum = 35'(ta) + 35'(tb_) + 35'(tc);
    checks++;
    if ({co, s} != ref_sum) begin
      failures++;
      $display("FAIL %h + %h + %b = %h, got %h", ta, tb_, tc, ref_sum, {co, s});
    end
  endtask

  initial begin
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++)
        for (int k = 0; k < 2; k++) begin
          a5 = 5'(i); b5 = 5'(j); c5 = 1'(k);
          #1;
          checks++;
          if ({co5, s5} != 6'(i + j + k)) begin
            failures++;
            $display("FAIL W=5 %0d+%0d+%0d got %0d", i, j, k, {co5, s5});
          end
        end
    check_wide('1, '0, 1'b1);
    check_wide('1, '1, 1'b1);
    check_wide(34'h2_AAAA_AAAA, 34'h1_5555_5555, 1'b1);
    for (int n = 0; n < 5000; n++)
      check_wide({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
