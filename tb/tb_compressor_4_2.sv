// Exhaustive test of the 4:2 compressor: all 32 input combinations must
// satisfy x1+x2+x3+x4+cin == sum + 2*(carry+cout), and cout must not depend
// on cin (so a row of compressors has no rippling carry).
module tb_compressor_4_2;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic cout0;
    for (int v = 0; v < 16; v++) begin
      for (int ci = 0; ci < 2; ci++) begin
        {x1, x2, x3, x4} = 4'(v);
        cin = 1'(ci);
        #1;
        checks++;
        if (int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin) !=
            int'(sum) + 2 * (int'(carry) + int'(cout))) begin
          failures++;
          $display("FAIL in=%b%b%b%b cin=%b -> s=%b c=%b co=%b", x1, x2, x3, x4, cin, sum, carry, cout);
        end
        if (ci == 0) cout0 = cout;
        else begin
          checks++;
          if (cout != cout0) begin
            failures++;
            $display("FAIL cout depends on cin for in=%b", v[3:0]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
