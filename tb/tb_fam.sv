// Fused add-multiply test: z must equal x*(a+b+cin) exactly.
// Exhaustive over x, a, b and cin at N=4 and random plus corner operands at
// the default N=16 and at N=7 (odd width), all two's complement; unsigned
// operands exhaustively at N=4 and at random at N=16.
module tb_fam;
  int checks = 0, failures = 0;

  logic [15:0] x1, a1, b1;  logic c1;  logic [32:0] z1;
  logic [3:0]  x2, a2, b2;  logic c2;  logic [8:0]  z2;
  logic [6:0]  x3, a3, b3;  logic c3;  logic [14:0] z3;

  fam           dut1 (.x(x1), .a(a1), .b(b1), .cin(c1), .z(z1));
  fam #(.N(4))  dut2 (.x(x2), .a(a2), .b(b2), .cin(c2), .z(z2));
  fam #(.N(7))  dut3 (.x(x3), .a(a3), .b(b3), .cin(c3), .z(z3));

  logic [8:0]  zu4;
  logic [32:0] zu16;
  fam #(.N(4),  .SIGNED(1'b0)) dut_u4  (.x(x2), .a(a2), .b(b2), .cin(c2), .z(zu4));
  fam #(.N(16), .SIGNED(1'b0)) dut_u16 (.x(x1), .a(a1), .b(b1), .cin(c1), .z(zu16));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] tx, input logic [15:0] ta,
                         input logic [15:0] tb_, input logic tc);
    longint expv;
    x1 = tx; a1 = ta; b1 = tb_; c1 = tc;
    #1;
    expv = longint'($signed(tx)) * (longint'($signed(ta)) + longint'($signed(tb_)) + longint'(tc));
    checks++;
    if (longint'($signed(z1)) != expv) begin
      failures++;
      $display("FAIL N=16 x=%0d a=%0d b=%0d cin=%b: expected %0d got %0d",
               $signed(tx), $signed(ta), $signed(tb_), tc, expv, $signed(z1));
    end
    expv = longint'(tx) * (longint'(ta) + longint'(tb_) + longint'(tc));
    checks++;
    if (longint'(zu16) != expv) begin
      failures++;
      $display("FAIL unsigned N=16 x=%0d a=%0d b=%0d cin=%b: expected %0d got %0d",
               tx, ta, tb_, tc, expv, zu16);
    end
  endtask

  initial begin
    for (int v = 0; v < (1 << 13); v++) begin
      longint expv;
      {x2, a2, b2, c2} = 13'(v);
      #1;
      expv = longint'($signed(x2)) * (longint'($signed(a2)) + longint'($signed(b2)) + longint'(c2));
      checks++;
      if (longint'($signed(z2)) != expv) begin
        failures++;
        $display("FAIL N=4 x=%0d a=%0d b=%0d cin=%b: expected %0d got %0d",
                 $signed(x2), $signed(a2), $signed(b2), c2, expv, $signed(z2));
      end
      expv = longint'(x2) * (longint'(a2) + longint'(b2) + longint'(c2));
      checks++;
      if (longint'(zu4) != expv) begin
        failures++;
        $display("FAIL unsigned N=4 x=%0d a=%0d b=%0d cin=%b: expected %0d got %0d",
                 x2, a2, b2, c2, expv, zu4);
      end
    end
    for (int n = 0; n < 3000; n++) begin
      longint expv;
      {x3, a3, b3, c3} = 22'($urandom);
      #1;
      expv = longint'($signed(x3)) * (longint'($signed(a3)) + longint'($signed(b3)) + longint'(c3));
      checks++;
      if (longint'($signed(z3)) != expv) begin
        failures++;
        $display("FAIL N=7 x=%0d a=%0d b=%0d", $signed(x3), $signed(a3), $signed(b3));
      end
    end
    check16(16'h8000, 16'h8000, 16'h8000, 1'b0);   // largest positive product
    check16(16'h7FFF, 16'h8000, 16'h8000, 1'b0);   // most negative product
    check16(16'h7FFF, 16'h7FFF, 16'h7FFF, 1'b1);
    check16(16'h8000, 16'h7FFF, 16'h7FFF, 1'b1);
    check16(16'hFFFF, 16'hFFFF, 16'hFFFF, 1'b0);
    check16(16'h0000, 16'h1234, 16'h4321, 1'b1);
    for (int n = 0; n < 5000; n++)
      check16(16'($urandom), 16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
