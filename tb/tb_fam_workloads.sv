// Add-multiply at the three operand lengths of the evaluation: 8, 16 and
// 32 bits. Each instance computes z = x*(a+b+cin) for corner and random
// operands; the reference is computed in 66-bit signed arithmetic, wide
// enough for the 65-bit result of the 32-bit operator.
module tb_fam_workloads;
  int checks = 0, failures = 0;

  logic [7:0]  x8,  a8,  b8;   logic c8;   logic [16:0] z8;
  logic [15:0] x16, a16, b16;  logic c16;  logic [32:0] z16;
  logic [31:0] x32, a32, b32;  logic c32;  logic [64:0] z32;

  fam #(.N(8))  dut8  (.x(x8),  .a(a8),  .b(b8),  .cin(c8),  .z(z8));
  fam #(.N(16)) dut16 (.x(x16), .a(a16), .b(b16), .cin(c16), .z(z16));
  fam #(.N(32)) dut32 (.x(x32), .a(a32), .b(b32), .cin(c32), .z(z32));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [65:0] ref_z(input logic signed [65:0] x,
                                               input logic signed [65:0] a,
                                               input logic signed [65:0] b,
                                               input logic c);
    return x * (a + b + 66'(c));
  endfunction

  function automatic logic [31:0] corner(input int k, input int w);
    logic [31:0] v;
    case (k % 4)
      0: v = (32'h1 << (w - 1)) - 1;   // largest positive
      1: v = 32'h1 << (w - 1);         // most negative
      2: v = '1;                       // -1
      default: v = '0;
    endcase
    return v;
  endfunction

  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic signed [65:0] e8, e16, e32;
      bit cornr;
      cornr = (n < 256);
      x8  = cornr ? 8'(corner(n, 8))      : 8'($urandom);
      a8  = cornr ? 8'(corner(n / 4, 8))  : 8'($urandom);
      b8  = cornr ? 8'(corner(n / 16, 8)) : 8'($urandom);
      x16 = cornr ? 16'(corner(n, 16))      : 16'($urandom);
      a16 = cornr ? 16'(corner(n / 4, 16))  : 16'($urandom);
      b16 = cornr ? 16'(corner(n / 16, 16)) : 16'($urandom);
      x32 = cornr ? corner(n, 32)      : $urandom;
      a32 = cornr ? corner(n / 4, 32)  : $urandom;
      b32 = cornr ? corner(n / 16, 32) : $urandom;
      c8 = 1'(n / 64); c16 = c8; c32 = c8;
      if (!cornr) begin c8 = 1'($urandom); c16 = 1'($urandom); c32 = 1'($urandom); end
      #1;
      e8  = ref_z(66'($signed(x8)),  66'($signed(a8)),  66'($signed(b8)),  c8);
      e16 = ref_z(66'($signed(x16)), 66'($signed(a16)), 66'($signed(b16)), c16);
      e32 = ref_z(66'($signed(x32)), 66'($signed(a32)), 66'($signed(b32)), c32);
      checks += 3;
      if (66'($signed(z8)) != e8) begin
        failures++; $display("FAIL 8-bit x=%h a=%h b=%h", x8, a8, b8);
      end
      if (66'($signed(z16)) != e16) begin
        failures++; $display("FAIL 16-bit x=%h a=%h b=%h", x16, a16, b16);
      end
      if (66'($signed(z32)) != e32) begin
        failures++; $display("FAIL 32-bit x=%h a=%h b=%h: expected %h got %h", x32, a32, b32, e32, z32);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
