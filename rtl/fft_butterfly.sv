// Radix-2 decimation-in-frequency FFT butterfly built on fused add-multiply
// operators:
//   P = A + B
//   Q = (A - B) * W
// with complex A, B and twiddle factor W. The real and imaginary parts of Q,
//   Qr = Wr*(Ar - Br) - Wi*(Ai - Bi)
//   Qi = Wi*(Ar - Br) + Wr*(Ai - Bi)
// are four add-multiply operations, each done by a FAM unit fed with the
// inverted B operand and a carry-in of 1, so no separate subtractors sit in
// front of the multipliers. Two carry-lookahead adders combine the products
// and a third forms P.
//
// Interface: all values N-bit two's complement; results keep full precision
// (P: N+1 bits, Q: 2N+2 bits) with no rounding or scaling, which is left to
// the surrounding FFT. The results are registered: a sample taken with
// in_valid high at a rising clock edge appears with out_valid high after
// that edge, one cycle of latency, one butterfly per clock. rst_n is an
// asynchronous active-low reset that clears out_valid and the outputs.
//
// The use of the FAM operator for FFT computation follows the operator's published description; the
// butterfly form, the widths and the single register stage are this
// design's own choices.
module fft_butterfly #(
  parameter int N = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [N-1:0]  ar,
  input  logic signed [N-1:0]  ai,
  input  logic signed [N-1:0]  br,
  input  logic signed [N-1:0]  bi,
  input  logic signed [N-1:0]  wr,
  input  logic signed [N-1:0]  wi,
  output logic                 out_valid,
  output logic signed [N:0]    pr,
  output logic signed [N:0]    pi,
  output logic signed [2*N+1:0] qr,
  output logic signed [2*N+1:0] qi
);
  logic [2*N:0]   wr_dr, wi_di, wi_dr, wr_di;
  logic [N:0]     p_r, p_i;
  logic [2*N+1:0] q_r, q_i;
  logic           co_pr, co_pi, co_qr, co_qi;

  // products of the differences
  fam #(.N(N)) u_fam_rr (.x(wr), .a(ar), .b(~br), .cin(1'b1), .z(wr_dr));
  fam #(.N(N)) u_fam_ii (.x(wi), .a(ai), .b(~bi), .cin(1'b1), .z(wi_di));
  fam #(.N(N)) u_fam_ir (.x(wi), .a(ar), .b(~br), .cin(1'b1), .z(wi_dr));
  fam #(.N(N)) u_fam_ri (.x(wr), .a(ai), .b(~bi), .cin(1'b1), .z(wr_di));

  // Qr = wr_dr - wi_di, Qi = wi_dr + wr_di
  cla_adder #(.W(2*N+2)) u_add_qr (
    .a({wr_dr[2*N], wr_dr}), .b(~{wi_di[2*N], wi_di}), .cin(1'b1),
    .s(q_r), .cout(co_qr)
  );
  cla_adder #(.W(2*N+2)) u_add_qi (
    .a({wi_dr[2*N], wi_dr}), .b({wr_di[2*N], wr_di}), .cin(1'b0),
    .s(q_i), .cout(co_qi)
  );

  // P = A + B
  cla_adder #(.W(N+1)) u_add_pr (
    .a({ar[N-1], ar}), .b({br[N-1], br}), .cin(1'b0), .s(p_r), .cout(co_pr)
  );
  cla_adder #(.W(N+1)) u_add_pi (
    .a({ai[N-1], ai}), .b({bi[N-1], bi}), .cin(1'b0), .s(p_i), .cout(co_pi)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      pr <= '0;
      pi <= '0;
      qr <= '0;
      qi <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        pr <= p_r;
        pi <= p_i;
        qr <= q_r;
        qi <= q_i;
      end
    end
  end
endmodule
