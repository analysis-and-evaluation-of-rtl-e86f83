// FFT workload on the butterfly: 8-point radix-2 decimation-in-frequency FFT
// computed by passing every butterfly of the three stages through one
// fft_butterfly instance (default N=16), one butterfly per clock.
//
// Twiddles are W8^k = cos(2*pi*k/8) - j*sin(2*pi*k/8) in Q2.14 (1.0 = 16384).
// Between stages the testbench rounds Q back to 16 bits (Q >> 14 with
// rounding). Inputs are kept within +-1000 so no stage overflows. The
// outputs, in bit-reversed order, are compared with a double-precision DFT
// of the same input; a difference above 4 LSB in either part is a failure.
// Frames: an impulse, a constant, a single tone and 40 random frames.
module tb_fft8_workload;
  localparam int N = 16;
  localparam int FRAC = 14;
  localparam real PI = 3.14159265358979323846;
  int checks = 0, failures = 0;
  int n_butterflies = 0;

  logic clk = 1'b0, rst_n, in_valid, out_valid;
  logic signed [N-1:0]   ar, ai, br, bi, wr, wi;
  logic signed [N:0]     pr, pi;
  logic signed [2*N+1:0] qr, qi;

  fft_butterfly dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr [8], xi [8];       // working data
  int in_r [8], in_i [8];   // frame input
  int twr [4], twi [4];

  function automatic int round_q(input longint v);
    return int'((v + (longint'(1) <<< (FRAC - 1))) >>> FRAC);
  endfunction

  function automatic int bitrev3(input int k);
    return ((k & 1) << 2) | (k & 2) | ((k >> 2) & 1);
  endfunction

  task automatic butterfly(input int i, input int j, input int k);
    ar = N'(xr[i]); ai = N'(xi[i]);
    br = N'(xr[j]); bi = N'(xi[j]);
    wr = N'(twr[k]); wi = N'(twi[k]);
    in_valid = 1'b1;
    @(posedge clk);
    #1;
    in_valid = 1'b0;
    checks++;
    if (!out_valid) begin
      failures++;
      $display("FAIL out_valid low one cycle after a butterfly");
    end
    xr[i] = int'(pr); xi[i] = int'(pi);
    xr[j] = round_q(longint'(qr)); xi[j] = round_q(longint'(qi));
    n_butterflies++;
  endtask

  task automatic run_frame();
    for (int n = 0; n < 8; n++) begin xr[n] = in_r[n]; xi[n] = in_i[n]; end
    for (int span = 4; span >= 1; span /= 2)
      for (int base = 0; base < 8; base += 2 * span)
        for (int m = 0; m < span; m++)
          butterfly(base + m, base + m + span, m * (4 / span));
    for (int k = 0; k < 8; k++) begin
      real er, ei;
      int gr, gi;
      er = 0.0; ei = 0.0;
      for (int n = 0; n < 8; n++) begin
        real ang;
        ang = 2.0 * PI * real'(n * k) / 8.0;
        er += real'(in_r[n]) * $cos(ang) + real'(in_i[n]) * $sin(ang);
        ei += real'(in_i[n]) * $cos(ang) - real'(in_r[n]) * $sin(ang);
      end
      gr = xr[bitrev3(k)];
      gi = xi[bitrev3(k)];
      checks++;
      if ((real'(gr) - er) > 4.0 || (er - real'(gr)) > 4.0 ||
          (real'(gi) - ei) > 4.0 || (ei - real'(gi)) > 4.0) begin
        failures++;
        $display("FAIL X[%0d] = (%0d,%0d), expected (%f,%f)", k, gr, gi, er, ei);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < 4; k++) begin
      twr[k] = int'($rtoi($floor(16384.0 * $cos(2.0 * PI * k / 8.0) + 0.5)));
      twi[k] = int'($rtoi($floor(-16384.0 * $sin(2.0 * PI * k / 8.0) + 0.5)));
    end
    in_valid = 1'b0;
    {ar, ai, br, bi, wr, wi} = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int f = 0; f < 43; f++) begin
      for (int n = 0; n < 8; n++) begin
        case (f)
          0: begin in_r[n] = (n == 0) ? 1000 : 0; in_i[n] = 0; end
          1: begin in_r[n] = 700; in_i[n] = -300; end
          2: begin
               in_r[n] = int'($rtoi($floor(900.0 * $cos(2.0 * PI * n / 8.0) + 0.5)));
               in_i[n] = int'($rtoi($floor(900.0 * $sin(2.0 * PI * n / 8.0) + 0.5)));
             end
          default: begin
               in_r[n] = int'($urandom_range(0, 2000)) - 1000;
               in_i[n] = int'($urandom_range(0, 2000)) - 1000;
             end
        endcase
      end
      run_frame();
    end
    checks++;
    if (n_butterflies != 43 * 12) begin
      failures++;
      $display("FAIL %0d butterflies, expected %0d", n_butterflies, 43 * 12);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
