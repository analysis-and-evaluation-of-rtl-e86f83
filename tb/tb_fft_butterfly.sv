// End-to-end test of the radix-2 FFT butterfly at its default width N=16.
//
// Drives a stream of random and corner-case complex samples with random
// idle cycles, and compares every output with P = A + B and
// Q = (A - B) * W computed here in 64-bit integers. Checks the one-cycle
// latency (out_valid exactly one clock after in_valid), that outputs hold
// while in_valid is low, and that an asynchronous reset in mid-stream
// clears out_valid and the outputs. Each of these events, and operand
// patterns that make the fused operators recode negative and positive
// differences and extreme values, is counted; an event that never happens
// counts as a failure.
module tb_fft_butterfly;
  localparam int N = 16;
  int checks = 0, failures = 0;
  int n_valid = 0, n_bubble = 0, n_hold = 0, n_reset = 0, n_neg_diff = 0,
      n_pos_diff = 0, n_extreme = 0;

  logic clk = 1'b0, rst_n;
  logic in_valid, out_valid;
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

  // expected outputs of the sample accepted at the last edge
  longint e_pr, e_pi, e_qr, e_qi;
  logic   e_valid;

  function automatic logic signed [N-1:0] pick(input int mode);
    case (mode)
      0: return 16'sh7FFF;
      1: return 16'sh8000;
      default: return 16'($urandom);
    endcase
  endfunction

  task automatic drive_sample(input bit corner);
    in_valid = 1'b1;
    ar = pick(corner ? int'($urandom_range(0, 1)) : 2);
    ai = pick(corner ? int'($urandom_range(0, 1)) : 2);
    br = pick(corner ? int'($urandom_range(0, 1)) : 2);
    bi = pick(corner ? int'($urandom_range(0, 1)) : 2);
    wr = pick(corner ? int'($urandom_range(0, 1)) : 2);
    wi = pick(corner ? int'($urandom_range(0, 1)) : 2);
  endtask

  task automatic compare();
    checks++;
    if (out_valid !== e_valid) begin
      failures++;
      $display("FAIL out_valid=%b expected %b at %0t", out_valid, e_valid, $time);
    end
    checks++;
    if (longint'(pr) != e_pr || longint'(pi) != e_pi ||
        longint'(qr) != e_qr || longint'(qi) != e_qi) begin
      failures++;
      $display("FAIL P=(%0d,%0d) Q=(%0d,%0d), expected P=(%0d,%0d) Q=(%0d,%0d)",
               pr, pi, qr, qi, e_pr, e_pi, e_qr, e_qi);
    end
  endtask

  initial begin
    longint dr, di;
    in_valid = 1'b0;
    {ar, ai, br, bi, wr, wi} = '0;
    e_pr = 0; e_pi = 0; e_qr = 0; e_qi = 0; e_valid = 1'b0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    compare();

    for (int n = 0; n < 6000; n++) begin
      // mid-stream asynchronous reset
      if (n == 3000) begin
        #2 rst_n = 1'b0;
        #1;
        checks++;
        if (out_valid !== 1'b0 || pr != 0 || qr != 0) begin
          failures++;
          $display("FAIL reset did not clear the outputs");
        end
        n_reset++;
        e_pr = 0; e_pi = 0; e_qr = 0; e_qi = 0; e_valid = 1'b0;
        @(posedge clk);
        #1 rst_n = 1'b1;
      end

      if ($urandom_range(0, 3) == 0) begin
        in_valid = 1'b0;
        {ar, ai, br, bi, wr, wi} = {3{$urandom, $urandom}};
        n_bubble++;
      end else begin
        drive_sample(n % 10 == 0);
      end

      @(posedge clk);
      // model: register loads on valid, holds otherwise
      if (in_valid) begin
        dr = longint'(ar) - longint'(br);
        di = longint'(ai) - longint'(bi);
        e_pr = longint'(ar) + longint'(br);
        e_pi = longint'(ai) + longint'(bi);
        e_qr = longint'(wr) * dr - longint'(wi) * di;
        e_qi = longint'(wi) * dr + longint'(wr) * di;
        n_valid++;
        if (dr < 0 || di < 0) n_neg_diff++;
        if (dr > 0 || di > 0) n_pos_diff++;
        if (dr == 65535 || dr == -65535 || e_qr == 64'sd8589672450 ||
            e_qr == -64'sd8589672450 || e_qi == 64'sd8589672450 || e_qi == -64'sd8589672450)
          n_extreme++;
      end else if (e_valid) begin
        n_hold++;
      end
      e_valid = in_valid;
      #1;
      compare();
    end

    checks += 7;
    if (n_valid == 0)    begin failures++; $display("FAIL no valid samples"); end
    if (n_bubble == 0)   begin failures++; $display("FAIL no idle cycles"); end
    if (n_hold == 0)     begin failures++; $display("FAIL outputs never held"); end
    if (n_reset == 0)    begin failures++; $display("FAIL no reset"); end
    if (n_neg_diff == 0) begin failures++; $display("FAIL no negative difference"); end
    if (n_pos_diff == 0) begin failures++; $display("FAIL no positive difference"); end
    if (n_extreme == 0)  begin failures++; $display("FAIL no extreme operands"); end
    $display("events: valid=%0d idle=%0d hold=%0d reset=%0d neg_diff=%0d pos_diff=%0d extreme=%0d",
             n_valid, n_bubble, n_hold, n_reset, n_neg_diff, n_pos_diff, n_extreme);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
