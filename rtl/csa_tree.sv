// Carry-save reduction tree built from 4:2 compressors.
//
// Reduces ROWS words of W bits to two words whose sum equals the sum of all
// inputs modulo 2^W. Each level groups its words by four into rows of 4:2
// compressors (4 words -> 2). Three words left over go through a row of full
// adders (3 -> 2); one or two left over pass to the next level unchanged.
// Levels repeat until two words remain. The 10 rows of a 16-bit operator
// (9 partial products and the correction term) take three levels:
// 10 -> 6 -> 4 -> 2.
//
// Interface: combinational. The use of 4:2 compressors in place of the
// adders of a conventional CSA tree follows the operator's published description; the grouping and
// the full-adder row for three leftover words are this design's choice.
module csa_tree #(
  parameter int ROWS = 10,
  parameter int W    = 34
) (
  input  logic [W-1:0] rows [ROWS],
  output logic [W-1:0] sum_row,
  output logic [W-1:0] carry_row
);
  function automatic int next_count(input int n);
    return (n / 4) * 2 + ((n % 4 == 3) ? 2 : (n % 4));
  endfunction

  function automatic int count_at(input int level);
    int n = ROWS;
    for (int l = 0; l < level; l++) n = next_count(n);
    return n;
  endfunction

  function automatic int num_levels();
    int n = ROWS;
    int l = 0;
    while (n > 2) begin
      n = next_count(n);
      l++;
    end
    return l;
  endfunction

  localparam int LEVELS = num_levels();

  localparam int LAST = count_at(LEVELS);

  // Each level holds its own input words; the last level's words are the
  // outputs.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_level
    localparam int NIN = count_at(l);
    localparam int NQ  = NIN / 4;
    localparam int REM = NIN % 4;
    logic [W-1:0] cur [NIN];

    if (l == 0) begin : g_src
      for (genvar r = 0; r < ROWS; r++) begin : g_in
        assign cur[r] = rows[r];
      end
    end else begin : g_src
      for (genvar r = 0; r < NIN; r++) begin : g_in
        assign cur[r] = g_level[l-1].g_red.nxt[r];
      end
    end

    if (l < LEVELS) begin : g_red
      logic [W-1:0] nxt [count_at(l + 1)];

      for (genvar q = 0; q < NQ; q++) begin : g_c42
        compressor_4_2_row #(.W(W)) u_row (
          .x1(cur[4*q]), .x2(cur[4*q+1]), .x3(cur[4*q+2]), .x4(cur[4*q+3]),
          .s (nxt[2*q]), .c(nxt[2*q+1])
        );
      end

      if (REM == 3) begin : g_fa
        assign nxt[2*NQ]   = cur[4*NQ] ^ cur[4*NQ+1] ^ cur[4*NQ+2];
        assign nxt[2*NQ+1] = ((cur[4*NQ] & cur[4*NQ+1]) |
                              (cur[4*NQ+2] & (cur[4*NQ] ^ cur[4*NQ+1]))) << 1;
      end else begin : g_pass
        for (genvar r = 0; r < REM; r++) begin : g_p
          assign nxt[2*NQ+r] = cur[4*NQ+r];
        end
      end
    end
  end

  assign sum_row = g_level[LEVELS].cur[0];
  if (LAST >= 2) begin : g_two
    assign carry_row = g_level[LEVELS].cur[1];
  end else begin : g_one
    assign carry_row = '0;
  end
endmodule
