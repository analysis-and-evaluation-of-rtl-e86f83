// Carry-lookahead adder: s = a + b + cin, cout the carry out of bit W-1.
//
// Bits are grouped by GROUP. Inside a group every carry is computed directly
// from the group's carry-in by the lookahead equations
//   c[i+1] = G[k..i] | P[k..i] & c[k]
// (G, P: generate and propagate of bits k..i, k the first bit of the group).
// Each group also forms its group generate and propagate, and the carry into
// the next group is GG | GP & c_group, so a carry crosses a whole group in
// one AND-OR step.
//
// Interface: combinational. The operator's published description calls for a carry-lookahead adder
// as the final adder; the 4-bit grouping is this design's choice.
module cla_adder #(
  parameter int W     = 34,
  parameter int GROUP = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int NG = (W + GROUP - 1) / GROUP;

  logic [W-1:0] g, p, c;
  logic [NG:0]  cg;

  assign g = a & b;
  assign p = a ^ b;

  logic [NG-1:0] gg, gp;

  // group generate and propagate
  always_comb begin
    for (int k = 0; k < NG; k++) begin
      gg[k] = 1'b0;
      gp[k] = 1'b1;
      for (int i = k * GROUP; i < (k + 1) * GROUP && i < W; i++) begin
        gg[k] = g[i] | (p[i] & gg[k]);
        gp[k] = gp[k] & p[i];
      end
    end
  end

  // carries between groups
  assign cg[0] = cin;
  for (genvar k = 0; k < NG; k++) begin : g_grp
    assign cg[k+1] = gg[k] | (gp[k] & cg[k]);
  end

  // carries inside each group, from the group's carry-in
  always_comb begin
    for (int k = 0; k < NG; k++) begin
      logic pg, pp;
      pg = 1'b0;
      pp = 1'b1;
      for (int i = k * GROUP; i < (k + 1) * GROUP && i < W; i++) begin
        c[i] = pg | (pp & cg[k]);
        pg   = g[i] | (p[i] & pg);
        pp   = pp & p[i];
      end
    end
  end

  assign s    = p ^ c;
  assign cout = cg[NG];
endmodule
