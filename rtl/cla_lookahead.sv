// cla_lookahead: carry look-ahead unit for one 4-bit group.
// Every carry is a two-level sum of products of the group's generate and
// propagate bits and the group carry-in, so all four carries settle at the
// same time instead of rippling:
//   C1 = G0 + P0.Cin
//   C2 = G1 + P1.G0 + P1.P0.Cin
//   C3 = G2 + P2.G1 + P2.P1.G0 + P2.P1.P0.Cin
//   C4 = G3 + P3.G2 + P3.P2.G1 + P3.P2.P1.G0 + P3.P2.P1.P0.Cin
// It also gives the block generate GG and block propagate PG, so that
// C4 = GG + PG.Cin can be formed by a neighbouring group. Combinational.
module cla_lookahead (
  input  logic [3:0] g,    // generate bits G3..G0
  input  logic [3:0] p,    // propagate bits P3..P0
  input  logic       cin,  // group carry-in C0
  output logic [4:1] c,    // carries C4..C1 (C4 is the group carry-out)
  output logic       gg,   // block generate
  output logic       pg    // block propagate
);
  always_comb begin
    c[1] = g[0] | (p[0] & cin);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0])
         | (p[2] & p[1] & p[0] & cin);
    gg   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1])
         | (p[3] & p[2] & p[1] & g[0]);
    pg   = &p;
    c[4] = gg | (pg & cin);
  end
endmodule
