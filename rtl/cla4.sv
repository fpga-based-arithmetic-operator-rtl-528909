// cla4: 4-bit carry look-ahead adder.
// Four partial full adders form generate/propagate bits from a and b; one
// look-ahead unit turns them and cin into the carries C1..C4 in parallel;
// each partial full adder then forms its sum bit from its carry. The 5-bit
// result {C4, S3..S0} is sum[4:0], as in the published 4-bit schematic.
// Block generate/propagate are brought out for chaining groups.
// Purely combinational.
module cla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [4:0] sum,   // sum[4] is the carry-out C4
  output logic       gg,    // block generate
  output logic       pg     // block propagate
);
  logic [3:0] g, p, s;
  logic [4:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < 4; i++) begin : g_bit
    pfa u_pfa (.a(a[i]), .b(b[i]), .c(c[i]), .g(g[i]), .p(p[i]), .s(s[i]));
  end

  cla_lookahead u_la (.g(g), .p(p), .cin(cin), .c(c[4:1]), .gg(gg), .pg(pg));

  assign sum = {c[4], s};
endmodule
