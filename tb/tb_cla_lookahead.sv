// tb_cla_lookahead: exhaustive check of the 4-bit look-ahead unit. For every
// one of the 512 combinations of g, p and cin the carries are compared with
// a bit-serial ripple reference c(i+1) = g(i) | p(i)&c(i), and the block
// generate / propagate with their definitions (carry out with cin = 0, and
// all bits propagating).
module tb_cla_lookahead;
  logic [3:0] g, p;
  logic       cin, gg, pg;
  logic [4:1] c;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  cla_lookahead dut (.g(g), .p(p), .cin(cin), .c(c), .gg(gg), .pg(pg));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      logic [4:0] ref_c;
      logic       ref_gg;
      {g, p, cin} = 9'(v);
      #1;
      ref_c[0] = cin;
      for (int i = 0; i < 4; i++) ref_c[i+1] = g[i] | (p[i] & ref_c[i]);
      ref_gg = 1'b0;
      for (int i = 0; i < 4; i++) ref_gg = g[i] | (p[i] & ref_gg);
      checks++;
      if (c !== ref_c[4:1]) begin
        failures++;
        $display("FAIL g=%b p=%b cin=%b c=%b expected %b", g, p, cin, c, ref_c[4:1]);
      end
      checks++;
      if (gg !== ref_gg || pg !== (p == 4'hF)) begin
        failures++;
        $display("FAIL g=%b p=%b gg=%b pg=%b", g, p, gg, pg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
