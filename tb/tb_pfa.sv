// tb_pfa: exhaustive check of the partial full adder against the
// generate / propagate / kill truth table of a one-bit adder: for all
// eight input combinations, g must be the carry a bit makes on its own,
// p must mark exactly-one-operand-set, and s must be the sum bit.
module tb_pfa;
  logic a, b, c, g, p, s;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  pfa dut (.a(a), .b(b), .c(c), .g(g), .p(p), .s(s));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, c} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(c);
      checks++;
      if (s !== total[0]) begin failures++; $display("FAIL sum a=%0d b=%0d c=%0d s=%0d", a, b, c, s); end
      checks++;
      if (g !== (a && b)) begin failures++; $display("FAIL gen a=%0d b=%0d g=%0d", a, b, g); end
      checks++;
      if (p !== (int'(a) + int'(b) == 1)) begin failures++; $display("FAIL prop a=%0d b=%0d p=%0d", a, b, p); end
      // The carry-out a full adder would make is g | p&c.
      checks++;
      if ((g | (p & c)) !== total[1]) begin failures++; $display("FAIL carry a=%0d b=%0d c=%0d", a, b, c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
