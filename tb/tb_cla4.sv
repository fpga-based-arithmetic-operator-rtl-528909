// tb_cla4: exhaustive check of the 4-bit CLA adder: all 512 combinations of
// a, b and cin, the 5-bit result compared with integer addition, and the
// block generate / propagate with their arithmetic meaning (a+b overflows
// on its own; a+b is exactly 15).
module tb_cla4;
  logic [3:0] a, b;
  logic       cin, gg, pg;
  logic [4:0] sum;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  cla4 dut (.a(a), .b(b), .cin(cin), .sum(sum), .gg(gg), .pg(pg));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      int expected;
      {a, b, cin} = 9'(v);
      #1;
      expected = int'(a) + int'(b) + int'(cin);
      checks++;
      if (int'(sum) != expected) begin
        failures++;
        $display("FAIL %0d + %0d + %0d = %0d, expected %0d", a, b, cin, sum, expected);
      end
      checks++;
      if (gg !== (int'(a) + int'(b) > 15) || pg !== ((a ^ b) == 4'hF)) begin
        failures++;
        $display("FAIL a=%0d b=%0d gg=%b pg=%b", a, b, gg, pg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
