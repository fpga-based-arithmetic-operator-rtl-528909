// tb_cla_multiplier: checks the shift-and-add CLA multiplier at its
// default 16 x 16 signed size, and at 5 x 3 bits exhaustively. Corner
// cases cover zero, one, minus one and both most-negative operands;
// random operands fill the rest. Every product is compared with the
// integer product of the signed operands.
module tb_cla_multiplier;
  logic signed [15:0] x, c;
  logic signed [31:0] p;
  logic signed [4:0]  xs;
  logic signed [2:0]  cs;
  logic signed [7:0]  ps;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  cla_multiplier dut (.x(x), .c(c), .p(p));
  cla_multiplier #(.XW(5), .CW(3)) dut_s (.x(xs), .c(cs), .p(ps));

  task automatic check();
    longint e;
    #1;
    e = longint'(x) * longint'(c);
    checks++;
    if (longint'(p) != e) begin
      failures++;
      $display("FAIL %0d * %0d = %0d expected %0d", x, c, p, e);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic signed [15:0] corner[6] = '{16'sd0, 16'sd1, -16'sd1,
        16'sh7FFF, 16'sh8000, 16'sd1234};
    foreach (corner[i]) foreach (corner[j]) begin
      x = corner[i]; c = corner[j]; check();
    end
    for (int n = 0; n < 20000; n++) begin
      x = 16'($urandom); c = 16'($urandom); check();
    end
    for (int v = 0; v < 256; v++) begin
      {xs, cs} = 8'(v);
      #1;
      checks++;
      if (int'(ps) != int'(xs) * int'(cs)) begin
        failures++;
        $display("FAIL small %0d * %0d = %0d", xs, cs, ps);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
