// tb_cla_adder: checks the group-ripple CLA adder at its default 32-bit
// width and at 10 bits (a width that ends inside a group). Operands are
// random plus corner cases that carry through every group (all ones plus
// one, alternating patterns); sum and carry-out are compared with the
// integer sum.
module tb_cla_adder;
  logic [31:0] a, b, s;
  logic        cin, co;
  logic [9:0]  a10, b10, s10;
  logic        co10;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  cla_adder dut (.a(a), .b(b), .cin(cin), .sum(s), .cout(co));
  cla_adder #(.WIDTH(10)) dut10 (.a(a10), .b(b10), .cin(cin), .sum(s10), .cout(co10));

  task automatic check();
    logic [32:0] e32;
    logic [10:0] e10;
    #1;
    e32 = 33'(a) + 33'(b) + 33'(cin);
    e10 = 11'(a10) + 11'(b10) + 11'(cin);
    checks++;
    if ({co, s} !== e32) begin
      failures++;
      $display("FAIL32 %h + %h + %b = %b_%h expected %h", a, b, cin, co, s, e32);
    end
    checks++;
    if ({co10, s10} !== e10) begin
      failures++;
      $display("FAIL10 %h + %h + %b = %b_%h expected %h", a10, b10, cin, co10, s10, e10);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '1; b = 32'd1; cin = 0; a10 = '1; b10 = 10'd1; check();
    a = '1; b = 32'd0; cin = 1; a10 = '1; b10 = 10'd0; check();
    a = '1; b = '1;    cin = 1; a10 = '1; b10 = '1;    check();
    a = 32'hAAAA_AAAA; b = 32'h5555_5555; cin = 1; a10 = 10'h2AA; b10 = 10'h155; check();
    a = 32'h0F0F_0F0F; b = 32'h00F1_00F1; cin = 0; a10 = 10'h10F; b10 = 10'h0F1; check();
    for (int n = 0; n < 20000; n++) begin
      a = $urandom; b = $urandom; cin = 1'($urandom);
      a10 = 10'($urandom); b10 = 10'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
