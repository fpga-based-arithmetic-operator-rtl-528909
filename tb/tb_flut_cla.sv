// tb_flut_cla: checks the fracturable-LUT row with its hardened CLA at
// WIDTH = 8. Each trial draws random truth tables, random LUT inputs, a
// random per-bit mode and a random carry-in, then compares every output
// bit with a reference that looks the tables up itself: in logic mode the
// bit is the 6-input LUT (input 5 picks LUT B over LUT A); in arithmetic
// mode it is bit i of (LUT A outputs + LUT B outputs + cin), and cout is
// that sum's carry. Directed trials configure an adder (A = input 0,
// B = input 1) and a subtractor (B = NOT input 1, cin = 1), the uses the
// block is built for, and count how often each mode was exercised.
module tb_flut_cla;
  localparam int W = 8;
  logic [W-1:0][5:0]  lut_in;
  logic [W-1:0][63:0] cfg_lut;
  logic [W-1:0]       cfg_arith, out;
  logic               cin, cout;
  int checks = 0, failures = 0;
  int n_logic = 0, n_arith = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  flut_cla #(.WIDTH(W)) dut (
    .lut_in(lut_in), .cfg_lut(cfg_lut), .cfg_arith(cfg_arith),
    .cin(cin), .out(out), .cout(cout)
  );

  task automatic check();
    logic [W-1:0] la, lb, l6, exp_out;
    logic [W:0]   total;
    #1;
    for (int i = 0; i < W; i++) begin
      int idx;
      idx   = int'(lut_in[i][4:0]);
      la[i] = cfg_lut[i][idx];
      lb[i] = cfg_lut[i][32 + idx];
      l6[i] = lut_in[i][5] ? lb[i] : la[i];
    end
    total = (W+1)'(la) + (W+1)'(lb) + (W+1)'(cin);
    for (int i = 0; i < W; i++) begin
      exp_out[i] = cfg_arith[i] ? total[i] : l6[i];
      if (cfg_arith[i]) n_arith++; else n_logic++;
    end
    checks++;
    if (out !== exp_out) begin
      failures++;
      $display("FAIL out=%b expected %b (arith=%b)", out, exp_out, cfg_arith);
    end
    checks++;
    if (cout !== total[W]) begin
      failures++;
      $display("FAIL cout=%b expected %b", cout, total[W]);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Random configurations and inputs.
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < W; i++) begin
        lut_in[i]  = 6'($urandom);
        cfg_lut[i] = {$urandom, $urandom};
      end
      cfg_arith = W'($urandom);
      cin = 1'($urandom);
      check();
    end
    // Adder and subtractor configurations on random operands.
    for (int n = 0; n < 1000; n++) begin
      logic [W-1:0] x, y, r;
      logic         sub;
      x = W'($urandom); y = W'($urandom); sub = 1'($urandom);
      for (int i = 0; i < W; i++) begin
        lut_in[i]  = {2'($urandom), 2'b00, y[i], x[i]};
        lut_in[i][5] = 1'b0;
        cfg_lut[i] = {sub ? 32'h3333_3333 : 32'hCCCC_CCCC, 32'hAAAA_AAAA};
      end
      cfg_arith = '1;
      cin = sub;
      check();
      r = sub ? x - y : x + y;
      checks++;
      if (out !== r) begin
        failures++;
        $display("FAIL %s %h %h = %h expected %h", sub ? "sub" : "add", x, y, out, r);
      end
    end
    checks++;
    if (n_logic == 0 || n_arith == 0) begin
      failures++;
      $display("FAIL mode not exercised: logic=%0d arith=%0d", n_logic, n_arith);
    end
    $display("mode bits exercised: logic=%0d arithmetic=%0d", n_logic, n_arith);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
