// tb_delay_line: drives the delay line (16-bit, 15 stages) with random
// samples and checks after every clock edge that tap k holds the sample
// applied k edges earlier, tap 0 the present input; checks that reset
// clears all stages, and that samples from before a reset do not reappear.
module tb_delay_line;
  localparam int W = 16, D = 15;
  logic         clk = 0, rst;
  logic [W-1:0] din;
  logic [W-1:0] taps [D+1];
  logic [W-1:0] hist [D+1];     // reference history, hist[k] = x(n-k)
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  delay_line #(.W(W), .DEPTH(D)) dut (.clk(clk), .rst(rst), .din(din), .taps(taps));

  task automatic compare();
    for (int k = 0; k <= D; k++) begin
      checks++;
      if (taps[k] !== hist[k]) begin
        failures++;
        $display("FAIL tap %0d = %h expected %h", k, taps[k], hist[k]);
      end
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; din = '0;
    @(posedge clk); #1;
    rst = 0;
    for (int k = 0; k <= D; k++) hist[k] = '0;
    for (int round = 0; round < 2; round++) begin
      for (int n = 0; n < 100; n++) begin
        din = W'($urandom);
        hist[0] = din;
        #1 compare();
        @(posedge clk); #1;
        for (int k = D; k > 0; k--) hist[k] = hist[k-1];
      end
      // Reset in the middle of a stream.
      rst = 1; @(posedge clk); #1; rst = 0;
      for (int k = 0; k <= D; k++) hist[k] = '0;
      din = '0; hist[0] = '0;
      #1 compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
