// tb_fir_filter: end-to-end test of the 16-tap FIR filter at its default
// sizes (16-bit samples and coefficients, 32-bit output).
//
// A reference model keeps the last 16 input samples and forms
// y(n) = sum coeff[k] * x(n-k) in 64-bit integers; after every rising edge
// the filter output must equal that sum modulo 2^32, which also checks the
// one-clock latency. The stimulus runs through several phases:
//   1. impulse: a single 1 must reproduce the coefficients in order;
//   2. step into a symmetric low-pass filter, then a 3000-sample stream of
//      a square-wave test tone plus noise through the same filter;
//   3. full-scale random samples and coefficients, which drive the sum
//      past the 32-bit range so the output wraps;
//   4. coefficients rewritten while samples stream;
//   5. a reset in mid-stream, after which the output and history are zero.
// Each mechanism (impulse response, wrap-around, negative output,
// coefficient change, reset) is counted, and one that never happened is a
// failure.
module tb_fir_filter;
  localparam int NT = 16;
  logic               clk = 0, rst;
  logic signed [15:0] coeff [NT];
  logic signed [15:0] filter_in;
  logic signed [31:0] filter_out;
  longint             hist [NT];
  int checks = 0, failures = 0;
  int n_impulse = 0, n_wrap = 0, n_negative = 0, n_coeff_change = 0, n_reset = 0;
  always #5 clk = ~clk;

  fir_filter dut (
    .clk(clk), .rst(rst), .coeff(coeff), .filter_in(filter_in), .filter_out(filter_out)
  );

  // Apply one sample, clock it in, check the output; returns the exact sum.
  task automatic step(input logic signed [15:0] x, output longint exact);
    filter_in = x;
    hist[0] = longint'(x);
    exact = 0;
    for (int k = 0; k < NT; k++) exact += longint'(coeff[k]) * hist[k];
    @(posedge clk); #1;
    checks++;
    if (filter_out !== 32'(exact)) begin
      failures++;
      $display("FAIL y = %0d expected %0d (mod 2^32 of %0d)", filter_out, int'(32'(exact)), exact);
    end
    if (exact > longint'(32'sh7FFF_FFFF) || exact < -longint'(32'sh7FFF_FFFF) - 1) n_wrap++;
    if (filter_out < 0) n_negative++;
    for (int k = NT-1; k > 0; k--) hist[k] = hist[k-1];
  endtask

  task automatic do_reset();
    rst = 1; filter_in = '0;
    @(posedge clk); #1;
    rst = 0;
    checks++;
    if (filter_out !== '0) begin
      failures++;
      $display("FAIL output %0d after reset", filter_out);
    end
    for (int k = 0; k < NT; k++) hist[k] = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint y;
    for (int k = 0; k < NT; k++) coeff[k] = 16'(($urandom % 2001) - 1000);
    do_reset();
    n_reset++;

    // 1. Impulse response reproduces the coefficients.
    begin
      int ok = 1;
      step(16'sd1, y);
      if (y != longint'(coeff[0]) || filter_out != 32'(coeff[0])) ok = 0;
      for (int k = 1; k < NT; k++) begin
        step(16'sd0, y);
        if (filter_out != 32'(coeff[k])) ok = 0;
      end
      checks++;
      if (!ok) begin failures++; $display("FAIL impulse response"); end
      else n_impulse++;
    end

    // 2. Step and a test tone through a symmetric low-pass filter.
    begin
      automatic int lp [NT] = '{-120, -210, -150, 180, 820, 1650, 2420, 2860,
                                2860, 2420, 1650, 820, 180, -150, -210, -120};
      for (int k = 0; k < NT; k++) coeff[k] = 16'(lp[k]);
      n_coeff_change++;
      for (int n = 0; n < 40; n++) step(16'sd1000, y);
      checks++;
      if (filter_out != 32'(1000 * (lp.sum()))) begin
        failures++;
        $display("FAIL step response %0d", filter_out);
      end
      for (int n = 0; n < 3000; n++) begin
        int tone;
        tone = ((n % 64) < 32) ? 12000 : -12000;
        step(16'(tone + int'($urandom % 4001) - 2000), y);
      end
    end

    // 3. Full-scale random samples and coefficients (output wraps).
    for (int k = 0; k < NT; k++) coeff[k] = 16'sh8000;
    n_coeff_change++;
    for (int n = 0; n < 40; n++) step(16'sh8000, y);
    for (int k = 0; k < NT; k++) coeff[k] = 16'($urandom);
    n_coeff_change++;
    for (int n = 0; n < 2000; n++) step(16'($urandom), y);

    // 4. Coefficients rewritten while samples stream.
    for (int n = 0; n < 500; n++) begin
      coeff[$urandom % NT] = 16'($urandom);
      n_coeff_change++;
      step(16'($urandom), y);
    end

    // 5. Reset in mid-stream, then the history must be empty.
    do_reset();
    n_reset++;
    for (int n = 0; n < 20; n++) step(16'($urandom), y);

    $display("mechanisms: impulse=%0d wrap=%0d negative=%0d coeff_change=%0d reset=%0d",
             n_impulse, n_wrap, n_negative, n_coeff_change, n_reset);
    checks++;
    if (n_impulse == 0 || n_wrap == 0 || n_negative == 0 || n_coeff_change == 0 || n_reset < 2) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
