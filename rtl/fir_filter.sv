// fir_filter: direct-form FIR filter whose arithmetic is carry look-ahead
// adders mapped onto fracturable-LUT logic elements.
//
//   y(n) = sum_{k=0}^{NTAPS-1} coeff[k] * x(n-k)
//
// Structure, left to right as in the published block diagram:
//  * a delay line of NTAPS-1 D-FF stages holds x(n-1) .. x(n-NTAPS+1);
//    x(n) itself is filter_in;
//  * one cla_multiplier per tap forms coeff[k] * x(n-k) exactly, in XW+CW
//    bits, by shift-and-add with CLA adders;
//  * a chain of NTAPS-1 adders sums the products, adder k adding product k
//    to the running sum of adders before it. Each adder is a flut_cla row of
//    YW logic elements in arithmetic mode: LUT A passes the running-sum bit
//    (LUT input 0), LUT B the product bit (LUT input 1), and the hardened
//    CLA adds them, which is how a mapped FPGA design uses the block.
//  * filter_out is a register loaded with the chain's sum on every rising
//    clock edge.
//
// Timing: one sample per clock. The filter_out seen after a rising edge is
// y(n) for the filter_in x(n) present before that edge, with the delay line
// holding the samples of the previous edges: one clock of latency.
// Reset (synchronous, active high) clears the delay line and filter_out.
//
// Numbers: samples and coefficients are signed two's complement. The sum is
// kept modulo 2^YW; with the 16-bit samples and coefficients used here a
// sum of 16 full-scale products can exceed 32 bits, and then wraps.
// The 16 taps, the 16-bit input and the 32-bit output follow the published
// design; the coefficient width, coefficients taken as inputs, the reset
// and the output register are this design's choices. Needs NTAPS >= 2.
module fir_filter
  import fir_pkg::*;
#(
  parameter int unsigned NTAPS = NTAPS_DEF,
  parameter int unsigned XW    = XW_DEF,
  parameter int unsigned CW    = CW_DEF,
  parameter int unsigned YW    = YW_DEF
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic signed [CW-1:0] coeff [NTAPS],
  input  logic signed [XW-1:0] filter_in,
  output logic signed [YW-1:0] filter_out
);
  localparam int unsigned PW = XW + CW;

  if (NTAPS < 2) begin : g_check_ntaps
    $error("fir_filter needs NTAPS >= 2");
  end

  // LUT truth tables: entry k is the output for inputs k, so a LUT that
  // copies input 0 has every odd entry set, one that copies input 1 every
  // entry with bit 1 set.
  localparam logic [31:0] LUT_PASS_IN0 = 32'hAAAA_AAAA;
  localparam logic [31:0] LUT_PASS_IN1 = 32'hCCCC_CCCC;

  logic [XW-1:0]        xtap [NTAPS];
  logic signed [PW-1:0] prod [NTAPS];
  logic [YW-1:0]        prod_y [NTAPS];
  logic [YW-1:0]        acc [NTAPS];

  delay_line #(.W(XW), .DEPTH(NTAPS-1)) u_delay (
    .clk (clk),
    .rst (rst),
    .din (filter_in),
    .taps(xtap)
  );

  for (genvar k = 0; k < NTAPS; k++) begin : g_tap
    cla_multiplier #(.XW(XW), .CW(CW)) u_mul (
      .x(signed'(xtap[k])),
      .c(coeff[k]),
      .p(prod[k])
    );
    // Sign-extend (or truncate) the product to the accumulator width.
    assign prod_y[k] = YW'(prod[k]);
  end

  assign acc[0] = prod_y[0];

  for (genvar k = 1; k < NTAPS; k++) begin : g_add
    logic [YW-1:0][5:0]  le_in;
    logic [YW-1:0][63:0] le_cfg;
    for (genvar i = 0; i < YW; i++) begin : g_bit
      assign le_in[i]  = {4'b0000, prod_y[k][i], acc[k-1][i]};
      assign le_cfg[i] = {LUT_PASS_IN1, LUT_PASS_IN0};
    end
    flut_cla #(.WIDTH(YW)) u_add (
      .lut_in   (le_in),
      .cfg_lut  (le_cfg),
      .cfg_arith('1),
      .cin      (1'b0),
      .out      (acc[k]),
      .cout     ()
    );
  end

  always_ff @(posedge clk) begin
    if (rst) filter_out <= '0;
    else     filter_out <= signed'(acc[NTAPS-1]);
  end
endmodule
