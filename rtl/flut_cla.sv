// flut_cla: a row of fracturable-LUT logic elements sharing a hardened
// carry look-ahead adder, the arithmetic logic block of the FPGA fabric.
//
// Each bit position i has two 5-input LUTs (LUT A and LUT B) reading the
// same five inputs lut_in[i][4:0]. Used whole, the pair is one 6-input LUT:
// a 2:1 mux, steered by the sixth input lut_in[i][5], picks LUT B when it
// is 1 and LUT A when it is 0. Used fractured, LUT A drives the adder's
// operand bit A_i and LUT B its operand bit B_i, so each LUT can compute
// an arbitrary function of the inputs before the addition (an adder, a
// subtractor with inverted B, an operand mux, ...) at no extra LUT cost.
// A per-bit output mux, set by cfg_arith[i], then drives out[i] with the
// adder's sum bit S_i (arithmetic mode) or the 6-LUT output (logic mode).
// The hardened adder is the group-ripple CLA (cla_adder); cin and cout
// are its carry-in and carry-out.
//
// The configuration inputs stand for the block's SRAM configuration bits
// and are meant to be held static: cfg_lut[i][31:0] is the truth table of
// LUT A and cfg_lut[i][63:32] that of LUT B, entry k being the output for
// inputs lut_in[i][4:0] == k. The LUT pair, the operand wiring and the
// output mux follow the published logic-element diagram; the select of
// the 6-LUT mux (sixth input) and of the output mux (a configuration bit)
// are this design's choices. Purely combinational.
module flut_cla #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0][5:0]  lut_in,     // per-bit LUT inputs
  input  logic [WIDTH-1:0][63:0] cfg_lut,    // {LUT B, LUT A} truth tables
  input  logic [WIDTH-1:0]       cfg_arith,  // 1: out = sum, 0: out = 6-LUT
  input  logic                   cin,        // adder carry-in
  output logic [WIDTH-1:0]       out,
  output logic                   cout        // adder carry-out
);
  logic [WIDTH-1:0] op_a, op_b, lut6, sum;

  for (genvar i = 0; i < WIDTH; i++) begin : g_le
    always_comb begin
      op_a[i] = cfg_lut[i][{1'b0, lut_in[i][4:0]}];
      op_b[i] = cfg_lut[i][{1'b1, lut_in[i][4:0]}];
      lut6[i] = lut_in[i][5] ? op_b[i] : op_a[i];
      out[i]  = cfg_arith[i] ? sum[i] : lut6[i];
    end
  end

  cla_adder #(.WIDTH(WIDTH)) u_cla (
    .a(op_a), .b(op_b), .cin(cin), .sum(sum), .cout(cout)
  );
endmodule
