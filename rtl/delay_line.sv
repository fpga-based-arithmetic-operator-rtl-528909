// delay_line: tapped shift register of D flip-flop sample delays.
// taps[0] is the input itself; taps[k], k = 1..DEPTH, is the input as it
// was k clock edges ago, one W-bit register stage per delay. A
// synchronous active-high reset clears every stage to zero, so a filter
// fed by it starts from an all-zero history. A new sample is taken on
// every rising clock edge.
module delay_line #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 15
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] din,
  output logic [W-1:0] taps [DEPTH+1]
);
  logic [W-1:0] stage [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < DEPTH; k++) stage[k] <= '0;
    end else begin
      stage[0] <= din;
      for (int k = 1; k < DEPTH; k++) stage[k] <= stage[k-1];
    end
  end

  always_comb begin
    taps[0] = din;
    for (int k = 1; k <= DEPTH; k++) taps[k] = stage[k-1];
  end
endmodule
