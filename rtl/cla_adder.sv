// cla_adder: WIDTH-bit adder made of 4-bit carry look-ahead groups.
// Inside a group all carries are computed in parallel by the look-ahead
// unit; between groups the carry ripples: each group's carry-out, formed
// from its block generate/propagate, is the next group's carry-in. This is
// the group-ripple arrangement in which a carry born in one group appears
// at its left end after a fixed number of gate delays and then enters the
// group to its left. The look-ahead logic is kept to 4-bit groups because
// wider groups need wider AND/OR gates.
// WIDTH need not be a multiple of 4: the operands are zero-extended to
// whole groups.
// Purely combinational.
module cla_adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned NG = (WIDTH + 3) / 4;   // number of 4-bit groups
  localparam int unsigned EW = 4 * NG;            // extended width

  logic [EW-1:0] ae, be, se;
  logic [NG:0]   gc;                              // group carries

  assign ae = EW'(a);
  assign be = EW'(b);
  assign gc[0] = cin;

  for (genvar k = 0; k < NG; k++) begin : g_grp
    logic [4:0] s5;
    cla4 u_cla4 (
      .a  (ae[4*k +: 4]),
      .b  (be[4*k +: 4]),
      .cin(gc[k]),
      .sum(s5),
      .gg (),
      .pg ()
    );
    assign se[4*k +: 4] = s5[3:0];
    assign gc[k+1]      = s5[4];
  end

  // With zero-extended operands the bit just above WIDTH holds exactly the
  // carry out of bit WIDTH-1.
  if (WIDTH == EW) begin : g_cout_grp
    assign cout = gc[NG];
  end else begin : g_cout_bit
    assign cout = se[WIDTH];
  end

  assign sum  = se[WIDTH-1:0];
endmodule
