// cla_multiplier: signed shift-and-add multiplier built on CLA adders.
//
// The product x * c is the sum of copies of x shifted left by j for every
// bit c[j] that is set. In two's complement the top bit of c weighs
// -2^(CW-1), so that last partial product is subtracted instead of added:
// it is inverted and added with a carry-in of 1. The CW partial products
// are accumulated by a chain of CW-1 carry look-ahead adders of the full
// product width, x being sign-extended to that width first. The result is
// exact: a CW-bit by XW-bit signed product always fits in XW+CW bits.
// Using shifts and CLA additions in place of a generic multiplier is the
// published design's idea; the linear accumulation order and the
// sign handling are this design's choices. Purely combinational.
module cla_multiplier #(
  parameter int unsigned XW = 16,   // width of x (sample)
  parameter int unsigned CW = 16,   // width of c (coefficient)
  localparam int unsigned PW = XW + CW
) (
  input  logic signed [XW-1:0] x,
  input  logic signed [CW-1:0] c,
  output logic signed [PW-1:0] p
);
  logic [PW-1:0] xs;              // sign-extended x
  logic [PW-1:0] pp  [CW];        // partial products (last one inverted)
  logic [PW-1:0] acc [CW];        // running sums

  assign xs = PW'(x);

  for (genvar j = 0; j < CW; j++) begin : g_pp
    if (j == CW - 1) begin : g_neg
      assign pp[j] = c[j] ? ~(xs << j) : '1;   // ~0 + 1 adds nothing
    end else begin : g_pos
      assign pp[j] = c[j] ? (xs << j) : '0;
    end
  end

  if (CW == 1) begin : g_one
    // A 1-bit signed c is 0 or -1: the product is 0 or -x.
    cla_adder #(.WIDTH(PW)) u_add (
      .a('0), .b(pp[0]), .cin(1'b1), .sum(acc[0]), .cout()
    );
  end else begin : g_chain
    assign acc[0] = pp[0];
    for (genvar j = 1; j < CW; j++) begin : g_add
      cla_adder #(.WIDTH(PW)) u_add (
        .a   (acc[j-1]),
        .b   (pp[j]),
        .cin (j == CW - 1),
        .sum (acc[j]),
        .cout()
      );
    end
  end

  assign p = acc[CW-1];
endmodule
