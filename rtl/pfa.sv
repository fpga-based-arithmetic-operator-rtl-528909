// pfa: partial full adder, the per-bit cell ("RA") of a carry look-ahead
// adder.
// It forms the bit's generate g = a & b and propagate p = a ^ b from the
// operand bits alone, and the sum s = p ^ c once the look-ahead unit has
// delivered the bit's carry-in c. It does not produce a carry-out: carries
// come from the look-ahead unit. Following the adder's truth table, a bit
// with exactly one operand set propagates, both set generates, none kills.
// Purely combinational.
module pfa (
  input  logic a,   // operand bit A_i
  input  logic b,   // operand bit B_i
  input  logic c,   // carry into this bit, C_i
  output logic g,   // generate G_i
  output logic p,   // propagate P_i
  output logic s    // sum S_i
);
  always_comb begin
    g = a & b;
    p = a ^ b;
    s = p ^ c;
  end
endmodule
