// One-bit full adder, the arithmetic element of every accumulator cell.
//
// Sum is the parity of the three inputs and carry-out is their majority, as
// in the usual full-adder truth table. The property the weighted pattern
// generator relies on follows directly: whenever a_i = ~b_i the carry-out
// equals the carry-in, so a cell whose two operands are held complementary
// passes the carry along unchanged.
//
// Interface: a_i, b_i operand bits, cin_i carry-in; s_o sum, cout_o carry-out.
// Timing: purely combinational.
module full_adder (
  input  logic a_i,
  input  logic b_i,
  input  logic cin_i,
  output logic s_o,
  output logic cout_o
);
  always_comb begin
    s_o    = a_i ^ b_i ^ cin_i;
    cout_o = (a_i & b_i) | (cin_i & (a_i ^ b_i));
  end
endmodule
