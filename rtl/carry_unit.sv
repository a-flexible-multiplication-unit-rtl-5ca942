// carry_unit: the fixed (non-configurable) carry logic of the block's X half.
//
// It forms the full-adder carry of a, b and cin, so that the X function
// generator and this unit together make one bit of a ripple adder whose carry
// feeds the Y half. Purely combinational. The block diagram only names this
// unit; giving it plain adder-carry function is this design's choice.
module carry_unit (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic cout
);
  always_comb cout = (a & b) | (a & cin) | (b & cin);
endmodule
