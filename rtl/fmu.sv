// fmu: Flexible Multiplier Unit, the dedicated arithmetic cell of the block.
//
// It holds two single-bit arithmetic cells side by side and two configured
// output multiplexers (CM) that pick which one drives the outputs:
//  * the multiplier cell (MC), a carry-save adder cell extended with the
//    partial-product gate: it adds the partial product ai&bj to the sum
//    arriving from the previous row (sum_in) and to the carry in. Its carry
//    is formed by an internal multiplexer (IM) that is steered by the
//    previous sum: with sum_in = 1 the carry is pp|cin, otherwise pp&cin,
//    which is the majority of the three addends.
//  * a full adder of ai, bj and cin, for plain addition.
// cm_sum_add / cm_carry_add select the full adder's sum / carry instead of
// the MC's. Purely combinational.
//
// The parts (MC, full adder, IM, CM) and their roles follow the block's
// description; the exact gate network is this design's.
module fmu (
  input  logic ai,           // multiplicand bit (D1)
  input  logic bj,           // multiplier bit (D2)
  input  logic sum_in,       // sum from the previous row
  input  logic cin,          // carry in
  input  logic cm_sum_add,   // CM sum select: 0 = MC, 1 = full adder
  input  logic cm_carry_add, // CM carry select: 0 = MC, 1 = full adder
  output logic sum_out,      // SMUL
  output logic carry_out     // CMUL
);
  logic pp;          // partial product
  logic mc_sum, mc_carry;
  logic fa_sum, fa_carry;

  always_comb begin
    pp       = ai & bj;
    // multiplier cell
    mc_sum   = sum_in ^ pp ^ cin;
    mc_carry = sum_in ? (pp | cin) : (pp & cin);   // internal multiplexer IM
    // full adder
    fa_sum   = ai ^ bj ^ cin;
    fa_carry = (ai & bj) | ((ai | bj) & cin);
    // configuration-controlled multiplexers CM
    sum_out   = cm_sum_add   ? fa_sum   : mc_sum;
    carry_out = cm_carry_add ? fa_carry : mc_carry;
  end
endmodule
