// carry_circuit: configurable carry circuit (CF) of the block.
//
// Two carry generators share the inputs and a configured output multiplexer
// picks one:
//  * Multiplier Fast Carry (MFC): the carry of sum_i + a_i*b_i + c_i, the
//    carry a multiplier cell produces. It is built as a select: where c_i
//    and sum_i differ the partial product a_i&b_i decides the carry,
//    otherwise sum_i does.
//  * Adder Fast Carry (AFC): the ordinary full-adder carry of a_i, b_i, c_i.
// Purely combinational; mfc = 1 selects the multiplier carry.
module carry_circuit (
  input  logic ci,     // carry in
  input  logic sum_i,  // sum from the previous row (used by MFC only)
  input  logic a_i,
  input  logic b_i,
  input  logic mfc,    // output multiplexer: 1 = MFC, 0 = AFC
  output logic cout    // carry out
);
  logic pp, mfc_c, afc_c;
  always_comb begin
    pp    = a_i & b_i;
    mfc_c = (ci ^ sum_i) ? pp : sum_i;
    afc_c = pp | ((a_i | b_i) & ci);
    cout  = mfc ? mfc_c : afc_c;
  end
endmodule
