// pm_unit: programmable multiplexers (PM) at the block's dedicated inputs.
//
// Three configured 2:1 selects choose what the arithmetic parts of the block
// receive from the neighbouring blocks over the dedicated interconnect:
//  * fmu_cin: the FMU carry in, from CIN or CIN1;
//  * cc_cin : the carry into the X/Y carry chain, from CIN or CIN1;
//  * fmu_sum: the FMU sum in, from SUM or SUM1.
// Purely combinational; the selects are configuration bits.
module pm_unit (
  input  logic cin,
  input  logic cin1,
  input  logic sum,
  input  logic sum1,
  input  logic sel_fmu_cin1,
  input  logic sel_cc_cin1,
  input  logic sel_sum1,
  output logic fmu_cin,
  output logic cc_cin,
  output logic fmu_sum
);
  always_comb begin
    fmu_cin = sel_fmu_cin1 ? cin1 : cin;
    cc_cin  = sel_cc_cin1  ? cin1 : cin;
    fmu_sum = sel_sum1     ? sum1 : sum;
  end
endmodule
