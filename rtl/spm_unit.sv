// spm_unit: special programmable multiplexer (SPM) for barrel shifters.
//
// A 2:1 multiplexer of the block inputs BS1 and BS2. Its select is either a
// configuration bit (fixed routing) or, for a shifter stage, the live signal
// EX1 (one bit of the shift amount), so that one block per bit and stage
// builds a logarithmic shifter without spending a LUT on each multiplexer.
// Purely combinational. Choosing EX1 as the dynamic select is this design's.
module spm_unit (
  input  logic bs1,
  input  logic bs2,
  input  logic ex1,      // dynamic select
  input  logic dyn,      // configuration: 1 = use ex1 as select
  input  logic sel_cfg,  // configuration: static select
  output logic y         // bs2 when selected, otherwise bs1
);
  always_comb y = (dyn ? ex1 : sel_cfg) ? bs2 : bs1;
endmodule
