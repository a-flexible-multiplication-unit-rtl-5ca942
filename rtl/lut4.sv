// lut4: 4-input lookup table, the function generator of the block (X-FG,
// Y-FG and Z-FG are three copies).
//
// The 16-bit configuration word is the truth table: the output is bit
// {in[3],in[2],in[1],in[0]} of it. Purely combinational.
module lut4 (
  input  logic [15:0] table_bits,  // truth table (configuration)
  input  logic [3:0]  in,          // LUT inputs
  output logic        f            // function output
);
  always_comb f = table_bits[in];
endmodule
