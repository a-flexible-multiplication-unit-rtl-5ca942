// flip_flop_latch: configurable storage element (F/L) of the block.
//
// Configured as a flip-flop it loads d on the rising edge of clk while en is
// high. Configured as a latch it is transparent while clk and en are both
// high and holds otherwise. rst_n clears it asynchronously. The two storage
// styles are separate elements and the mode picks which one drives q, so the
// latch this module infers is intended. The enable, the latch polarity and the
// reset are this design's choices; the block diagram shows CLK and EN only.
module flip_flop_latch
  import fb_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  fl_mode_e mode,
  input  logic     d,
  output logic     q
);
  logic q_ff, q_lat;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                     q_ff <= 1'b0;
    else if (en && mode == FL_FLOP) q_ff <= d;

  always_latch
    if (!rst_n)                               q_lat = 1'b0;
    else if (clk && en && mode == FL_LATCH)   q_lat = d;

  always_comb q = (mode == FL_LATCH) ? q_lat : q_ff;
endmodule
