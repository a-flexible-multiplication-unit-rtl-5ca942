// fb_pkg: types shared by the functional block (FB) and the FB array.
//
// The FB is the logic block of an island-style FPGA that adds a dedicated
// 1x1 multiplier cell (the FMU), a configurable multiplier/adder carry
// circuit and a barrel-shifter multiplexer to a conventional three-LUT,
// two-register block. Every programmable choice in the block is one field of
// fb_cfg_t. The set of fields follows the parts and multiplexers of the
// block diagram; the encodings are this design's own.
package fb_pkg;

  // Sources the two output multiplexers (towards CX/RX and CY/RY) can pick.
  typedef enum logic [2:0] {
    OUT_FX   = 3'd0,  // X function generator
    OUT_FY   = 3'd1,  // Y function generator
    OUT_FZ   = 3'd2,  // Z function generator
    OUT_SMUL = 3'd3,  // FMU sum out
    OUT_CMUL = 3'd4,  // FMU carry out
    OUT_SPM  = 3'd5,  // special programmable multiplexer
    OUT_COUT = 3'd6,  // configurable carry circuit
    OUT_EX2  = 3'd7   // direct input EX2
  } out_sel_e;

  typedef enum logic {
    FL_FLOP  = 1'b0,  // positive-edge flip-flop
    FL_LATCH = 1'b1   // latch, transparent while CLK is high
  } fl_mode_e;

  typedef struct packed {
    logic [15:0] lut_x;        // X-FG truth table, index {in4,X3,X2,X1}
    logic [15:0] lut_y;        // Y-FG truth table, index {in4,Y3,Y2,Y1}
    logic [15:0] lut_z;        // Z-FG truth table, index {EX2,zmux,FY,FX}
    logic        x4_carry;     // X-FG input 4: 0 = X4, 1 = carry into the block
    logic        y4_carry;     // Y-FG input 4: 0 = Y4, 1 = carry out of the X half
    logic        pm_fmu_cin1;  // FMU carry in: 0 = CIN, 1 = CIN1
    logic        pm_cc_cin1;   // carry-chain carry in: 0 = CIN, 1 = CIN1
    logic        pm_sum1;      // FMU sum in: 0 = SUM, 1 = SUM1
    logic        cm_sum_add;   // FMU sum out: 0 = multiplier cell, 1 = full adder
    logic        cm_carry_add; // FMU carry out: 0 = multiplier cell, 1 = full adder
    logic        cf_mfc;       // carry circuit: 0 = adder fast carry, 1 = multiplier fast carry
    logic        spm_dyn;      // SPM select: 0 = spm_sel bit, 1 = input EX1
    logic        spm_sel;      // static SPM select: 0 = BS1, 1 = BS2
    logic        z_spm;        // Z-FG input 2: 0 = FMU sum, 1 = SPM output
    out_sel_e    out_x;        // X output multiplexer
    out_sel_e    out_y;        // Y output multiplexer
    fl_mode_e    fl_x;         // X flip-flop/latch mode
    fl_mode_e    fl_y;         // Y flip-flop/latch mode
  } fb_cfg_t;

  // General-routing inputs of one block (in the array they are ports).
  typedef struct packed {
    logic [4:1] x;     // X1..X4
    logic [4:1] y;     // Y1..Y4
    logic       bs1;
    logic       bs2;
    logic       d1;
    logic       d2;
    logic       ex1;
    logic       ex2;
    logic       en_x;
    logic       en_y;
  } fb_in_t;

  // Outputs of one block.
  typedef struct packed {
    logic cx;
    logic rx;
    logic cy;
    logic ry;
    logic smul;
    logic cmul;
    logic cout;
  } fb_out_t;


endpackage
