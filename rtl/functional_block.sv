// functional_block: the logic block (FB) of the FPGA.
//
// Besides a conventional LUT block (three 4-input function generators X-FG,
// Y-FG, Z-FG and two flip-flop/latches) the FB holds dedicated arithmetic:
//  * the FMU, one 1x1 multiplier cell or full adder on D1, D2, a sum in and
//    a carry in, giving SMUL and CMUL on the dedicated interconnect;
//  * a two-bit carry chain: the fixed carry unit of the X half (X1 + X2 +
//    carry in) feeds the configurable carry circuit (CF) of the Y half, whose
//    output COUT leaves on the dedicated interconnect. In adder mode the CF
//    adds Y1 + Y2; in multiplier mode it gives the carry of Y3 + Y1*Y2, so the
//    Y half can act as a second multiplier cell with Y-FG forming its sum;
//  * the programmable multiplexers (PM) choosing the dedicated carry and sum
//    inputs, and the special multiplexer (SPM) for barrel shifters.
// Two output multiplexers select what drives CX and CY; each output also
// feeds a flip-flop/latch whose state is RX / RY. All paths are
// combinational except RX/RY, which change on the rising CLK edge (or follow
// while CLK is high in latch mode) when EN is high.
//
// The parts, the pin names and the presence of multiplexers on X4, Y4 and in
// front of Z-FG follow the block diagram. Which signal reaches which
// multiplexer input, the SUM1 pin and the reset are
// this design's choices.
//
// In a grid, lint may flag fmu_cin and cc_cin as part of a combinational loop.
// The loop runs through a neighbour's storage element set as a transparent
// latch and its SUM1 input. It exists only for that configuration (see
// fb_array).
module functional_block
  import fb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  fb_cfg_t    cfg,
  // general-routing inputs
  input  logic [4:1] x,      // X1..X4
  input  logic [4:1] y,      // Y1..Y4
  input  logic       bs1,
  input  logic       bs2,
  input  logic       d1,     // FMU multiplicand bit
  input  logic       d2,     // FMU multiplier bit
  input  logic       ex1,
  input  logic       ex2,
  input  logic       en_x,   // enable of the X flip-flop/latch
  input  logic       en_y,   // enable of the Y flip-flop/latch
  // dedicated interconnect inputs
  input  logic       sum,    // sum from the adjacent block below
  input  logic       sum1,   // registered sum from the higher-weight neighbour
  input  logic       cin,    // FMU carry from the lower-weight neighbour
  input  logic       cin1,   // carry-chain carry from the lower-weight neighbour
  // outputs
  output logic       cx,
  output logic       rx,
  output logic       cy,
  output logic       ry,
  output logic       smul,   // dedicated: FMU sum
  output logic       cmul,   // dedicated: FMU carry
  output logic       cout    // dedicated: carry circuit
);
  logic fmu_cin, cc_cin, fmu_sum;
  logic c_mid;              // carry from the X half into the Y half
  logic fx, fy, fz, fs;
  logic x4_in, y4_in, z_in;

  pm_unit u_pm (
    .cin(cin), .cin1(cin1), .sum(sum), .sum1(sum1),
    .sel_fmu_cin1(cfg.pm_fmu_cin1), .sel_cc_cin1(cfg.pm_cc_cin1),
    .sel_sum1(cfg.pm_sum1),
    .fmu_cin(fmu_cin), .cc_cin(cc_cin), .fmu_sum(fmu_sum)
  );

  fmu u_fmu (
    .ai(d1), .bj(d2), .sum_in(fmu_sum), .cin(fmu_cin),
    .cm_sum_add(cfg.cm_sum_add), .cm_carry_add(cfg.cm_carry_add),
    .sum_out(smul), .carry_out(cmul)
  );

  carry_unit u_cu (.a(x[1]), .b(x[2]), .cin(cc_cin), .cout(c_mid));

  carry_circuit u_cf (
    .ci(c_mid), .sum_i(y[3]), .a_i(y[1]), .b_i(y[2]),
    .mfc(cfg.cf_mfc), .cout(cout)
  );

  spm_unit u_spm (
    .bs1(bs1), .bs2(bs2), .ex1(ex1),
    .dyn(cfg.spm_dyn), .sel_cfg(cfg.spm_sel), .y(fs)
  );

  always_comb begin
    x4_in = cfg.x4_carry ? cc_cin : x[4];
    y4_in = cfg.y4_carry ? c_mid  : y[4];
    z_in  = cfg.z_spm    ? fs     : smul;
  end

  lut4 u_lut_x (.table_bits(cfg.lut_x), .in({x4_in, x[3], x[2], x[1]}), .f(fx));
  lut4 u_lut_y (.table_bits(cfg.lut_y), .in({y4_in, y[3], y[2], y[1]}), .f(fy));
  lut4 u_lut_z (.table_bits(cfg.lut_z), .in({ex2, z_in, fy, fx}),       .f(fz));

  // output multiplexers
  function automatic logic pick(out_sel_e s, logic fx_i, logic fy_i, logic fz_i,
                                logic sm, logic cm, logic sp, logic co, logic e2);
    unique case (s)
      OUT_FX:   return fx_i;
      OUT_FY:   return fy_i;
      OUT_FZ:   return fz_i;
      OUT_SMUL: return sm;
      OUT_CMUL: return cm;
      OUT_SPM:  return sp;
      OUT_COUT: return co;
      default:  return e2;
    endcase
  endfunction

  always_comb begin
    cx = pick(cfg.out_x, fx, fy, fz, smul, cmul, fs, cout, ex2);
    cy = pick(cfg.out_y, fx, fy, fz, smul, cmul, fs, cout, ex2);
  end

  flip_flop_latch u_fl_x (.clk(clk), .rst_n(rst_n), .en(en_x), .mode(cfg.fl_x), .d(cx), .q(rx));
  flip_flop_latch u_fl_y (.clk(clk), .rst_n(rst_n), .en(en_y), .mode(cfg.fl_y), .d(cy), .q(ry));

endmodule
