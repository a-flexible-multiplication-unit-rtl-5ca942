// tb_functional_block: drives one functional block through each of its
// configurations and checks the outputs against arithmetic worked out here:
//  * FMU as multiplier cell and as full adder, carry from CIN or CIN1;
//  * the two-bit ripple adder of X-FG, carry unit, Y-FG and the carry
//    circuit in adder (AFC) mode;
//  * the Y half as a multiplier cell with the carry circuit in MFC mode;
//  * the SPM with static and dynamic select, and the Z function generator;
//  * the flip-flop (one-cycle latency, enable) and latch modes of RX/RY.
module tb_functional_block;
  import fb_pkg::*;
  import fb_tb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  fb_cfg_t cfg;
  logic [4:1] x, y;
  logic bs1, bs2, d1, d2, ex1, ex2, en_x, en_y, sum, sum1, cin, cin1;
  logic cx, rx, cy, ry, smul, cmul, cout;

  functional_block dut (
    .clk(clk), .rst_n(rst_n), .cfg(cfg), .x(x), .y(y), .bs1(bs1), .bs2(bs2),
    .d1(d1), .d2(d2), .ex1(ex1), .ex2(ex2), .en_x(en_x), .en_y(en_y),
    .sum(sum), .sum1(sum1), .cin(cin), .cin1(cin1),
    .cx(cx), .rx(rx), .cy(cy), .ry(ry), .smul(smul), .cmul(cmul), .cout(cout));

  task automatic chk(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic randomize_inputs();
    {x, y}          = 8'($urandom);
    {bs1, bs2, d1, d2, ex1, ex2} = 6'($urandom);
    {sum, sum1, cin, cin1}       = 4'($urandom);
  endtask

  initial begin
    repeat (100000) #1;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = cfg_idle();
    en_x = 0; en_y = 0;
    randomize_inputs();
    #1 rst_n = 0;
    #1 rst_n = 1;

    // FMU, all CM/PM settings
    for (int i = 0; i < 400; i++) begin
      int mc, fa;
      logic fcin, fsum;
      randomize_inputs();
      cfg = cfg_idle();
      {cfg.cm_sum_add, cfg.cm_carry_add, cfg.pm_fmu_cin1, cfg.pm_sum1} = 4'($urandom);
      cfg.out_x = OUT_SMUL;
      cfg.out_y = OUT_CMUL;
      #1;
      fcin = cfg.pm_fmu_cin1 ? cin1 : cin;
      fsum = cfg.pm_sum1 ? sum1 : sum;
      mc = int'(fsum) + ((d1 & d2) ? 1 : 0) + int'(fcin);
      fa = int'(d1) + int'(d2) + int'(fcin);
      chk(cx, cfg.cm_sum_add   ? fa[0] : mc[0], "fmu sum on CX");
      chk(cy, cfg.cm_carry_add ? fa[1] : mc[1], "fmu carry on CY");
    end

    // two-bit adder: {cout,fy,fx} = {Y1,X1} + {Y2,X2} + carry in
    for (int i = 0; i < 200; i++) begin
      int a, b, s;
      logic cc;
      randomize_inputs();
      cfg = cfg_idle();
      cfg.lut_x = lut_table(F_XOR3);
      cfg.lut_y = lut_table(F_XOR3);
      cfg.x4_carry = 1'b1;
      cfg.y4_carry = 1'b1;
      cfg.pm_cc_cin1 = 1'($urandom);
      cfg.cf_mfc = 1'b0;
      cfg.out_x = OUT_FX;
      cfg.out_y = OUT_FY;
      #1;
      cc = cfg.pm_cc_cin1 ? cin1 : cin;
      a = int'({y[1], x[1]});
      b = int'({y[2], x[2]});
      s = a + b + int'(cc);
      chk(cx,   s[0], "adder bit 0");
      chk(cy,   s[1], "adder bit 1");
      chk(cout, s[2], "COUT (AFC)");
    end

    // Y half as multiplier cell: {cout,fy} = Y3 + Y1*Y2 + carry of X half
    for (int i = 0; i < 200; i++) begin
      int cm, ms;
      randomize_inputs();
      cfg = cfg_idle();
      cfg.lut_y = lut_table(F_MCSUM);
      cfg.y4_carry = 1'b1;
      cfg.cf_mfc = 1'b1;
      cfg.out_x = OUT_COUT;
      cfg.out_y = OUT_FY;
      #1;
      cm = int'(x[1]) + int'(x[2]) + int'(cin);   // X-half carry
      ms = int'(y[3]) + ((y[1] & y[2]) ? 1 : 0) + int'(cm >= 2);
      chk(cy, ms[0], "Y multiplier-cell sum");
      chk(cx, ms[1], "COUT (MFC)");
    end

    // SPM and Z-FG
    for (int i = 0; i < 200; i++) begin
      logic sel, fs, fx_e, fy_e;
      randomize_inputs();
      cfg = cfg_idle();
      cfg.lut_x = lut_table(F_AND01);       // X1 & X2
      cfg.lut_y = lut_table(F_IN0);         // Y1
      cfg.lut_z = lut_table(F_ZMIX);        // (FX & FY) ^ zmux ^ EX2
      {cfg.spm_dyn, cfg.spm_sel, cfg.z_spm} = 3'($urandom);
      cfg.out_x = OUT_SPM;
      cfg.out_y = OUT_FZ;
      #1;
      sel  = cfg.spm_dyn ? ex1 : cfg.spm_sel;
      fs   = sel ? bs2 : bs1;
      fx_e = x[1] & x[2];
      fy_e = y[1];
      chk(cx, fs, "SPM");
      chk(cy, (fx_e & fy_e) ^ (cfg.z_spm ? fs : (sum ^ (d1 & d2) ^ cin)) ^ ex2, "Z-FG");
    end

    // EX2 straight to the register, flip-flop mode: one cycle latency, enable
    cfg = cfg_idle();
    cfg.out_x = OUT_EX2;
    cfg.out_y = OUT_EX2;
    cfg.fl_x = FL_FLOP;
    cfg.fl_y = FL_LATCH;
    begin
      logic mx, my;
      #1;
      mx = rx; my = ry;
      for (int i = 0; i < 200; i++) begin
        ex2 = 1'($urandom);
        en_x = 1'($urandom);
        en_y = 1'($urandom);
        #1 chk(rx, mx, "flip-flop holds before the edge");
        clk = 1;
        #1;
        if (en_x) mx = ex2;
        if (en_y) my = ex2;
        chk(rx, mx, "flip-flop after the edge");
        chk(ry, my, "latch open while CLK high");
        ex2 = ~ex2;
        #1;
        if (en_y) my = ex2;
        chk(rx, mx, "flip-flop not transparent");
        chk(ry, my, "latch follows while CLK high");
        clk = 0;
        #1;
        ex2 = ~ex2;
        #1 chk(ry, my, "latch holds while CLK low");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
