// tb_fb_array: end-to-end test of the block array at its default size
// (8 rows x 16 columns). The testbench stands in for the general routing and
// the configuration memory: it writes every block's configuration word and
// drives the general inputs. Each application uses only the dedicated links
// for its sums and carries unless noted. Results are compared with integer
// arithmetic done here.
//  1. 8x8 ripple-carry array multiplier, with and without an accumulate
//     operand on the bottom row's SUM inputs (multiply-accumulate).
//  2. Eight 16-bit ripple adders built from FMUs in full-adder mode.
//  3. Eight 32-bit adders on the two-bit LUT/carry-chain path (AFC).
//  4. The same chain with the carry circuit in multiplier mode (MFC).
//  5. Eight bit-serial 8x8 shift-and-add multipliers using the flip-flops and
//     the SUM1 shift link; the product is ready after 8 clocks.
//  6. An 8-bit logarithmic barrel shifter of SPM multiplexers (3 rows; the
//     testbench routes one stage's outputs to the next stage's inputs).
//  7. An 8-bit counter of four blocks with enable (register feedback routed
//     by the testbench).
//  8. Latch mode of a block's storage element.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_fb_array;
  import fb_pkg::*;
  import fb_tb_pkg::*;

  localparam int R = 8;    // the array's default ROWS
  localparam int C = 16;   // the array's default COLS
  localparam int N = 8;    // multiplier operand width

  int checks = 0, failures = 0;
  int n_par_mul = 0, n_mac = 0, n_fmu_add = 0, n_afc = 0, n_mfc = 0;
  int n_serial = 0, n_shift = 0, n_cnt_hold = 0, n_cnt_wrap = 0, n_latch = 0;

  logic    clk = 0, rst_n = 1;
  fb_cfg_t cfg      [R][C];
  fb_in_t  gin      [R][C];
  logic    sum_edge [C];
  logic    sum1_edge[R];
  logic    cin_edge [R];
  logic    cin1_edge[R];
  fb_out_t gout     [R][C];

  fb_array dut (
    .clk(clk), .rst_n(rst_n), .cfg(cfg), .gin(gin),
    .sum_edge(sum_edge), .sum1_edge(sum1_edge),
    .cin_edge(cin_edge), .cin1_edge(cin1_edge), .gout(gout));

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h exp %0h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic clear_all();
    for (int r = 0; r < R; r++) begin
      for (int c = 0; c < C; c++) begin
        cfg[r][c] = cfg_idle();
        gin[r][c] = '0;
      end
      sum1_edge[r] = 1'b0;
      cin_edge[r]  = 1'b0;
      cin1_edge[r] = 1'b0;
    end
    for (int c = 0; c < C; c++) sum_edge[c] = 1'b0;
  endtask

  task automatic pulse_reset();
    rst_n = 1'b0;
    #1 rst_n = 1'b1;
    #1;
  endtask

  task automatic tick();
    #4 clk = 1'b1;
    #5 clk = 1'b0;
    #1;
  endtask

  // watchdog
  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- tests
  task automatic test_parallel_multiply(int trials);
    clear_all();
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        cfg[r][c].out_x = OUT_SMUL;     // multiplier cell, CIN ripple, SUM from below
      end
    for (int t = 0; t < trials; t++) begin
      logic [N-1:0] a, b;
      logic [2*N-1:0] acc, got;
      a = N'($urandom);
      b = N'($urandom);
      case (t)
        0: begin a = '1; b = '1; end
        1: begin a = '0; b = N'($urandom); end
        2: begin a = 8'd1; b = 8'd1; end
        default: ;
      endcase
      acc = (t % 2 == 0 || t < 3) ? '0 : 16'($urandom);
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          gin[r][c].d1 = (c - r >= 0 && c - r < N) ? a[c - r] : 1'b0;
          gin[r][c].d2 = b[r];
        end
      for (int c = 0; c < C; c++) sum_edge[c] = acc[c];
      #1;
      for (int c = 0; c < C; c++) got[c] = gout[R-1][c].cx;
      chk(64'(got), 64'(16'(32'(a) * 32'(b) + 32'(acc))), $sformatf("A*B+C a=%0d b=%0d c=%0d", a, b, acc));
      if (acc == 0) n_par_mul++; else n_mac++;
    end
  endtask

  task automatic test_fmu_adders(int trials);
    clear_all();
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        cfg[r][c].cm_sum_add   = 1'b1;
        cfg[r][c].cm_carry_add = 1'b1;
        cfg[r][c].out_x = OUT_SMUL;
      end
    for (int t = 0; t < trials; t++) begin
      logic [15:0] a [R], b [R];
      for (int r = 0; r < R; r++) begin
        a[r] = 16'($urandom);
        b[r] = (t == 0) ? ~a[r] : 16'($urandom);
        cin_edge[r] = (t == 0) ? 1'b1 : 1'($urandom);
        for (int c = 0; c < C; c++) begin
          gin[r][c].d1 = a[r][c];
          gin[r][c].d2 = b[r][c];
        end
      end
      #1;
      for (int r = 0; r < R; r++) begin
        logic [16:0] s, got;
        s = 17'(a[r]) + 17'(b[r]) + 17'(cin_edge[r]);
        for (int c = 0; c < C; c++) got[c] = gout[r][c].cx;
        got[16] = gout[r][C-1].cmul;
        chk(64'(got), 64'(s), $sformatf("FMU adder row %0d", r));
        n_fmu_add++;
      end
    end
  endtask

  // two bits per block on the LUT / carry-unit / carry-circuit path
  task automatic test_chain(int trials, logic use_mfc);
    clear_all();
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        cfg[r][c].lut_x      = lut_table(F_XOR3);
        cfg[r][c].lut_y      = use_mfc ? lut_table(F_MCSUM) : lut_table(F_XOR3);
        cfg[r][c].x4_carry   = 1'b1;
        cfg[r][c].y4_carry   = 1'b1;
        cfg[r][c].pm_cc_cin1 = 1'b1;
        cfg[r][c].cf_mfc     = use_mfc;
        cfg[r][c].out_x      = OUT_FX;
        cfg[r][c].out_y      = OUT_FY;
      end
    for (int t = 0; t < trials; t++) begin
      logic [31:0] a [R], b [R], s3 [R];
      for (int r = 0; r < R; r++) begin
        a[r]  = $urandom;
        b[r]  = (t == 0) ? ~a[r] : $urandom;
        s3[r] = $urandom;                 // Y3 inputs, used in MFC mode
        cin1_edge[r] = (t == 0) ? 1'b1 : 1'($urandom);
        for (int c = 0; c < C; c++) begin
          gin[r][c].x[1] = a[r][2*c];
          gin[r][c].x[2] = b[r][2*c];
          gin[r][c].y[1] = a[r][2*c+1];
          gin[r][c].y[2] = b[r][2*c+1];
          gin[r][c].y[3] = s3[r][c];
        end
      end
      #1;
      for (int r = 0; r < R; r++) begin
        logic [32:0] exp_v, got;
        logic carry;
        if (!use_mfc) begin
          exp_v = 33'(a[r]) + 33'(b[r]) + 33'(cin1_edge[r]);
        end else begin
          // per block: X half adds a+b+carry, Y half is a multiplier cell
          carry = cin1_edge[r];
          for (int c = 0; c < C; c++) begin
            int xs, ys;
            xs = int'(a[r][2*c]) + int'(b[r][2*c]) + int'(carry);
            ys = int'(s3[r][c]) + ((a[r][2*c+1] & b[r][2*c+1]) ? 1 : 0) + (xs >= 2 ? 1 : 0);
            exp_v[2*c]   = xs[0];
            exp_v[2*c+1] = ys[0];
            carry = ys >= 2;
          end
          exp_v[32] = carry;
        end
        for (int c = 0; c < C; c++) begin
          got[2*c]   = gout[r][c].cx;
          got[2*c+1] = gout[r][c].cy;
        end
        got[32] = gout[r][C-1].cout;
        chk(64'(got), 64'(exp_v), $sformatf("%s chain row %0d", use_mfc ? "MFC" : "AFC", r));
        if (use_mfc) n_mfc++; else n_afc++;
      end
    end
  endtask

  task automatic test_serial_multiply(int trials);
    clear_all();
    for (int r = 0; r < R; r++)
      for (int c = 0; c <= N; c++) begin
        cfg[r][c].pm_sum1 = 1'b1;            // sum in = neighbour's register
        cfg[r][c].out_x   = OUT_SMUL;
        cfg[r][c].fl_x    = FL_FLOP;
        gin[r][c].en_x    = 1'b1;
      end
    for (int t = 0; t < trials; t++) begin
      logic [N-1:0] a [R], b [R];
      logic [2*N-1:0] low [R];
      int cycles;
      pulse_reset();
      for (int r = 0; r < R; r++) begin
        a[r] = N'($urandom);
        b[r] = (t == 0) ? '1 : N'($urandom);
        if (t == 0) a[r] = '1;
        low[r] = '0;
        for (int c = 0; c < N; c++) gin[r][c].d1 = a[r][c];
      end
      cycles = 0;
      for (int step = 0; step < N; step++) begin
        for (int r = 0; r < R; r++)
          for (int c = 0; c <= N; c++) gin[r][c].d2 = b[r][step];
        #1;
        // bit leaving the accumulator this step: product bit step-1
        if (step > 0)
          for (int r = 0; r < R; r++) low[r][step-1] = gout[r][0].rx;
        tick();
        cycles++;
      end
      chk(64'(cycles), 64'(N), "serial multiply cycle count");
      for (int r = 0; r < R; r++) begin
        logic [N:0] acc;
        logic [2*N-1:0] got;
        for (int c = 0; c <= N; c++) acc[c] = gout[r][c].rx;
        got = (2*N)'(acc) << (N - 1);
        got = got | low[r];
        chk(64'(got), 64'(16'(a[r]) * 16'(b[r])), $sformatf("serial a=%0d b=%0d", a[r], b[r]));
        n_serial++;
      end
    end
  endtask

  task automatic test_barrel_shift(int trials);
    clear_all();
    for (int s = 0; s < 3; s++)
      for (int c = 0; c < 8; c++) begin
        cfg[s][c].spm_dyn = 1'b1;
        cfg[s][c].out_y   = OUT_SPM;
      end
    for (int t = 0; t < trials; t++) begin
      logic [7:0] data, stage, got;
      logic [2:0] sh;
      data = 8'($urandom);
      sh   = 3'(t);
      stage = data;
      for (int s = 0; s < 3; s++) begin
        for (int c = 0; c < 8; c++) begin
          gin[s][c].ex1 = sh[s];
          gin[s][c].bs1 = stage[c];
          gin[s][c].bs2 = (c >= (1 << s)) ? stage[c - (1 << s)] : 1'b0;
        end
        #1;
        for (int c = 0; c < 8; c++) stage[c] = gout[s][c].cy;   // general routing
      end
      got = stage;
      chk(64'(got), 64'(8'(data << sh)), $sformatf("shift %0h << %0d", data, sh));
      n_shift++;
    end
  endtask

  task automatic test_counter(int cycles);
    logic [7:0] model;
    clear_all();
    for (int c = 0; c < 4; c++) begin
      cfg[0][c].lut_x      = lut_table(F_XOR3);
      cfg[0][c].lut_y      = lut_table(F_XOR3);
      cfg[0][c].x4_carry   = 1'b1;
      cfg[0][c].y4_carry   = 1'b1;
      cfg[0][c].pm_cc_cin1 = 1'b1;
      cfg[0][c].out_x      = OUT_FX;
      cfg[0][c].out_y      = OUT_FY;
    end
    cin1_edge[0] = 1'b1;                 // count by one
    pulse_reset();
    model = '0;
    for (int i = 0; i < cycles; i++) begin
      logic en;
      logic [7:0] got;
      en = ($urandom % 8) != 0;
      for (int c = 0; c < 4; c++) begin
        gin[0][c].x[1] = gout[0][c].rx;  // feedback over general routing
        gin[0][c].y[1] = gout[0][c].ry;
        gin[0][c].en_x = en;
        gin[0][c].en_y = en;
      end
      tick();
      if (en) begin
        model = model + 8'd1;
        if (model == 8'd0) n_cnt_wrap++;
      end else n_cnt_hold++;
      for (int c = 0; c < 4; c++) begin
        got[2*c]   = gout[0][c].rx;
        got[2*c+1] = gout[0][c].ry;
      end
      chk(64'(got), 64'(model), "counter");
    end
  endtask

  task automatic test_latch(int trials);
    logic model;
    clear_all();
    cfg[5][5].out_x = OUT_EX2;
    cfg[5][5].fl_x  = FL_LATCH;
    gin[5][5].en_x  = 1'b1;
    pulse_reset();
    model = 1'b0;
    for (int i = 0; i < trials; i++) begin
      gin[5][5].ex2 = 1'($urandom);
      #1 chk(64'(gout[5][5].rx), 64'(model), "latch holds while CLK low");
      clk = 1'b1;
      #1 model = gin[5][5].ex2;
      chk(64'(gout[5][5].rx), 64'(model), "latch transparent");
      gin[5][5].ex2 = ~gin[5][5].ex2;
      #1 model = gin[5][5].ex2;
      chk(64'(gout[5][5].rx), 64'(model), "latch follows");
      n_latch++;
      clk = 1'b0;
      #1;
    end
  endtask

  initial begin
    clear_all();
    pulse_reset();
    test_parallel_multiply(400);
    test_fmu_adders(100);
    test_chain(100, 1'b0);
    test_chain(100, 1'b1);
    test_serial_multiply(40);
    test_barrel_shift(64);
    test_counter(700);
    test_latch(50);

    $display("mechanisms: parallel_multiply=%0d multiply_accumulate=%0d fmu_adder=%0d afc_chain=%0d mfc_chain=%0d serial_multiply=%0d barrel_shift=%0d counter_hold=%0d counter_wrap=%0d latch=%0d",
             n_par_mul, n_mac, n_fmu_add, n_afc, n_mfc, n_serial, n_shift, n_cnt_hold, n_cnt_wrap, n_latch);
    if (n_par_mul == 0)  begin failures++; $display("FAIL parallel multiply never ran"); end
    if (n_mac == 0)      begin failures++; $display("FAIL multiply-accumulate never ran"); end
    if (n_fmu_add == 0)  begin failures++; $display("FAIL FMU adder never ran"); end
    if (n_afc == 0)      begin failures++; $display("FAIL AFC chain never ran"); end
    if (n_mfc == 0)      begin failures++; $display("FAIL MFC chain never ran"); end
    if (n_serial == 0)   begin failures++; $display("FAIL serial multiply never ran"); end
    if (n_shift == 0)    begin failures++; $display("FAIL barrel shift never ran"); end
    if (n_cnt_hold == 0) begin failures++; $display("FAIL counter enable hold never happened"); end
    if (n_cnt_wrap == 0) begin failures++; $display("FAIL counter wrap never happened"); end
    if (n_latch == 0)    begin failures++; $display("FAIL latch mode never ran"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
