// fb_array: a ROWS x COLS grid of functional blocks joined by the dedicated
// interconnect.
//
// Rows run bottom (r = 0) to top, columns from bit weight 0 (c = 0) upward.
// Every block is linked to its neighbours by switch-free wires:
//  * SUM  of block (r,c) is SMUL of block (r-1,c), the block below;
//  * CIN  of block (r,c) is CMUL of block (r,c-1), the lower-weight neighbour
//    (ripple carry between multiplier cells or adder cells);
//  * CIN1 of block (r,c) is COUT of block (r,c-1) (the two-bit carry chain);
//  * SUM1 of block (r,c) is RX of block (r,c+1), the registered value of the
//    higher-weight neighbour, which shifts an accumulator one place down per
//    clock for bit-serial multiplication.
// At the edges of the grid these inputs come from the *_edge ports. With the
// FMUs in multiplier-cell mode and D1/D2 fed with the operand bits, the grid
// is a ripple-carry array multiplier whose top row carries the product on
// SMUL, using no general routing. The general routing (row and column
// routing multiplexers) and the configuration memory are not modelled: every
// block's general inputs, outputs and configuration word are ports.
// Timing is that of the blocks: combinational except RX/RY.
//
// Lint tools report a combinational loop through SUM1: RX of a block feeds
// the FMU of its lower neighbour, whose carry ripples back up through CIN.
// The loop only closes when a block's storage element is configured as a
// transparent latch and its neighbour selects SUM1 at the same time; with
// the flip-flop setting that the serial multiplier uses, RX is a register
// output. Like any programmable fabric the array can be configured into a
// loop; the configuration is responsible for avoiding it.
//
// The neighbour assignment of each dedicated wire is this design's choice;
// the grid size has no value in the source description and 8 x 16 is the
// smallest grid that holds an 8 x 8 multiplier in this mapping.
module fb_array
  import fb_pkg::*;
#(
  parameter int unsigned ROWS = 8,
  parameter int unsigned COLS = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  input  fb_cfg_t cfg      [ROWS][COLS],
  input  fb_in_t  gin      [ROWS][COLS],
  input  logic    sum_edge [COLS],   // SUM of the bottom row
  input  logic    sum1_edge[ROWS],   // SUM1 of the highest-weight column
  input  logic    cin_edge [ROWS],   // CIN of column 0
  input  logic    cin1_edge[ROWS],   // CIN1 of column 0
  output fb_out_t gout     [ROWS][COLS]
);
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic sum_i, sum1_i, cin_i, cin1_i;
      // this block's dedicated outputs, as nets of their own so that the
      // neighbour links read separate signals
      logic smul_o, cmul_o, cout_o, rx_o;

      if (r == 0) begin : g_sb
        assign sum_i = sum_edge[c];
      end else begin : g_sn
        assign sum_i = g_row[r-1].g_col[c].smul_o;
      end

      if (c == COLS - 1) begin : g_s1b
        assign sum1_i = sum1_edge[r];
      end else begin : g_s1n
        assign sum1_i = g_row[r].g_col[c+1].rx_o;
      end

      if (c == 0) begin : g_cb
        assign cin_i  = cin_edge[r];
        assign cin1_i = cin1_edge[r];
      end else begin : g_cn
        assign cin_i  = g_row[r].g_col[c-1].cmul_o;
        assign cin1_i = g_row[r].g_col[c-1].cout_o;
      end

      functional_block u_fb (
        .clk   (clk),
        .rst_n (rst_n),
        .cfg   (cfg[r][c]),
        .x     (gin[r][c].x),
        .y     (gin[r][c].y),
        .bs1   (gin[r][c].bs1),
        .bs2   (gin[r][c].bs2),
        .d1    (gin[r][c].d1),
        .d2    (gin[r][c].d2),
        .ex1   (gin[r][c].ex1),
        .ex2   (gin[r][c].ex2),
        .en_x  (gin[r][c].en_x),
        .en_y  (gin[r][c].en_y),
        .sum   (sum_i),
        .sum1  (sum1_i),
        .cin   (cin_i),
        .cin1  (cin1_i),
        .cx    (gout[r][c].cx),
        .rx    (rx_o),
        .cy    (gout[r][c].cy),
        .ry    (gout[r][c].ry),
        .smul  (smul_o),
        .cmul  (cmul_o),
        .cout  (cout_o)
      );

      assign gout[r][c].rx   = rx_o;
      assign gout[r][c].smul = smul_o;
      assign gout[r][c].cmul = cmul_o;
      assign gout[r][c].cout = cout_o;
    end
  end
endmodule
