// tb_flip_flop_latch: checks the storage element in both modes. As a
// flip-flop q must take d only at a rising clock edge with en high, so a
// value is seen one cycle after it is applied; as a latch q must follow d
// while clk and en are high and hold otherwise. Reset clears q.
module tb_flip_flop_latch;
  import fb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, en = 0, d = 0, q;
  fl_mode_e mode = FL_FLOP;
  logic model;

  flip_flop_latch dut (.clk(clk), .rst_n(rst_n), .en(en), .mode(mode), .d(d), .q(q));

  task automatic check(logic exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%b exp=%b at %0t", what, q, exp, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #4 check(1'b0, "reset");
    rst_n = 1;
    // flip-flop mode: drive d while clk is low, step one edge at a time
    model = 1'b0;
    for (int i = 0; i < 200; i++) begin
      d  = 1'($urandom);
      en = ($urandom % 4) != 0;
      #2 check(model, "ff holds between edges");
      clk = 1;
      #1;
      if (en) model = d;
      check(model, "ff after edge");
      d = ~d;               // a change while clk is high must not pass
      #1 check(model, "ff not transparent");
      clk = 0;
      #1;
    end
    // latch mode
    mode = FL_LATCH;
    rst_n = 0; #1 check(1'b0, "latch reset"); rst_n = 1;
    model = 1'b0;
    for (int i = 0; i < 200; i++) begin
      en = ($urandom % 4) != 0;
      d  = 1'($urandom);
      #1 check(model, "latch holds while clk low");
      clk = 1;
      #1;
      if (en) model = d;
      check(model, "latch open");
      d = 1'($urandom);
      #1;
      if (en) model = d;
      check(model, "latch follows d while clk high");
      clk = 0;
      #1;
      d = ~d;
      #1 check(model, "latch closed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
