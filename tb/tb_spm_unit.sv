// tb_spm_unit: exhaustive check of the shifter multiplexer with static and
// dynamic (EX1) select.
module tb_spm_unit;
  int checks = 0, failures = 0;
  logic bs1, bs2, ex1, dyn, sel, y;

  spm_unit dut (.bs1(bs1), .bs2(bs2), .ex1(ex1), .dyn(dyn), .sel_cfg(sel), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      logic s;
      {dyn, sel, ex1, bs1, bs2} = 5'(i);
      #1;
      s = dyn ? ex1 : sel;
      checks++;
      if (y !== (s ? bs2 : bs1)) begin
        failures++;
        $display("FAIL dyn=%b sel=%b ex1=%b bs1=%b bs2=%b y=%b", dyn, sel, ex1, bs1, bs2, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
