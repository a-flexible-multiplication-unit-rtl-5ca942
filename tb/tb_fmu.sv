// tb_fmu: exhaustive check of the flexible multiplier unit. In multiplier-cell
// mode {carry,sum} must equal sum_in + ai*bj + cin; in full-adder mode it must
// equal ai + bj + cin; mixed CM settings take each output from its own cell.
module tb_fmu;
  int checks = 0, failures = 0;
  logic ai, bj, sum_in, cin, cm_s, cm_c, s, c;

  fmu dut (.ai(ai), .bj(bj), .sum_in(sum_in), .cin(cin),
           .cm_sum_add(cm_s), .cm_carry_add(cm_c), .sum_out(s), .carry_out(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      int mc, fa;
      {cm_c, cm_s, ai, bj, sum_in, cin} = 6'(i);
      #1;
      mc = int'(sum_in) + ((ai & bj) ? 1 : 0) + int'(cin);
      fa = int'(ai) + int'(bj) + int'(cin);
      checks++;
      if (s !== (cm_s ? fa[0] : mc[0])) begin
        failures++;
        $display("FAIL sum i=%0d s=%b", i, s);
      end
      checks++;
      if (c !== (cm_c ? fa[1] : mc[1])) begin
        failures++;
        $display("FAIL carry i=%0d c=%b", i, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
