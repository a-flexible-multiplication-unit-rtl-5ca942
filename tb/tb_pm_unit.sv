// tb_pm_unit: exhaustive check of the three programmable input selects.
module tb_pm_unit;
  int checks = 0, failures = 0;
  logic cin, cin1, sum, sum1, s_f, s_c, s_s, fmu_cin, cc_cin, fmu_sum;

  pm_unit dut (.cin(cin), .cin1(cin1), .sum(sum), .sum1(sum1),
               .sel_fmu_cin1(s_f), .sel_cc_cin1(s_c), .sel_sum1(s_s),
               .fmu_cin(fmu_cin), .cc_cin(cc_cin), .fmu_sum(fmu_sum));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      {s_f, s_c, s_s, cin, cin1, sum, sum1} = 7'(i);
      #1;
      checks += 3;
      if (fmu_cin !== (s_f ? cin1 : cin)) begin failures++; $display("FAIL fmu_cin i=%0d", i); end
      if (cc_cin  !== (s_c ? cin1 : cin)) begin failures++; $display("FAIL cc_cin i=%0d", i); end
      if (fmu_sum !== (s_s ? sum1 : sum)) begin failures++; $display("FAIL fmu_sum i=%0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
