// tb_carry_circuit: exhaustive check of the configurable carry circuit. MFC
// must give the carry of sum_i + a_i*b_i + c_i, AFC the carry of
// a_i + b_i + c_i.
module tb_carry_circuit;
  int checks = 0, failures = 0;
  logic ci, sum_i, a_i, b_i, mfc, cout;

  carry_circuit dut (.ci(ci), .sum_i(sum_i), .a_i(a_i), .b_i(b_i), .mfc(mfc), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      int total;
      {mfc, ci, sum_i, a_i, b_i} = 5'(i);
      #1;
      total = mfc ? int'(sum_i) + ((a_i & b_i) ? 1 : 0) + int'(ci)
                  : int'(a_i) + int'(b_i) + int'(ci);
      checks++;
      if (cout !== (total >= 2)) begin
        failures++;
        $display("FAIL mfc=%b ci=%b sum=%b a=%b b=%b cout=%b", mfc, ci, sum_i, a_i, b_i, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
