// tb_carry_unit: exhaustive check that the carry unit gives the carry of
// a + b + cin.
module tb_carry_unit;
  int checks = 0, failures = 0;
  logic a, b, cin, cout;

  carry_unit dut (.a(a), .b(b), .cin(cin), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, cin} = 3'(i);
      #1;
      checks++;
      if (cout !== ((int'(a) + int'(b) + int'(cin)) >= 2)) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b cout=%b", a, b, cin, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
