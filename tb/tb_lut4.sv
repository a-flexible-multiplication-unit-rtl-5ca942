// tb_lut4: checks the 4-input LUT against its truth table for random tables
// and every input combination.
module tb_lut4;
  int checks = 0, failures = 0;
  logic [15:0] tbl;
  logic [3:0]  in;
  logic        f;

  lut4 dut (.table_bits(tbl), .in(in), .f(f));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 40; t++) begin
      // a few fixed functions, then random tables
      case (t)
        0: tbl = 16'h6996;              // 4-input XOR
        1: tbl = 16'h8000;              // 4-input AND
        2: tbl = 16'hFFFE;              // 4-input OR
        default: tbl = 16'($urandom);
      endcase
      for (int i = 0; i < 16; i++) begin
        logic exp_f;
        in = 4'(i);
        #1;
        case (t)
          0: exp_f = ^in;
          1: exp_f = &in;
          2: exp_f = |in;
          default: exp_f = tbl[i];
        endcase
        checks++;
        if (f !== exp_f) begin
          failures++;
          $display("FAIL table=%h in=%b f=%b exp=%b", tbl, in, f, exp_f);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
