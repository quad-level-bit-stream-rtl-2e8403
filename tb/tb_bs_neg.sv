// tb_bs_neg: exhaustive check of the bit-stream negation: every code's level changes sign.
module tb_bs_neg;
  import bssp_pkg::*;
  qsym_t a, y;
  int checks = 0, failures = 0;
  bs_neg dut (.a_i(a), .y_o(y));
  initial begin
    for (int i = 0; i < 4; i++) begin
      a = qsym_t'(i);
      #1;
      checks++;
      if (2 * int'(y) - 3 != -(2 * i - 3)) begin
        failures++;
        $display("FAIL code %0d -> %0d", i, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
