// tb_bs_mult: checks the bit-stream multiplier against an integer model of its
// requantiser, then checks the product of means: two independent sigma-delta coded
// constants a and b must give an output whose normalised mean is a*b.
module tb_bs_mult;
  import bssp_pkg::*;
  import tb_bssp_pkg::*;
  logic clk = 0, rst_n = 0;
  qsym_t a, b, p;
  int checks = 0, failures = 0;
  int e_ref, t, o, sum;
  real va [4] = '{0.5, -0.8, 0.3, 0.9};
  real vb [4] = '{0.6, 0.4, -0.7, 0.75};
  real m;
  sd_src sa, sb;

  bs_mult dut (.clk, .rst_n, .a_i(a), .b_i(b), .p_o(p));

  always #5 clk = ~clk;

  initial begin
    a = 0; b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    e_ref = 0;
    for (int n = 0; n < 20000; n++) begin
      a = qsym_t'($urandom_range(0, 3));
      b = qsym_t'($urandom_range(0, 3));
      #1;
      t = (2 * int'(a) - 3) * (2 * int'(b) - 3) + e_ref;
      o = (t >= 6) ? 3 : (t >= 0) ? 1 : (t >= -6) ? -1 : -3;
      checks++;
      if (2 * int'(p) - 3 != o) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d p=%0d ref=%0d", n, 2 * int'(p) - 3, o);
      end
      e_ref = t - 3 * o;
      @(negedge clk);
    end
    for (int j = 0; j < 4; j++) begin
      sa = new; sb = new;
      sum = 0;
      for (int n = 0; n < 20000; n++) begin
        a = sa.next(va[j]);
        b = sb.next(vb[j]);
        #1;
        sum += 2 * int'(p) - 3;
        @(negedge clk);
      end
      m = real'(sum) / 20000.0 / 3.0;
      checks++;
      if (m - va[j] * vb[j] > 0.03 || va[j] * vb[j] - m > 0.03) begin
        failures++;
        $display("FAIL %f * %f = %f", va[j], vb[j], m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
