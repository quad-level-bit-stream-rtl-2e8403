// tb_bs_add: checks the bit-stream adder against an integer model of its requantiser and
// checks its purpose: over a run, the output level sum equals half the input level sums
// within the residual bound (|error| <= 1 level in total).
module tb_bs_add;
  import bssp_pkg::*;
  logic clk = 0, rst_n = 0;
  qsym_t a, b, s;
  int checks = 0, failures = 0;
  int e_ref, t, o, sum_in, sum_out;

  bs_add dut (.clk, .rst_n, .a_i(a), .b_i(b), .s_o(s));

  always #5 clk = ~clk;

  initial begin
    a = 0; b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    e_ref = 0; sum_in = 0; sum_out = 0;
    for (int n = 0; n < 20000; n++) begin
      a = qsym_t'($urandom_range(0, 3));
      b = qsym_t'(n < 10000 ? $urandom_range(0, 3) : $urandom_range(2, 3));
      #1;
      t = ((2 * int'(a) - 3) + (2 * int'(b) - 3)) / 2 + e_ref;
      o = (t >= 2) ? 3 : (t >= 0) ? 1 : (t >= -2) ? -1 : -3;
      checks++;
      if (2 * int'(s) - 3 != o) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d s=%0d ref=%0d", n, 2 * int'(s) - 3, o);
      end
      e_ref = t - o;
      sum_in  += (2 * int'(a) - 3) + (2 * int'(b) - 3);
      sum_out += 2 * int'(s) - 3;
      @(negedge clk);
    end
    checks++;
    if (2 * sum_out - sum_in > 2 || sum_in - 2 * sum_out > 2) begin
      failures++;
      $display("FAIL sums: in/2=%0d out=%0d", sum_in / 2, sum_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
