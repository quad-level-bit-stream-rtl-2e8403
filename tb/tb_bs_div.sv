// tb_bs_div: bit-stream divider at its defaults (K = 64, A = 190). For several pairs of
// sigma-delta coded constants x, y (y > 0, |x/y| < 1) the mean of z, taken after the loop
// settles, must equal x/y within 0.03.
module tb_bs_div;
  import bssp_pkg::*;
  import tb_bssp_pkg::*;
  logic clk = 0, rst_n = 0;
  qsym_t x, y, z;
  int checks = 0, failures = 0, sum;
  real xv [5] = '{0.3, -0.2, 0.1, 0.45, -0.6};
  real yv [5] = '{0.6, 0.5, 0.8, 0.5, 0.75};
  real m;
  sd_src sx, sy;

  bs_div dut (.clk, .rst_n, .x_i(x), .y_i(y), .z_o(z));

  always #5 clk = ~clk;

  initial begin
    foreach (xv[j]) begin
      rst_n = 0; x = 0; y = 0;
      sx = new; sy = new;
      repeat (2) @(negedge clk);
      rst_n = 1;
      sum = 0;
      for (int n = 0; n < 10000 + 40000; n++) begin
        x = sx.next(xv[j]); y = sy.next(yv[j]);
        #1;
        if (n >= 10000) sum += 2 * int'(z) - 3;
        @(negedge clk);
      end
      m = real'(sum) / 40000.0 / 3.0;
      $display("%f / %f -> %f (exact %f)", xv[j], yv[j], m, xv[j] / yv[j]);
      checks++;
      if (m - xv[j] / yv[j] > 0.03 || xv[j] / yv[j] - m > 0.03) begin
        failures++; $display("FAIL quotient");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
