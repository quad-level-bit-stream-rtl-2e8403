// tb_bs_sqrt: bit-stream square root at its defaults (K = 64, A = 190). For several
// sigma-delta coded constants x the mean of z after settling must equal sqrt(x) within
// 0.06 (the circuit's own requantisation error is a few hundredths).
module tb_bs_sqrt;
  import bssp_pkg::*;
  import tb_bssp_pkg::*;
  logic clk = 0, rst_n = 0;
  qsym_t x, z;
  int checks = 0, failures = 0, sum;
  real xv [5] = '{0.09, 0.25, 0.5, 0.7, 0.16};
  real m;
  sd_src sx;

  bs_sqrt dut (.clk, .rst_n, .x_i(x), .z_o(z));

  always #5 clk = ~clk;

  initial begin
    foreach (xv[j]) begin
      rst_n = 0; x = 0;
      sx = new;
      repeat (2) @(negedge clk);
      rst_n = 1;
      sum = 0;
      for (int n = 0; n < 10000 + 40000; n++) begin
        x = sx.next(xv[j]);
        #1;
        if (n >= 10000) sum += 2 * int'(z) - 3;
        @(negedge clk);
      end
      m = real'(sum) / 40000.0 / 3.0;
      $display("sqrt(%f) -> %f (exact %f)", xv[j], m, $sqrt(xv[j]));
      checks++;
      if (m - $sqrt(xv[j]) > 0.06 || $sqrt(xv[j]) - m > 0.06) begin
        failures++; $display("FAIL root");
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
