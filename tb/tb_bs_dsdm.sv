// tb_bs_dsdm: checks the quad-level DSDM against an integer model of
//   y = q(u) (thresholds -2K, 0, 2K),  u <= u + x - K*(2y-3)
// for random inputs |x| <= 3K and a gain that changes every clock, then checks that the
// output mean follows x/K for constant inputs (one output symbol per clock).
module tb_bs_dsdm;
  import bssp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic signed [10:0] x;
  logic [9:0] k;
  qsym_t y;
  int checks = 0, failures = 0;
  int u_ref, kk, xx, yref, sum;
  bit seen [4];

  bs_dsdm dut (.clk, .rst_n, .x_i(x), .k_i(k), .y_o(y));

  always #5 clk = ~clk;

  function automatic int q(int u, int kq);
    if (u >= 2 * kq) return 3;
    if (u >= 0) return 2;
    if (u >= -2 * kq) return 1;
    return 0;
  endfunction

  initial begin
    x = 0; k = 10'd79;
    repeat (2) @(negedge clk);
    rst_n = 1;
    u_ref = 0;
    // random gain and input, cycle-exact comparison
    for (int n = 0; n < 20000; n++) begin
      kk = 40 + $urandom_range(0, 216);
      xx = $urandom_range(0, 6 * kk) - 3 * kk;
      k = 10'(kk); x = 11'(xx);
      #1;
      yref = q(u_ref, kk);
      checks++;
      if (int'(y) != yref) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d y=%0d ref=%0d", n, y, yref);
      end
      seen[y] = 1'b1;
      u_ref = u_ref + xx - kk * (2 * yref - 3);
      @(negedge clk);
    end
    foreach (seen[i]) begin
      checks++;
      if (!seen[i]) begin failures++; $display("FAIL code %0d never produced", i); end
    end
    // mean tracking for constant inputs
    foreach (xx_list[j]) begin
      k = 10'd256; x = 11'(xx_list[j]);
      repeat (100) @(negedge clk);
      sum = 0;
      for (int n = 0; n < 4096; n++) begin
        sum += 2 * int'(y) - 3;
        @(negedge clk);
      end
      checks++;
      if ((real'(sum) / 4096.0 - real'(xx_list[j]) / 256.0) > 0.01 ||
          (real'(xx_list[j]) / 256.0 - real'(sum) / 4096.0) > 0.01) begin
        failures++;
        $display("FAIL mean x=%0d: %f", xx_list[j], real'(sum) / 4096.0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xx_list [5] = '{-700, -256, 0, 100, 767};

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
