// tb_bs_lpf: bit-stream lowpass filter at its default K = 256, a = b = 3.
//  1. random input: every output symbol is compared with an integer model of
//     w <= clip(w + a*L(x) - b*L(y), +-3K) feeding a DSDM with gain K;
//  2. DC gain a/b = 1: constant inputs come out with the same mean;
//  3. frequency response: a sinusoid at 1/4 of the cut-off (b/(2*pi*K) = 0.00187) passes
//     with |H| > 0.9, one at 10x the cut-off is attenuated below 0.2;
//  4. a gain-2 instance doubles a DC input and, driven past half scale, clips w.
module tb_bs_lpf;
  import bssp_pkg::*;
  import tb_bssp_pkg::*;
  localparam int K = 256, GA = 3, GB = 3;
  logic clk = 0, rst_n = 0;
  qsym_t x, y;
  logic sat;
  int checks = 0, failures = 0, sat_count = 0;
  int w_ref, u_ref, yr, ws, sum;
  real m, ci, si, h, ph, lv, fr [2] = '{0.00187 / 4.0, 0.0187};
  real dc [3] = '{0.5, -0.3, 0.8};
  sd_src src;

  bs_lpf dut (.clk, .rst_n, .x_i(x), .y_o(y), .sat_o(sat));

  // A gain-2 filter (a = 6, b = 3, as the (C)/(S) filters of a QPSK demodulator):
  // it clips once the input mean passes 1/2.
  qsym_t y2;
  logic  sat2;
  int    sum2;
  bs_lpf #(.GA(6)) dut2 (.clk, .rst_n, .x_i(x), .y_o(y2), .sat_o(sat2));
  always @(posedge clk) if (rst_n && sat2) sat_count++;

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && sat) sat_count++;

  function automatic int q(int u);
    if (u >= 2 * K) return 3;
    if (u >= 0) return 2;
    if (u >= -2 * K) return 1;
    return 0;
  endfunction

  initial begin
    x = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    w_ref = 0; u_ref = 0;
    for (int n = 0; n < 20000; n++) begin
      x = qsym_t'(n < 15000 ? $urandom_range(0, 3) : 3);
      #1;
      yr = q(u_ref);
      checks++;
      if (int'(y) != yr) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d y=%0d ref=%0d", n, y, yr);
      end
      ws = w_ref + GA * (2 * int'(x) - 3) - GB * (2 * yr - 3);
      if (ws > 3 * K) ws = 3 * K;
      if (ws < -3 * K) ws = -3 * K;
      u_ref = u_ref + ws - K * (2 * yr - 3);
      w_ref = ws;
      @(negedge clk);
    end
    // DC gain
    foreach (dc[j]) begin
      src = new;
      for (int n = 0; n < 3000; n++) begin x = src.next(dc[j]); @(negedge clk); end
      sum = 0; sum2 = 0;
      for (int n = 0; n < 16384; n++) begin
        x = src.next(dc[j]); #1;
        sum += 2 * int'(y) - 3;
        sum2 += 2 * int'(y2) - 3;
        @(negedge clk);
      end
      if (dc[j] < 0.5 && dc[j] > -0.5) begin
        m = real'(sum2) / 16384.0 / 3.0;
        checks++;
        if (m - 2.0 * dc[j] > 0.03 || 2.0 * dc[j] - m > 0.03) begin
          failures++; $display("FAIL gain-2 DC %f -> %f", dc[j], m);
        end
      end
      m = real'(sum) / 16384.0 / 3.0;
      checks++;
      if (m - dc[j] > 0.02 || dc[j] - m > 0.02) begin
        failures++; $display("FAIL DC %f -> %f", dc[j], m);
      end
    end
    // frequency response
    foreach (fr[j]) begin
      src = new;
      ci = 0; si = 0;
      for (int n = 0; n < 3000 + 8 * 2138; n++) begin
        ph = 2.0 * 3.14159265358979 * fr[j] * real'(n);
        x = src.next(0.8 * $sin(ph)); #1;
        if (n >= 3000) begin
          lv = real'(2 * int'(y) - 3) / 3.0;
          ci += lv * $cos(ph);
          si += lv * $sin(ph);
        end
        @(negedge clk);
      end
      h = 2.0 * $sqrt(ci * ci + si * si) / (8.0 * 2138.0) / 0.8;
      $display("f=%f |H|=%f", fr[j], h);
      checks++;
      if ((j == 0 && h < 0.9) || (j == 1 && h > 0.2)) begin
        failures++; $display("FAIL response at f=%f: %f", fr[j], h);
      end
    end
    checks++;
    if (sat_count == 0) begin failures++; $display("FAIL clip never reached"); end
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
