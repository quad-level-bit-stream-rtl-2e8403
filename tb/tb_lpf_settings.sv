// tb_lpf_settings: the bit-stream lowpass filter at the four cut-off/gain settings a
// QPSK demodulator uses, each derived from cut-off = b/(2*pi*K) and gain = a/b:
//   6.22e-4, gain 2: K = 256, a = 2,  b = 1
//   6.22e-3, gain 4: K = 256, a = 40, b = 10
//   3.11e-4, gain 2: K = 512, a = 2,  b = 1  (W = 12)
//   3.11e-4, gain 1: K = 512, a = 1,  b = 1  (W = 12)
// and the default filter (K = 256, a = b = 3, cut-off 3/(2*pi*256) = 0.00187, gain 1)
// driven by a full-scale (amplitude 1) sinusoid at 0.00189, just above its cut-off.
// For each: the DC gain must equal a/b within 0.05 (input 0.2) and the response at the
// nominal cut-off must be 1/sqrt(2) of the DC gain within 0.1.
module tb_lpf_settings;
  import bssp_pkg::*;
  import tb_bssp_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  qsym_t x;
  qsym_t y [5];
  logic  sat [5];
  int checks = 0, failures = 0;
  real fc [5]   = '{6.22e-4, 6.22e-3, 3.11e-4, 3.11e-4, 0.00189};
  real gain [5] = '{2.0, 4.0, 2.0, 1.0, 1.0};
  real amp [5]  = '{0.2, 0.2, 0.2, 0.2, 1.0};
  real href;
  real ci, si, ph, lv, h, m;
  int sum, per, nper;
  sd_src src;

  bs_lpf #(.W(11), .K(256), .GA(2),  .GB(1))  u_c (.clk, .rst_n, .x_i(x), .y_o(y[0]), .sat_o(sat[0]));
  bs_lpf #(.W(11), .K(256), .GA(40), .GB(10)) u_l (.clk, .rst_n, .x_i(x), .y_o(y[1]), .sat_o(sat[1]));
  bs_lpf #(.W(12), .K(512), .GA(2),  .GB(1))  u_r (.clk, .rst_n, .x_i(x), .y_o(y[2]), .sat_o(sat[2]));
  bs_lpf #(.W(12), .K(512), .GA(1),  .GB(1))  u_x (.clk, .rst_n, .x_i(x), .y_o(y[3]), .sat_o(sat[3]));
  bs_lpf                                       u_d (.clk, .rst_n, .x_i(x), .y_o(y[4]), .sat_o(sat[4]));

  always #5 clk = ~clk;

  initial begin
    x = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < 5; j++) begin
      // DC gain
      src = new;
      for (int n = 0; n < 6000; n++) begin x = src.next(0.2); @(negedge clk); end
      sum = 0;
      for (int n = 0; n < 32768; n++) begin
        x = src.next(0.2); #1;
        sum += 2 * int'(y[j]) - 3;
        @(negedge clk);
      end
      m = real'(sum) / 32768.0 / 3.0 / 0.2;
      checks++;
      $display("setting %0d: DC gain %f (expected %f)", j, m, gain[j]);
      if (m - gain[j] > 0.05 * gain[j] || gain[j] - m > 0.05 * gain[j]) begin
        failures++; $display("FAIL DC gain");
      end
      // response at the cut-off, over whole periods
      per  = int'(1.0 / fc[j]);
      nper = (j == 1) ? 40 : (j == 4) ? 8 : 4;
      ci = 0; si = 0;
      for (int n = 0; n < 6000 + nper * per; n++) begin
        ph = 2.0 * PI * fc[j] * real'(n);
        x = src.next(amp[j] * $sin(ph)); #1;
        if (n >= 6000) begin
          lv = real'(2 * int'(y[j]) - 3) / 3.0;
          ci += lv * $cos(ph);
          si += lv * $sin(ph);
        end
        @(negedge clk);
      end
      h = 2.0 * $sqrt(ci * ci + si * si) / real'(nper * per) / amp[j] / gain[j];
      // first-order response at the test frequency: 1/sqrt(1 + (f/fc)^2)
      href = (j == 4) ? 1.0 / $sqrt(1.0 + (0.00189 / (3.0 / (2.0 * PI * 256.0))) ** 2) : 0.7071;
      checks++;
      $display("setting %0d: |H|/gain = %f (expected %f)", j, h, href);
      if (h < href - 0.1 || h > href + 0.1) begin failures++; $display("FAIL cut-off"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
