// tb_bs_dpll: Type-1 bit-stream DPLL at its defaults (A = 80, K0 = 81, DK = 3) with a
// sigma-delta coded input of amplitude 0.9 at 1/512 of the sample rate, the published
// operating point; the free-running NCO period 2*pi*81 = 509 differs from it.
// Checks, in two windows after 60000 settling clocks: the NCO period equals the input
// period 512 within 0.5 %, the phase of Qc against the input cosine is the same in both
// windows (locked, not slipping), and the mean of z holds the frequency offset
// (positive, since K must rise above K0).
module tb_bs_dpll;
  import bssp_pkg::*;
  import tb_bssp_pkg::*;
  localparam real F = 1.0 / 512.0;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  qsym_t is, ic, z, qc, qs;
  logic sat;
  int checks = 0, failures = 0, zsum [2];
  real ph, lag [2], p [2];
  freq_meter mq, mi;
  sd_src ss, sc;

  bs_dpll dut (.clk, .rst_n, .is_i(is), .ic_i(ic), .z_o(z), .qc_o(qc), .qs_o(qs), .sat_o(sat));

  always #5 clk = ~clk;

  initial begin
    ss = new; sc = new;
    is = 0; ic = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 60000; n++) begin
      ph = 2.0 * PI * F * real'(n);
      is = ss.next(0.9 * $sin(ph)); ic = sc.next(0.9 * $cos(ph));
      @(negedge clk);
    end
    for (int w = 0; w < 2; w++) begin
      mq = new(64, 0); mi = new(64, 0);
      zsum[w] = 0;
      for (int n = 60000 + w * 20480; n < 60000 + (w + 1) * 20480; n++) begin
        ph = 2.0 * PI * F * real'(n);
        is = ss.next(0.9 * $sin(ph)); ic = sc.next(0.9 * $cos(ph));
        #1;
        mq.push(2 * int'(qc) - 3);
        mi.push(2 * int'(ic) - 3);
        zsum[w] += 2 * int'(z) - 3;
        @(negedge clk);
      end
      p[w] = mq.period();
      lag[w] = real'(mq.first_t - mi.first_t);
      while (lag[w] < 0.0) lag[w] += 512.0;
      while (lag[w] >= 512.0) lag[w] -= 512.0;
      $display("window %0d: NCO period %f, Qc lags input by %f, mean z %f",
               w, p[w], lag[w], real'(zsum[w]) / 20480.0 / 3.0);
      checks++;
      if (p[w] < 512.0 * 0.995 || p[w] > 512.0 * 1.005) begin failures++; $display("FAIL not locked"); end
      checks++;
      if (zsum[w] <= 0) begin failures++; $display("FAIL z mean not positive"); end
    end
    checks++;
    if ((lag[1] - lag[0] > 15.0 && lag[1] - lag[0] < 497.0) ||
        (lag[0] - lag[1] > 15.0 && lag[0] - lag[1] < 497.0)) begin
      failures++; $display("FAIL phase drifts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
