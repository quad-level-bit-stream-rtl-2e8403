// tb_sndr: in-band signal-to-noise-and-distortion ratio of three outputs at an
// oversampling ratio of 128 (band edge fs/256):
//   - lowpass filter (defaults), full-scale input sinusoid near 0.00189;
//   - NCO (defaults) with a constant mid control (alternating codes 1/2, K = 79 on average)
//     and with the control held at code 2 (K = 82), output Qc;
//   - DPLL (defaults) locked to a 0.9-amplitude input at 1/512, output Qc.
// Method: 65536 output levels, Hann window, Goertzel DFT of every in-band bin; the signal
// is the peak bin +-3, the noise every other in-band bin above bin 3.
// The values are printed; the checks only require a clean sinusoid (SNDR above 30 dB).
module tb_sndr;
  import bssp_pkg::*;
  import tb_bssp_pkg::*;
  localparam real PI  = 3.14159265358979;
  localparam int  N   = 65536;
  localparam int  OSR = 128;
  logic clk = 0, rst_n = 0;
  qsym_t lx, ly, nc, nqc, nqs, dis, dic, dz, dqc, dqs;
  logic  s0, s1, s2;
  int checks = 0, failures = 0;
  real buf_r [N], b_lpf [N], b_nco [N], b_dpll [N];
  sd_src src, ss, sc;

  bs_lpf  u_lpf  (.clk, .rst_n, .x_i(lx), .y_o(ly), .sat_o(s0));
  bs_nco  u_nco  (.clk, .rst_n, .c_i(nc), .qc_o(nqc), .qs_o(nqs), .sat_o(s1));
  bs_dpll u_dpll (.clk, .rst_n, .is_i(dis), .ic_i(dic), .z_o(dz), .qc_o(dqc), .qs_o(dqs), .sat_o(s2));

  always #5 clk = ~clk;

  function automatic real measure();
    int  nb = N / (2 * OSR);
    real p [];
    real w, s1g, s2g, s0g, cf, sig, noi;
    int  pk;
    p = new[nb + 1];
    for (int k = 0; k <= nb; k++) begin
      cf = 2.0 * $cos(2.0 * PI * real'(k) / real'(N));
      s1g = 0.0; s2g = 0.0;
      for (int n = 0; n < N; n++) begin
        w = 0.5 - 0.5 * $cos(2.0 * PI * real'(n) / real'(N));
        s0g = buf_r[n] * w + cf * s1g - s2g;
        s2g = s1g; s1g = s0g;
      end
      p[k] = s1g * s1g + s2g * s2g - cf * s1g * s2g;
    end
    pk = 4;
    for (int k = 4; k <= nb; k++) if (p[k] > p[pk]) pk = k;
    sig = 0.0; noi = 0.0;
    for (int k = 4; k <= nb; k++) begin
      if (k >= pk - 3 && k <= pk + 3) sig += p[k];
      else                             noi += p[k];
    end
    return 10.0 * $log10(sig / noi);
  endfunction

  task automatic check(input string what, input real v);
    $display("%s: SNDR %0.1f dB", what, v);
    checks++;
    if (v < 30.0) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    src = new; ss = new; sc = new;
    lx = 0; nc = 2'd1; dis = 0; dic = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // settle: LPF and NCO 4000 clocks, DPLL 60000 clocks (runs throughout)
    for (int n = 0; n < 60000 + 2 * N; n++) begin
      lx  = src.next($sin(2.0 * PI * 124.0 / real'(N) * real'(n)));
      nc  = (n < 60000 + N) ? qsym_t'(1 + n % 2) : 2'd2;
      dis = ss.next(0.9 * $sin(2.0 * PI * real'(n) / 512.0));
      dic = sc.next(0.9 * $cos(2.0 * PI * real'(n) / 512.0));
      #1;
      if (n >= 60000 && n < 60000 + N) begin
        b_lpf[n - 60000]  = real'(2 * int'(ly) - 3);
        b_nco[n - 60000]  = real'(2 * int'(nqc) - 3);
        b_dpll[n - 60000] = real'(2 * int'(dqc) - 3);
      end
      if (n >= 60000 + N) buf_r[n - 60000 - N] = real'(2 * int'(nqc) - 3);
      @(negedge clk);
    end
    check("NCO, control held at code 2 (K = 82)", measure());
    buf_r = b_lpf;
    check("LPF, full-scale input at 0.00189", measure());
    buf_r = b_nco;
    check("NCO, control alternating 1/2 (mean K = 79)", measure());
    buf_r = b_dpll;
    check("DPLL Qc, locked to 1/512", measure());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000 + 2 * N + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
