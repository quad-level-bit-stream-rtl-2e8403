// tb_bssp_top: end-to-end run of the whole design at its default parameters.
// All five parts run at once for 100k clocks:
//  - DPLL with a 0.9-amplitude input at 1/512: must lock (NCO period 512 within 0.5 %);
//  - multi-bit modulator: three constant samples, output mean x/(3*MOD_K) within 0.01;
//  - LPF: a constant 0.5 passes with unity gain (within 0.02);
//  - divider: 0.3 / 0.6 = 0.5 within 0.03;
//  - square root: sqrt(0.25) = 0.5 within 0.06.
// Mechanisms counted, each must occur: NCO retuning (the control symbol changes), NCO
// accumulator clipping (amplitude limit), all four DSDM output symbols, lock.
module tb_bssp_top;
  import bssp_pkg::*;
  import tb_bssp_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int  N  = 100_000;
  logic clk = 0, rst_n = 0;
  qsym_t dpll_is, dpll_ic, dpll_z, dpll_qc, dpll_qs, mod_y, lpf_x, lpf_y;
  qsym_t div_x, div_y, div_z, sqrt_x, sqrt_z, z_prev;
  logic dpll_sat, lpf_sat;
  logic signed [10:0] mod_x;
  int checks = 0, failures = 0;
  int retune = 0, nco_clip = 0, lpf_clip = 0, locked = 0;
  int s_mod, s_lpf, s_div, s_sqrt, seg;
  int mod_vals [3] = '{-600, 150, 700};
  bit seen [4];
  real ph, m;
  freq_meter mq;
  sd_src ss, sc, sl, sx, sy, sq;

  bssp_top dut (.*);

  always #5 clk = ~clk;

  task automatic expect_near(input string what, input real got, input real want, input real tol);
    checks++;
    $display("%s: %f (expected %f)", what, got, want);
    if (got - want > tol || want - got > tol) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    ss = new; sc = new; sl = new; sx = new; sy = new; sq = new;
    mq = new(64, 60000);
    dpll_is = 0; dpll_ic = 0; lpf_x = 0; div_x = 0; div_y = 0; sqrt_x = 0; mod_x = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    s_mod = 0; s_lpf = 0; s_div = 0; s_sqrt = 0;
    z_prev = dpll_z;
    for (int n = 0; n < N; n++) begin
      ph = 2.0 * PI * real'(n) / 512.0;
      dpll_is = ss.next(0.9 * $sin(ph));
      dpll_ic = sc.next(0.9 * $cos(ph));
      lpf_x   = sl.next(0.5);
      div_x   = sx.next(0.3);
      div_y   = sy.next(0.6);
      sqrt_x  = sq.next(0.25);
      seg     = n / 10000;
      mod_x   = 11'(seg < 3 ? mod_vals[seg] : 0);
      #1;
      if (dpll_z != z_prev) retune++;
      z_prev = dpll_z;
      if (dpll_sat) nco_clip++;
      if (lpf_sat) lpf_clip++;
      seen[mod_y] = 1'b1;
      mq.push(2 * int'(dpll_qc) - 3);
      if (seg < 3 && n % 10000 >= 100) s_mod += 2 * int'(mod_y) - 3;
      if (seg < 3 && n % 10000 == 9999) begin
        expect_near($sformatf("modulator x=%0d", mod_vals[seg]), real'(s_mod) / 9900.0 / 3.0,
                    real'(mod_vals[seg]) / 768.0, 0.01);
        s_mod = 0;
      end
      if (n >= 20000) begin
        s_lpf  += 2 * int'(lpf_y) - 3;
        s_div  += 2 * int'(div_z) - 3;
        s_sqrt += 2 * int'(sqrt_z) - 3;
      end
      @(negedge clk);
    end
    m = mq.period();
    $display("DPLL NCO period %f", m);
    if (m > 512.0 * 0.995 && m < 512.0 * 1.005) locked++;
    expect_near("LPF DC", real'(s_lpf) / real'(N - 20000) / 3.0, 0.5, 0.02);
    expect_near("divider 0.3/0.6", real'(s_div) / real'(N - 20000) / 3.0, 0.5, 0.03);
    expect_near("sqrt(0.25)", real'(s_sqrt) / real'(N - 20000) / 3.0, 0.5, 0.06);
    $display("mechanisms: lock=%0d NCO retune=%0d NCO clip=%0d LPF clip=%0d",
             locked, retune, nco_clip, lpf_clip);
    checks++; if (locked == 0)   begin failures++; $display("FAIL DPLL did not lock"); end
    checks++; if (retune == 0)   begin failures++; $display("FAIL NCO never retuned"); end
    checks++; if (nco_clip == 0) begin failures++; $display("FAIL NCO never clipped"); end
    foreach (seen[i]) begin
      checks++;
      if (!seen[i]) begin failures++; $display("FAIL modulator code %0d unused", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
