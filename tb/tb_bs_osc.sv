// tb_bs_osc: sigma-delta quadrature oscillator at A = 75 with K = 79 and K = 60.
// Checks, after a settling time: the period of Qc is 2*pi*K within 3 %, Qs has the same
// period and rises a quarter period after Qc (sine lags cosine by pi/2), both streams
// use all four symbols, and the accumulators clip (which sets the amplitude).
module tb_bs_osc;
  import bssp_pkg::*;
  import tb_bssp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [9:0] k;
  qsym_t qc, qs;
  logic sat;
  int checks = 0, failures = 0, sat_count = 0;
  int kv [2] = '{79, 60};
  real pc, ps, pexp, lag;
  freq_meter mc, ms;
  bit seen [4];

  bs_osc dut (.clk, .rst_n, .k_i(k), .qc_o(qc), .qs_o(qs), .sat_o(sat));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && sat) sat_count++;

  initial begin
    foreach (kv[j]) begin
      rst_n = 0; k = 10'(kv[j]);
      mc = new(64, 2000); ms = new(64, 2000);
      repeat (2) @(negedge clk);
      rst_n = 1;
      for (int n = 0; n < 2000 + 20 * 500; n++) begin
        #1;
        mc.push(2 * int'(qc) - 3);
        ms.push(2 * int'(qs) - 3);
        seen[qc] = 1'b1;
        @(negedge clk);
      end
      pc = mc.period(); ps = ms.period();
      pexp = 2.0 * 3.14159265358979 * kv[j];
      lag = real'(ms.first_t - mc.first_t);
      if (pc > 1.0) begin
        while (lag < 0.0) lag += pc;
        while (lag >= pc) lag -= pc;
      end
      $display("K=%0d period Qc=%f Qs=%f expected=%f, Qs rises %f after Qc", kv[j], pc, ps, pexp, lag);
      checks++;
      if (pc < 0.97 * pexp || pc > 1.03 * pexp) begin failures++; $display("FAIL Qc period"); end
      checks++;
      if (ps < 0.97 * pexp || ps > 1.03 * pexp) begin failures++; $display("FAIL Qs period"); end
      checks++;
      if (lag < 0.2 * pc || lag > 0.3 * pc) begin failures++; $display("FAIL quadrature"); end
    end
    foreach (seen[i]) begin
      checks++;
      if (!seen[i]) begin failures++; $display("FAIL code %0d unused", i); end
    end
    checks++;
    if (sat_count == 0) begin failures++; $display("FAIL accumulators never clipped"); end
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
