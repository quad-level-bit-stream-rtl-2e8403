// tb_bs_nco: NCO at its defaults A = 75, K0 = 79, DK = 3. For constant control symbols
// the gain is K = K0 + DK*L(c): 70, 76, 82, 88 for codes 0..3, and the period of the
// output must be 2*pi*K within 3 %. An alternating 1/2 control stream must give the
// centre period 2*pi*K0. Also checks the one-clock register from c to K.
module tb_bs_nco;
  import bssp_pkg::*;
  import tb_bssp_pkg::*;
  localparam int K0 = 79, DK = 3;
  logic clk = 0, rst_n = 0;
  qsym_t c, qc, qs;
  logic sat;
  int checks = 0, failures = 0;
  real p, pexp;
  freq_meter mc;

  bs_nco dut (.clk, .rst_n, .c_i(c), .qc_o(qc), .qs_o(qs), .sat_o(sat));

  always #5 clk = ~clk;

  task automatic run(input int mode, input real kexp);
    rst_n = 0;
    c = qsym_t'(mode < 4 ? mode : 1);
    mc = new(64, 2000);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000 + 16 * 560; n++) begin
      if (mode == 4) c = qsym_t'(1 + (n % 2));
      #1;
      if (n == 1 && mode < 4) begin
        checks++;
        if (int'(dut.k) != K0 + DK * (2 * mode - 3)) begin
          failures++; $display("FAIL K register %0d", dut.k);
        end
      end
      mc.push(2 * int'(qc) - 3);
      @(negedge clk);
    end
    p = mc.period();
    pexp = 2.0 * 3.14159265358979 * kexp;
    $display("control %0d: period %f expected %f", mode, p, pexp);
    checks++;
    if (p < 0.97 * pexp || p > 1.03 * pexp) begin failures++; $display("FAIL period"); end
  endtask

  initial begin
    for (int m = 0; m < 4; m++) run(m, real'(K0 + DK * (2 * m - 3)));
    run(4, real'(K0));
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
