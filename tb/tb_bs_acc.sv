// tb_bs_acc: drives the saturating accumulator with random symbols biased towards one
// sign and then the other, and compares its register and its clip flag every clock with
// an integer model (increments -3,-1,1,3, limits +-A). Counts clipping at both limits.
module tb_bs_acc;
  import bssp_pkg::*;
  localparam int A = 75;
  logic clk = 0, rst_n = 0;
  qsym_t d;
  logic signed [8:0] w;
  logic sat;
  int checks = 0, failures = 0;
  int w_ref, s, sat_hi = 0, sat_lo = 0;
  bit sat_ref;

  bs_acc #(.W(9), .A(A), .INIT(0)) dut (.clk, .rst_n, .d_i(d), .w_o(w), .sat_o(sat));

  always #5 clk = ~clk;

  initial begin
    d = 2'd0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    w_ref = 0;
    for (int n = 0; n < 6000; n++) begin
      // phases: mostly up, mostly down, balanced
      case ((n / 1000) % 3)
        0: d = qsym_t'($urandom_range(0, 9) < 7 ? $urandom_range(2, 3) : $urandom_range(0, 1));
        1: d = qsym_t'($urandom_range(0, 9) < 7 ? $urandom_range(0, 1) : $urandom_range(2, 3));
        default: d = qsym_t'($urandom_range(0, 3));
      endcase
      #1;
      checks++;
      if (int'(w) != w_ref) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d w=%0d ref=%0d", n, w, w_ref);
      end
      s = w_ref + 2 * int'(d) - 3;
      sat_ref = (s > A) || (s < -A);
      checks++;
      if (sat !== sat_ref) failures++;
      if (s > A) begin s = A; sat_hi++; end
      if (s < -A) begin s = -A; sat_lo++; end
      w_ref = s;
      @(negedge clk);
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin
      failures++;
      $display("FAIL limits not reached: hi=%0d lo=%0d", sat_hi, sat_lo);
    end
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
