// bs_acc: saturating accumulator of a quad-level bit-stream.
//
// Each clock the level of the input symbol (-3, -1, +1 or +3 for codes 0..3) is added to a
// signed register, and the sum is clipped to [-A, +A]. The register is the output, so the
// output follows the input with one clock of latency. sat_o flags a clock in which the sum
// was clipped. The increments and the +-A limits are those of the published oscillator; the
// reset value INIT and the width are choices of this design (W must hold A + 3).
module bs_acc
  import bssp_pkg::*;
#(
  parameter int unsigned W    = 9,   // register width (signed)
  parameter int          A    = 75,  // clipping limit
  parameter int          INIT = 0    // value after reset
) (
  input  logic                clk,
  input  logic                rst_n,
  input  qsym_t               d_i,
  output logic signed [W-1:0] w_o,
  output logic                sat_o
);
  localparam logic signed [W+1:0] AMAX = (W+2)'(A);

  logic signed [W+1:0] sum;

  always_comb begin
    sum   = (W+2)'(w_o) + (W+2)'(lvl(d_i));
    sat_o = (sum > AMAX) || (sum < -AMAX);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)        w_o <= W'(INIT);
    else if (sum > AMAX)  w_o <= W'(A);
    else if (sum < -AMAX) w_o <= W'(-A);
    else               w_o <= sum[W-1:0];
  end
endmodule
