// bs_dsdm: first-order digital sigma-delta modulator with a quad-level output.
//
// A signed multi-bit sample x_i is added every clock to an accumulator u together with the
// fed-back value -K*L(y); the output y = q(u) is quantised from the accumulator register:
//   y = 3 if u >= 2K, 2 if 0 <= u < 2K, 1 if -2K <= u < 0, 0 if u < -2K.
// The mean of L(y) follows x/K, so inputs in [-3K, 3K] span the full quad-level range.
// The quantiser thresholds and the feedback structure follow the published modulator; the
// feedback levels K*{-3,-1,1,3} (midway between thresholds) and the widths are choices of
// this design. With |x_i| <= 3K the accumulator stays within [-4K, 4K-1], so W = 11 bits
// is exact for K up to 256.
//
// Timing: y_o depends only on the register u and on k_i (no path from x_i). k_i may change
// every clock (the NCO does this); it must be positive and at most 2^(W-3).
module bs_dsdm
  import bssp_pkg::*;
#(
  parameter int unsigned W  = 11,  // accumulator width (signed)
  parameter int unsigned KW = 10   // width of the gain input
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [W-1:0]  x_i,
  input  logic        [KW-1:0] k_i,
  output qsym_t                y_o
);
  logic signed [W-1:0]  u;
  logic signed [W+2:0]  k_s, k2, u_x, fb, u_next;

  assign k_s = signed'((W+3)'(k_i));
  assign k2  = k_s <<< 1;
  assign u_x = (W+3)'(u);

  always_comb begin
    if      (u_x >= k2)         y_o = 2'd3;
    else if (u_x >= 0)          y_o = 2'd2;
    else if (u_x >= -k2)        y_o = 2'd1;
    else                        y_o = 2'd0;
  end

  always_comb begin
    unique case (y_o)
      2'd0:    fb = -3 * k_s;
      2'd1:    fb = -k_s;
      2'd2:    fb = k_s;
      default: fb = 3 * k_s;
    endcase
    u_next = u_x + (W+3)'(x_i) - fb;   // fits in W bits while |x_i| <= 3K
  end

  always_ff @(posedge clk) begin
    if (!rst_n) u <= '0;
    else        u <= u_next[W-1:0];
  end

  // Overload check: the accumulator must never wrap.
  always_ff @(posedge clk) begin
    if (rst_n)
      assert (u_next == (W+3)'(signed'(u_next[W-1:0])))
        else $error("bs_dsdm: accumulator overflow, |x_i| exceeds 3K");
  end
endmodule
