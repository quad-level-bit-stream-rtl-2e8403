// bs_sqrt: bit-stream square-root circuit.
//
// The same loop as the divider, with the stream z squared in place of z*y: the
// accumulator integrates (x - z^2)/2 and settles where mean(z)^2 = mean(x), on the
// positive root (the negative root is unstable). The product is formed as z[n]*z[n-1]:
// a symbol multiplied by itself would give the mean square of the stream rather than the
// square of its mean, so one multiplier input is delayed by a clock. That delay, K = 64 and
// A = 190 are this design's choices; the loop follows the published square-root circuit.
// Expect an error of a few hundredths from correlated requantisation noise.
module bs_sqrt
  import bssp_pkg::*;
#(
  parameter int unsigned W = 11,   // DSDM accumulator width
  parameter int          K = 64,   // DSDM gain
  parameter int          A = 190   // accumulator limit, below 3K
) (
  input  logic  clk,
  input  logic  rst_n,
  input  qsym_t x_i,
  output qsym_t z_o
);
  localparam int unsigned AW = $clog2(A + 4) + 1;

  qsym_t                z_d, zz, neg_zz, sum;
  logic signed [AW-1:0] w;
  logic                 sat_unused;

  always_ff @(posedge clk) begin
    if (!rst_n) z_d <= 2'd2;
    else        z_d <= z_o;
  end

  bs_mult u_mult (.clk, .rst_n, .a_i(z_o), .b_i(z_d), .p_o(zz));
  bs_neg  u_neg  (.a_i(zz), .y_o(neg_zz));
  bs_add  u_add  (.clk, .rst_n, .a_i(x_i), .b_i(neg_zz), .s_o(sum));
  bs_acc #(.W(AW), .A(A), .INIT(0)) u_acc (
    .clk, .rst_n, .d_i(sum), .w_o(w), .sat_o(sat_unused));
  bs_dsdm #(.W(W), .KW(W-1)) u_dsdm (
    .clk, .rst_n, .x_i(W'(w)), .k_i((W-1)'(K)), .y_o(z_o));
endmodule
