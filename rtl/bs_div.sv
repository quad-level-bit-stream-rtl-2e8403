// bs_div: bit-stream divider.
//
// A feedback loop forces the quotient stream z to satisfy mean(x) = mean(z)*mean(y):
// the bit-stream multiplier forms z*y, a negation and the bit-stream adder form
// (x - z*y)/2, a saturating accumulator (+-A) integrates that difference and a DSDM with
// gain K turns the accumulator into z. At equilibrium the accumulator input averages zero,
// so mean(z) = mean(x)/mean(y) (normalised values). The denominator mean must be positive
// and |x/y| below A/(3K). The loop structure follows the published divider; K = 64 and
// A = 190 are this design's values (the source gives none).
//
// z_o comes from the DSDM register; the loop settles in a few thousand clocks.
module bs_div
  import bssp_pkg::*;
#(
  parameter int unsigned W = 11,   // DSDM accumulator width
  parameter int          K = 64,   // DSDM gain
  parameter int          A = 190   // accumulator limit, below 3K
) (
  input  logic  clk,
  input  logic  rst_n,
  input  qsym_t x_i,
  input  qsym_t y_i,
  output qsym_t z_o
);
  localparam int unsigned AW = $clog2(A + 4) + 1;

  qsym_t                zy, neg_zy, sum;
  logic signed [AW-1:0] w;
  logic                 sat_unused;

  bs_mult u_mult (.clk, .rst_n, .a_i(z_o), .b_i(y_i), .p_o(zy));
  bs_neg  u_neg  (.a_i(zy), .y_o(neg_zy));
  bs_add  u_add  (.clk, .rst_n, .a_i(x_i), .b_i(neg_zy), .s_o(sum));
  bs_acc #(.W(AW), .A(A), .INIT(0)) u_acc (
    .clk, .rst_n, .d_i(sum), .w_o(w), .sat_o(sat_unused));
  bs_dsdm #(.W(W), .KW(W-1)) u_dsdm (
    .clk, .rst_n, .x_i(W'(w)), .k_i((W-1)'(K)), .y_o(z_o));
endmodule
