// bs_mult: bit-stream multiplier of two quad-level streams.
//
// The normalised values of the operands are L/3, so their product is L(a)*L(b)/9, which in
// output levels is L(a)*L(b)/3. The exact product t0 = L(a)*L(b) (in thirds of a level,
// one of -9,-3,-1,1,3,9) plus the residual e of the previous clock is requantised to a level:
//   t = t0 + e;  p = 3 if t >= 6, 1 if 0 <= t < 6, -1 if -6 <= t < 0, else -3;  e <= t - 3p.
// The residual stays in [-3, 2], so the mean of the output equals mean(a)*mean(b) when the
// operands are uncorrelated. The source names this block but gives no insides; this
// first-order requantiser is the simplest circuit with that function. p_o is combinational
// from the inputs and the residual register.
module bs_mult
  import bssp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  qsym_t a_i,
  input  qsym_t b_i,
  output qsym_t p_o
);
  logic signed [4:0] e, t, p3;
  logic signed [2:0] p_lvl;

  always_comb begin
    t = 5'(lvl(a_i) * lvl(b_i)) + e;     // -12..11
    if      (t >= 5'sd6)  p_lvl = 3'sd3;
    else if (t >= 5'sd0)  p_lvl = 3'sd1;
    else if (t >= -5'sd6) p_lvl = -3'sd1;
    else                  p_lvl = -3'sd3;
    p3  = 5'(p_lvl) * 5'sd3;
    p_o = sym(p_lvl);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) e <= '0;
    else        e <= t - p3;
  end
endmodule
