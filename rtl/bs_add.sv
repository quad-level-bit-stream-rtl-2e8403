// bs_add: bit-stream adder producing the half-sum of two quad-level streams.
//
// The half-sum (L(a)+L(b))/2 is an integer in -3..3. Odd values are valid levels; even ones
// are rounded to a neighbouring level by a first-order error-feedback requantiser whose
// residual e (one bit, 0 or -1) is added to the next half-sum:
//   t = (L(a)+L(b))/2 + e;  s = 3 if t >= 2, 1 if 0 <= t < 2, -1 if -2 <= t < 0, else -3;
//   e <= t - s.
// The mean of the output is therefore exactly half the sum of the input means, apart from a
// bounded residual. The halving and the requantiser are choices of this design; the source
// only names the block. s_o is combinational from the inputs and the residual register.
module bs_add
  import bssp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  qsym_t a_i,
  input  qsym_t b_i,
  output qsym_t s_o
);
  logic signed [3:0] e, t, s_lvl, sum;

  always_comb begin
    sum = 4'(lvl(a_i)) + 4'(lvl(b_i));     // even, -6..6
    t   = (sum >>> 1) + e;                 // -4..3
    if      (t >= 4'sd2)  s_lvl = 4'sd3;
    else if (t >= 4'sd0)  s_lvl = 4'sd1;
    else if (t >= -4'sd2) s_lvl = -4'sd1;
    else                  s_lvl = -4'sd3;
    s_o = sym(3'(s_lvl));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) e <= '0;
    else        e <= t - s_lvl;
  end
endmodule
