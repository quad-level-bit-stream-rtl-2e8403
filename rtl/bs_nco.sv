// bs_nco: bit-stream numerically controlled oscillator.
//
// The sigma-delta oscillator (bs_osc) runs with a feedback gain K that the quad-level
// control stream c sets every clock: K = K0 + DK*L(c), L(c) in {-3,-1,1,3}. The frequency
// 1/(2*pi*K) thus moves around 1/(2*pi*K0) with the mean of c; raising c lowers the
// frequency. Tuning K around K0 by DK follows the published NCO; scaling DK by the level
// value and registering K (one clock from c_i to K, which also breaks the loop a DPLL
// closes around the NCO) are this design's choices. Defaults A = 75, K0 = 79, DK = 3 are
// the published NCO settings.
module bs_nco
  import bssp_pkg::*;
#(
  parameter int unsigned W  = 11,  // DSDM accumulator width
  parameter int          A  = 75,  // accumulator limit, below 3*(K0 - 3*DK)
  parameter int          K0 = 79,  // centre gain
  parameter int          DK = 3    // gain step per level of c
) (
  input  logic  clk,
  input  logic  rst_n,
  input  qsym_t c_i,
  output qsym_t qc_o,
  output qsym_t qs_o,
  output logic  sat_o
);
  localparam int unsigned KW = W - 1;

  logic [KW-1:0] k;

  always_ff @(posedge clk) begin
    if (!rst_n) k <= KW'(K0);
    else        k <= KW'(K0 + DK * int'(lvl(c_i)));
  end

  bs_osc #(.W(W), .KW(KW), .A(A)) u_osc (
    .clk, .rst_n, .k_i(k), .qc_o, .qs_o, .sat_o);

  initial begin
    assert (A < 3 * (K0 - 3 * DK)) else $error("bs_nco: A must stay below 3K for every K");
  end
endmodule
