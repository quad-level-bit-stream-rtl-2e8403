// bs_dpll: Type-1 digital phase-locked loop on quad-level bit-streams.
//
// The input arrives as two streams, is (sine) and ic (cosine). Two bit-stream multipliers
// form is*Qc and ic*Qs with the NCO's cosine and sine, a negation and the bit-stream adder
// form z = (is*Qc - ic*Qs)/2 = sin(theta_in - theta_nco)/2 (times the amplitudes), and z
// drives the NCO control input directly, with no loop filter. With the NCO sign used here
// (larger c, lower frequency) the loop settles with the NCO about pi away from the input
// phase and the mean of z holding the frequency offset. Defaults A = 80, K0 = 81, DK = 3
// are the published DPLL settings, for an input near 1/512 of the sample rate.
//
// z_o, qc_o, qs_o: all outputs are streams of quad-level symbols, one per clock.
// sat_o is high in a clock in which the NCO's accumulators clip.
module bs_dpll
  import bssp_pkg::*;
#(
  parameter int unsigned W  = 11,
  parameter int          A  = 80,
  parameter int          K0 = 81,
  parameter int          DK = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  qsym_t is_i,
  input  qsym_t ic_i,
  output qsym_t z_o,
  output qsym_t qc_o,
  output qsym_t qs_o,
  output logic  sat_o
);
  qsym_t p_sc, p_cs, neg_cs;

  bs_mult u_mult_s (.clk, .rst_n, .a_i(is_i), .b_i(qc_o), .p_o(p_sc));
  bs_mult u_mult_c (.clk, .rst_n, .a_i(ic_i), .b_i(qs_o), .p_o(p_cs));
  bs_neg  u_neg    (.a_i(p_cs), .y_o(neg_cs));
  bs_add  u_add    (.clk, .rst_n, .a_i(p_sc), .b_i(neg_cs), .s_o(z_o));

  bs_nco #(.W(W), .A(A), .K0(K0), .DK(DK)) u_nco (
    .clk, .rst_n, .c_i(z_o), .qc_o, .qs_o, .sat_o);
endmodule
