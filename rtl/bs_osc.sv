// bs_osc: sigma-delta quadrature oscillator on quad-level bit-streams.
//
// Two saturating accumulators (limits +-A) and two quad-level DSDMs with gain K form a
// discrete rotation: wc integrates -Qs, ws integrates Qc, and each DSDM turns its
// accumulator into a stream whose mean follows w/K. The streams Qc and Qs are therefore
// sigma-delta coded cosine and sine, pi/2 apart, at a normalised frequency of about
// 1/(2*pi*K). The rotation grows slowly, so the +-A limits set the amplitude (about A/K
// levels, A/(3K) normalised); A must be below 3K. This structure follows the published
// oscillator. Reset values (wc = A, ws = 0, which starts the oscillation at full amplitude)
// and widths are this design's choices.
//
// k_i may change every clock; the NCO uses that to tune the frequency. Qc and Qs come
// from the DSDM registers. sat_o flags a clock in which either accumulator clipped.
module bs_osc
  import bssp_pkg::*;
#(
  parameter int unsigned W  = 11,  // DSDM accumulator width
  parameter int unsigned KW = 10,  // width of k_i
  parameter int          A  = 75   // accumulator limit
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [KW-1:0] k_i,
  output qsym_t         qc_o,
  output qsym_t         qs_o,
  output logic          sat_o
);
  localparam int unsigned AW = $clog2(A + 4) + 1;

  qsym_t                neg_qs;
  logic signed [AW-1:0] wc, ws;
  logic                 sat_c, sat_s;

  bs_neg u_neg (.a_i(qs_o), .y_o(neg_qs));

  bs_acc #(.W(AW), .A(A), .INIT(A)) u_acc_c (
    .clk, .rst_n, .d_i(neg_qs), .w_o(wc), .sat_o(sat_c));
  bs_acc #(.W(AW), .A(A), .INIT(0)) u_acc_s (
    .clk, .rst_n, .d_i(qc_o), .w_o(ws), .sat_o(sat_s));

  bs_dsdm #(.W(W), .KW(KW)) u_dsdm_c (
    .clk, .rst_n, .x_i(W'(wc)), .k_i, .y_o(qc_o));
  bs_dsdm #(.W(W), .KW(KW)) u_dsdm_s (
    .clk, .rst_n, .x_i(W'(ws)), .k_i, .y_o(qs_o));

  assign sat_o = sat_c | sat_s;

  // The amplitude limit must stay inside the DSDM input range.
  always_ff @(posedge clk) begin
    if (rst_n)
      assert (A < 3 * int'(k_i)) else $error("bs_osc: A must be below 3K");
  end
endmodule
