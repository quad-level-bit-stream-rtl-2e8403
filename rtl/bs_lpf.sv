// bs_lpf: first-order lowpass filter working directly on a quad-level bit-stream.
//
// Structure of the published filter: an integrator w[n] = w[n-1] + a*L(x[n]) - b*L(y[n])
// feeds a quad-level DSDM with gain K whose output y is also the filter output. Because the
// mean of L(y) follows w/K, the filter has a DC gain of a/b and a pole near 1 - b/K, i.e. a
// normalised cut-off of about b/(2*pi*K). The defaults (K = 256, a = b = 3) give unity gain
// and a cut-off of 0.00187. The two gain blocks are constant multiplexers selecting
// {-3,-1,1,3} times a or b. Clipping w to [-3K, 3K] (sat_o) keeps the DSDM inside its range
// and is this design's own addition, as are the widths.
//
// Timing: y_o comes from the DSDM register; x_i reaches y_o after two clocks.
module bs_lpf
  import bssp_pkg::*;
#(
  parameter int unsigned W  = 11,   // width of w and of the DSDM accumulator
  parameter int unsigned K  = 256,  // DSDM feedback gain
  parameter int          GA = 3,    // input gain a
  parameter int          GB = 3     // feedback gain b
) (
  input  logic  clk,
  input  logic  rst_n,
  input  qsym_t x_i,
  output qsym_t y_o,
  output logic  sat_o
);
  localparam logic signed [W+5:0] WMAX = (W+6)'(3 * K);

  logic signed [W-1:0] w, w_next;
  logic signed [W+5:0] ax, by, wsum;

  always_comb begin
    unique case (x_i)               // gain a as a multiplexer
      2'd0:    ax = -(W+6)'(3 * GA);
      2'd1:    ax = -(W+6)'(GA);
      2'd2:    ax = (W+6)'(GA);
      default: ax = (W+6)'(3 * GA);
    endcase
    unique case (y_o)               // gain b as a multiplexer
      2'd0:    by = -(W+6)'(3 * GB);
      2'd1:    by = -(W+6)'(GB);
      2'd2:    by = (W+6)'(GB);
      default: by = (W+6)'(3 * GB);
    endcase
    wsum  = (W+6)'(w) + ax - by;
    sat_o = (wsum > WMAX) || (wsum < -WMAX);
    if      (wsum > WMAX)  w_next = W'(WMAX);
    else if (wsum < -WMAX) w_next = W'(-WMAX);
    else                   w_next = wsum[W-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) w <= '0;
    else        w <= w_next;
  end

  bs_dsdm #(.W(W), .KW(W-1)) u_dsdm (
    .clk, .rst_n,
    .x_i (w_next),
    .k_i ((W-1)'(K)),
    .y_o
  );
endmodule
