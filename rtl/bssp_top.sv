// bssp_top: the quad-level bit-stream processing blocks as one design.
//
// Side by side, each with its own ports:
//  - the Type-1 DPLL (bs_dpll), which contains the NCO, oscillator, multipliers, adder,
//    negation, accumulators and DSDMs;
//  - a stand-alone DSDM converting a signed 11-bit sample into a quad-level stream, with
//    its gain fixed at MOD_K (input range +-3*MOD_K);
//  - a bit-stream lowpass filter, divider and square-root circuit, the blocks a bit-stream
//    QPSK demodulator is built from. That demodulator's wiring is not part of this design,
//    so their ports are brought out.
// All streams carry one 2-bit quad-level symbol per clock (code c = level (2c-3)).
// Reset is synchronous and active low.
module bssp_top
  import bssp_pkg::*;
#(
  parameter int MOD_K = 256
) (
  input  logic               clk,
  input  logic               rst_n,
  // DPLL
  input  qsym_t              dpll_is,
  input  qsym_t              dpll_ic,
  output qsym_t              dpll_z,
  output qsym_t              dpll_qc,
  output qsym_t              dpll_qs,
  output logic               dpll_sat,
  // multi-bit to bit-stream modulator
  input  logic signed [10:0] mod_x,
  output qsym_t              mod_y,
  // lowpass filter
  input  qsym_t              lpf_x,
  output qsym_t              lpf_y,
  output logic               lpf_sat,
  // divider
  input  qsym_t              div_x,
  input  qsym_t              div_y,
  output qsym_t              div_z,
  // square root
  input  qsym_t              sqrt_x,
  output qsym_t              sqrt_z
);
  bs_dpll u_dpll (
    .clk, .rst_n, .is_i(dpll_is), .ic_i(dpll_ic),
    .z_o(dpll_z), .qc_o(dpll_qc), .qs_o(dpll_qs), .sat_o(dpll_sat));

  bs_dsdm u_mod (
    .clk, .rst_n, .x_i(mod_x), .k_i(10'(MOD_K)), .y_o(mod_y));

  bs_lpf u_lpf (.clk, .rst_n, .x_i(lpf_x), .y_o(lpf_y), .sat_o(lpf_sat));

  bs_div u_div (.clk, .rst_n, .x_i(div_x), .y_i(div_y), .z_o(div_z));

  bs_sqrt u_sqrt (.clk, .rst_n, .x_i(sqrt_x), .z_o(sqrt_z));
endmodule
