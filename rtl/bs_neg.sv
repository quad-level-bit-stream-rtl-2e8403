// bs_neg: negation of a quad-level bit-stream.
//
// The level of each symbol changes sign (-3 <-> +3, -1 <-> +1). With the code mapping
// L(c) = 2c - 3 this is c -> 3 - c, which is both code bits inverted. Purely
// combinational, no latency. The block appears in the oscillator, divider and square-root
// diagrams as "negation"; the bit inversion is this design's realisation.
module bs_neg
  import bssp_pkg::*;
(
  input  qsym_t a_i,
  output qsym_t y_o
);
  assign y_o = ~a_i;
endmodule
