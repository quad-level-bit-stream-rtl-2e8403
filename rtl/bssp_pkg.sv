// bssp_pkg: shared types and helpers for quad-level bit-stream signal processing.
//
// A quad-level bit-stream carries one 2-bit symbol per clock. Symbol code c in 0..3 stands
// for the level L(c) = 2c - 3, i.e. -3, -1, +1, +3; a stream whose levels average to m
// represents the normalised value m/3 in [-1, +1]. Every block in this library exchanges
// such symbols and keeps its state in small signed registers.
package bssp_pkg;

  typedef logic [1:0] qsym_t;

  // Level of a symbol: 0,1,2,3 -> -3,-1,+1,+3.
  function automatic logic signed [2:0] lvl(input qsym_t c);
    case (c)
      2'd0:    return -3'sd3;
      2'd1:    return -3'sd1;
      2'd2:    return 3'sd1;
      default: return 3'sd3;
    endcase
  endfunction

  // Symbol of an odd level in -3..3 (the inverse of lvl).
  function automatic qsym_t sym(input logic signed [2:0] l);
    case (l)
      -3'sd3:  return 2'd0;
      -3'sd1:  return 2'd1;
      3'sd1:   return 2'd2;
      default: return 2'd3;
    endcase
  endfunction

endpackage
