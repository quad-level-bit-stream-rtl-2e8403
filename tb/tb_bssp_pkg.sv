// tb_bssp_pkg: stimulus and measurement helpers shared by the testbenches.
//
//  sd_src     behavioural first-order sigma-delta modulator with real-valued state; turns a
//             normalised value in [-1, 1] into quad-level symbols (the analog modulator
//             that feeds a real system).
//  freq_meter boxcar-averages a stream of levels and times its rising zero crossings (with
//             hysteresis) to estimate the period of a sigma-delta coded sinusoid.
package tb_bssp_pkg;
  import bssp_pkg::*;

  class sd_src;
    real u = 0.0;
    function qsym_t next(real x);
      real v;
      int  o;
      v = 3.0 * x + u;
      if      (v >= 2.0)  o = 3;
      else if (v >= 0.0)  o = 1;
      else if (v >= -2.0) o = -1;
      else                o = -3;
      u = v - o;
      return qsym_t'((o + 3) / 2);
    endfunction
  endclass

  class freq_meter;
    int  win;
    int  buf_q[$];
    int  sum = 0;
    bit  pos = 1'b1;   // a crossing counts only after the signal was seen negative
    int  n = 0;
    int  crossings = 0;
    int  first_t = -1, last_t = -1;
    int  start_t;
    function new(int w, int t0);
      win = w; start_t = t0;
    endfunction
    function void push(int l);
      buf_q.push_back(l);
      sum += l;
      if (buf_q.size() > win) sum -= buf_q.pop_front();
      if (n >= start_t) begin
        if (!pos && sum > win / 4) begin
          pos = 1'b1;
          crossings++;
          if (first_t < 0) first_t = n;
          last_t = n;
        end else if (pos && sum < -win / 4) begin
          pos = 1'b0;
        end
      end
      n++;
    endfunction
    function real period();
      if (crossings < 2) return 0.0;
      return real'(last_t - first_t) / real'(crossings - 1);
    endfunction
  endclass

endpackage
