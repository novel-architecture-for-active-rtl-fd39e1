// lms_ref_pkg - cycle-free reference model of the Q18 power-normalised LMS
// line enhancer, used by the testbenches to predict the filter outputs.
//
// It is written independently of the RTL with 64-bit integer arithmetic:
// a software delay line, weights, running power and the same fixed-point
// rules (truncating right shifts, clamping to 19-bit words, mu = 2^-shift
// with shift = clamp(msb(P) - 36 + 1 + margin, min, max), held at max until
// the delay line has seen N samples).
package lms_ref_pkg;

  function automatic longint clamp_w(input longint v, input int w);
    longint hi = (64'sd1 <<< (w - 1)) - 1;
    longint lo = -(64'sd1 <<< (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  class lms_ref;
    int     n, frac, w_bits, smin, smax, margin;
    longint x[$], wt[$];
    longint power;
    int     seen;
    longint y, e;
    int     shift;

    function new(int n_taps = 29, int q_frac = 18, int sh_min = -8,
                 int sh_max = 15, int mgn = 2);
      n = n_taps; frac = q_frac; w_bits = q_frac + 1;
      smin = sh_min; smax = sh_max; margin = mgn;
      x = {}; wt = {};
      for (int i = 0; i < n; i++) begin x.push_back(0); wt.push_back(0); end
      power = 0; seen = 0;
    endfunction

    // Process one sample pair; results in y, e and shift.
    function void step(longint d, longint xin);
      longint acc, mue;
      int msb;
      power += xin * xin - x[n-1] * x[n-1];
      void'(x.pop_back());
      x.push_front(xin);
      if (seen < n) seen++;
      acc = 0;
      for (int i = 0; i < n; i++) acc += wt[i] * x[i];
      y = clamp_w(acc >>> frac, w_bits);
      e = clamp_w(d - y, w_bits);
      msb = -1;
      for (int b = 0; b < 63; b++) if (power[b]) msb = b;
      shift = msb - 2 * frac + 1 + margin;
      if (seen < n || msb < 0) shift = smax;
      else if (shift < smin) shift = smin;
      else if (shift > smax) shift = smax;
      // mu*e in Q(frac+smax), then the update product back to Q(frac).
      mue = e <<< (smax - shift);
      for (int i = 0; i < n; i++)
        wt[i] = clamp_w(wt[i] + ((mue * x[i]) >>> (frac + smax)), w_bits);
    endfunction
  endclass

endpackage
