// lms_ref_pkg: bit-true reference model of the LMS equalizer arithmetic,
// written independently of the RTL for the testbenches.
//
// Numbers are held in longint and saturated to W-bit two's complement after
// every operation, in the same places the hardware saturates:
//   product   p = sat(floor(a*b / 2^FRAC))
//   y         = sat(sum of the tap products)
//   e         = sat(d - y)
//   mu_e      = sat(floor(mu*e / 2^FRAC)), or +/-mu for the sign-error rules
//   delta     = sat(x*mu_e / 2^FRAC), or +/-mu_e for the sign-data rules
//   w         = sat(w + delta)
package lms_ref_pkg;

  function automatic longint sat(input longint v, input int unsigned w);
    longint maxv = (longint'(1) <<< (w - 1)) - 1;
    longint minv = -(longint'(1) <<< (w - 1));
    if (v > maxv) return maxv;
    if (v < minv) return minv;
    return v;
  endfunction

  // floor(a*b / 2^frac), saturated.
  function automatic longint qmul(input longint a, input longint b,
                                  input int unsigned frac, input int unsigned w);
    longint p = a * b;
    return sat(p >>> frac, w);
  endfunction

  // Reinterpret a w-bit pattern as a signed number.
  function automatic longint sext(input longint v, input int unsigned w);
    longint m = (longint'(1) <<< w) - 1;
    longint u = v & m;
    if (u >= (longint'(1) <<< (w - 1))) return u - (longint'(1) <<< w);
    return u;
  endfunction

  class lms_model;
    int unsigned ntaps, w, frac;
    longint x[];    // x[k] = x(n-k)
    longint wt[];   // tap weights
    longint y, e, mu_e;

    function new(int unsigned ntaps, int unsigned w, int unsigned frac);
      this.ntaps = ntaps;
      this.w     = w;
      this.frac  = frac;
      x  = new[ntaps];
      wt = new[ntaps];
      reset();
    endfunction

    function void reset();
      foreach (x[k])  x[k]  = 0;
      foreach (wt[k]) wt[k] = 0;
      y = 0; e = 0; mu_e = 0;
    endfunction

    // One sample: shift in xn, filter, form the error, adapt.
    // mode bit 0: sign(x) in the update; mode bit 1: sign(e).
    function void step(longint xn, longint dn, longint mu, int mode);
      longint acc, delta;
      for (int k = int'(ntaps) - 1; k > 0; k--) x[k] = x[k-1];
      x[0] = xn;
      acc = 0;
      for (int k = 0; k < int'(ntaps); k++) acc += qmul(x[k], wt[k], frac, w);
      y = sat(acc, w);
      e = sat(dn - y, w);
      if (mode[1]) mu_e = (e < 0) ? sat(-mu, w) : mu;
      else         mu_e = qmul(mu, e, frac, w);
      for (int k = 0; k < int'(ntaps); k++) begin
        if (mode[0]) delta = (x[k] < 0) ? sat(-mu_e, w) : mu_e;
        else         delta = qmul(x[k], mu_e, frac, w);
        wt[k] = sat(wt[k] + delta, w);
      end
    endfunction
  endclass

endpackage
