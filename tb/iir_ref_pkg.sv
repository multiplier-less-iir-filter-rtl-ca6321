// iir_ref_pkg: reference models for the filter testbenches.
//
// df_model computes one IIR filter in direct form I from the difference equation
//     acc[n] = sum_{k=0..N} b_k x[n-k] + sum_{k=1..N} a_k y[n-k],
//     y[n]   = saturate(floor(acc[n] / 2**frac)) to yw bits,
// keeping its own input and output histories in plain integers. It uses ordinary multiplication,
// so it shares nothing with the shift-add hardware. cascade_model chains second-order df_models.
package iir_ref_pkg;

  class df_model;
    int     n, frac, yw;
    longint b [], a [];        // a[0] unused
    longint xh [], yh [];      // xh[k] = x[n-k], yh[k] = y[n-k]
    int     n_sat;             // outputs that hit a saturation bound

    function new(int order, int b_in [], int a_in [], int frac_in, int yw_in);
      n = order; frac = frac_in; yw = yw_in;
      b = new[n + 1]; a = new[n + 1]; xh = new[n + 1]; yh = new[n + 1];
      for (int k = 0; k <= n; k++) b[k] = b_in[k];
      a[0] = 0;
      for (int k = 1; k <= n; k++) a[k] = a_in[k - 1];
      n_sat = 0;
      reset();
    endfunction

    function void reset();
      for (int k = 0; k <= n; k++) begin xh[k] = 0; yh[k] = 0; end
    endfunction

    function longint step(longint x);
      longint acc = 0, y, hi, lo;
      for (int k = n; k >= 1; k--) xh[k] = xh[k - 1];
      xh[0] = x;
      for (int k = 0; k <= n; k++) acc += b[k] * xh[k];
      for (int k = 1; k <= n; k++) acc += a[k] * yh[k];
      y  = acc >>> frac;
      hi = (longint'(1) <<< (yw - 1)) - 1;
      lo = -(longint'(1) <<< (yw - 1));
      if (y > hi) begin y = hi; n_sat++; end
      if (y < lo) begin y = lo; n_sat++; end
      for (int k = n; k >= 2; k--) yh[k] = yh[k - 1];
      yh[1] = y;
      return y;
    endfunction
  endclass

  class cascade_model;
    df_model sec [];
    function new(int nsec, int b_in [], int a_in [], int frac_in, int yw_in);
      sec = new[nsec];
      for (int s = 0; s < nsec; s++) begin
        int bs [] = new[3];
        int as_ [] = new[2];
        for (int k = 0; k < 3; k++) bs[k] = b_in[3 * s + k];
        for (int k = 0; k < 2; k++) as_[k] = a_in[2 * s + k];
        sec[s] = new(2, bs, as_, frac_in, yw_in);
      end
    endfunction
    function void reset();
      foreach (sec[s]) sec[s].reset();
    endfunction
    function longint step(longint x);
      longint v = x;
      foreach (sec[s]) v = sec[s].step(v);
      return v;
    endfunction
    function int n_sat();
      int t = 0;
      foreach (sec[s]) t += sec[s].n_sat;
      return t;
    endfunction
  endclass

endpackage
