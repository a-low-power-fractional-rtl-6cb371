// Reference models of the CIC decimators for the testbenches.
//
// The integrators run at the full input rate on the zero-stuffed input
// (x(2m) = 0, x(2m+1) = u[m]), exactly as the unoptimised filter would, so the
// models are independent of the half-rate recursion under test. Decimation,
// truncation, combs and linear interpolation follow the rules of the RTL's
// specification. Ratios are constant over one call.
package cic_model_pkg;

  function automatic longint wrapw(longint v, int w);
    return v & ((64'sd1 <<< w) - 1);
  endfunction

  function automatic int sx(longint v, int w);
    v = wrapw(v, w);
    return int'(v >= (64'sd1 <<< (w-1)) ? v - (64'sd1 <<< w) : v);
  endfunction

  // s_N(t) for t = 0 .. 2*u.size()
  function automatic void integrate(input int u[$], input int n_ord, input int w,
                                    ref longint s_n[$]);
    longint s [8];
    longint sn [8];
    s_n.delete();
    for (int i = 0; i < 8; i++) s[i] = 0;
    for (int t = 0; t <= 2*u.size(); t++) begin
      s_n.push_back(s[n_ord]);
      s[0] = (t % 2 == 1) ? longint'(u[t/2]) : 0;
      sn[0] = 0;
      for (int i = 1; i <= n_ord; i++) sn[i] = wrapw(s[i-1] + s[i], w);
      for (int i = 1; i <= n_ord; i++) s[i] = sn[i];
    end
  endfunction

  // integer decimator: outputs at instants 0, R, 2R, ...; if k_sw >= 0 the steps
  // after output k_sw use ratio r2 instead of r
  function automatic void int_decim(input int u[$], input int n_ord, input int w,
                                    input int dw, input int r, input int r2,
                                    input int k_sw, ref int y[$], ref int n_odd);
    int k = 0;
    longint s_n[$];
    longint cdl [8];
    integrate(u, n_ord, w, s_n);
    y.delete();
    n_odd = 0;
    for (int i = 0; i < 8; i++) cdl[i] = 0;
    for (int n = 0; n < s_n.size(); n += (k_sw >= 0 && k > k_sw) ? r2 : r) begin
      longint v, d;
      v = wrapw(s_n[n] >>> (w - dw), dw);
      for (int i = 0; i < n_ord; i++) begin
        d = wrapw(v - cdl[i], dw);
        cdl[i] = v;
        v = d;
      end
      y.push_back(sx(v, dw));
      if (n % 2 == 1) n_odd++;
      k++;
    end
  endfunction

  // fractional decimator: output k at tau_k = 1 + k*(R + F/L), branches at
  // round(tau_k) - 1 .. round(tau_k) + 1, pair bracketing tau_k
  function automatic void frac_decim(input int u[$], input int n_ord, input int w,
                                     input int dw, input int mu_w, input int r,
                                     input int fnum, input int fden, ref int y[$],
                                     ref int n_early, ref int n_late, ref int n_carry);
    longint s_n[$];
    longint cdl [3][8];
    int n, f, c, mu, e, l;
    int yb [3];
    integrate(u, n_ord, w, s_n);
    y.delete();
    n_early = 0; n_late = 0; n_carry = 0;
    for (int b = 0; b < 3; b++) for (int i = 0; i < 8; i++) cdl[b][i] = 0;
    n = 1; f = 0;
    forever begin
      c = (2*f >= fden) ? 1 : 0;
      if (n + c + 1 >= s_n.size()) break;
      for (int b = 0; b < 3; b++) begin
        longint v, d;
        v = wrapw(s_n[n + c - 1 + b] >>> (w - dw), dw);
        for (int i = 0; i < n_ord; i++) begin
          d = wrapw(v - cdl[b][i], dw);
          cdl[b][i] = v;
          v = d;
        end
        yb[b] = sx(v, dw);
      end
      mu = (f * (1 << mu_w)) / fden;
      e = c ? yb[0] : yb[1];
      l = c ? yb[1] : yb[2];
      y.push_back(sx(longint'(e) + ((longint'(l - e) * mu) >>> mu_w), dw));
      if (c) n_early++; else n_late++;
      f += fnum;
      n += r;
      if (f >= fden) begin f -= fden; n++; n_carry++; end
    end
  endfunction

endpackage
