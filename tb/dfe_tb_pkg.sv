// dfe_tb_pkg: reference models and stimulus for the equaliser testbenches.
//
// DfeRef computes the equaliser at the level of its equations, one output
// index m per call, with none of the hardware's pipelining:
//   y(m)  = sum_k xq(m-k) conj(wf[k]) + sum_k d(m-1-k) conj(wb[k])
//   e(m)  = sat((d(m) - y(m)) >>> FRAC_X)
//   W    += (X(j) conj(e(j))) >>> (FRAC_X+MU_SHIFT),  applied for j = m-L-1
//           before y(m) is formed (delayed LMS with D = L)
// xq is the 2-SPT value of the sample. It is found here by searching all powers of
// two for the nearest one, not by leading-one detection as in the RTL.
//
// Channel makes QPSK symbols, sends them through a 3-tap raised-cosine
// channel (0.3887, 1, 0.3887), the classic test channel with an
// eigenvalue spread of about 46.8, and adds Gaussian noise. The noise is made
// as a sum of 12 uniform variables. Samples are rounded to 8-bit integers with
// FRAC_X fraction bits.
package dfe_tb_pkg;
  import dfe_pkg::*;

  typedef struct {
    longint y_re, y_im;
    int     e_re, e_im;
    bit     e_sat;
    bit     d_valid, d_re_neg, d_im_neg;
    int     mode;
  } ref_out_t;

  // Nearest power of two to a > 0, found by search; ties go to the larger one.
  function automatic int near_pot_exp(input int a);
    int best = 0;
    for (int g = 1; g <= int'(EXP_MAX); g++) begin
      int dn = a - (1 << best);
      int dg = a - (1 << g);
      if (dn < 0) dn = -dn;
      if (dg < 0) dg = -dg;
      if (dg <= dn) best = g;
    end
    return best;
  endfunction

  // Value of the greedy SPT_N-term approximation of x.
  function automatic int spt_value(input int x);
    int r = x, v = 0;
    for (int t = 0; t < int'(SPT_N); t++) begin
      if (r != 0) begin
        int a = (r < 0) ? -r : r;
        int p = 1 << near_pot_exp(a);
        if (r < 0) p = -p;
        v += p; r -= p;
      end
    end
    return v;
  endfunction

  function automatic int sat_int(input longint v, input int w, output bit s);
    longint mx = (64'sd1 <<< (w - 1)) - 1;
    longint mn = -(64'sd1 <<< (w - 1));
    s = 0;
    if (v > mx) begin s = 1; return int'(mx); end
    if (v < mn) begin s = 1; return int'(mn); end
    return int'(v);
  endfunction

  class DfeRef;
    int L, W, W_FRAC, FRAC_X, MU_SHIFT;
    int wf_re[], wf_im[], wb_re[], wb_im[];
    // histories, index 0 = newest
    int xh_re[$], xh_im[$];   // quantised samples
    int dh_re[$], dh_im[$];   // decisions as data-scale values (0 if none)
    // pending updates, oldest first
    typedef struct { int e_re, e_im; bit upd; int xr[], xi[], br[], bi[]; } rec_t;
    rec_t pend[$];
    int  n_inexact;

    function new(int L, int W, int W_FRAC, int FRAC_X, int MU_SHIFT);
      this.L = L; this.W = W; this.W_FRAC = W_FRAC; this.FRAC_X = FRAC_X; this.MU_SHIFT = MU_SHIFT;
      wf_re = new[L]; wf_im = new[L]; wb_re = new[L]; wb_im = new[L];
      foreach (wf_re[k]) begin wf_re[k] = 0; wf_im[k] = 0; wb_re[k] = 0; wb_im[k] = 0; end
      for (int k = 0; k < L; k++) begin
        xh_re.push_back(0); xh_im.push_back(0); dh_re.push_back(0); dh_im.push_back(0);
      end
      n_inexact = 0;
    endfunction

    function int acc(int w, longint dw);
      bit s;
      return sat_int(longint'(w) + dw, W, s);
    endfunction

    function void apply(rec_t r);
      int sh = FRAC_X + MU_SHIFT;
      if (!r.upd) return;
      for (int k = 0; k < L; k++) begin
        // x * conj(e)
        longint pr = longint'(r.xr[k]) * r.e_re + longint'(r.xi[k]) * r.e_im;
        longint pi = longint'(r.xi[k]) * r.e_re - longint'(r.xr[k]) * r.e_im;
        longint br = longint'(r.br[k]) * r.e_re + longint'(r.bi[k]) * r.e_im;
        longint bi = longint'(r.bi[k]) * r.e_re - longint'(r.br[k]) * r.e_im;
        wf_re[k] = acc(wf_re[k], pr >>> sh);
        wf_im[k] = acc(wf_im[k], pi >>> sh);
        wb_re[k] = acc(wb_re[k], br >>> sh);
        wb_im[k] = acc(wb_im[k], bi >>> sh);
      end
    endfunction

    // Process output index m: sample (x_re, x_im), mode, training symbol.
    function ref_out_t step(int x_re, int x_im, sym_mode_e mode, bit t_re_neg, bit t_im_neg);
      ref_out_t o;
      longint yr = 0, yi = 0;
      int qr = spt_value(x_re), qi = spt_value(x_im);
      longint one = longint'(1) <<< (W_FRAC + FRAC_X);
      longint dr, di;
      bit s1, s2;
      rec_t r;
      if (qr != x_re) n_inexact++;
      if (qi != x_im) n_inexact++;
      xh_re.push_front(qr); xh_im.push_front(qi);
      void'(xh_re.pop_back()); void'(xh_im.pop_back());
      if (pend.size() > L) apply(pend.pop_front());
      for (int k = 0; k < L; k++) begin
        yr += longint'(xh_re[k]) * wf_re[k] + longint'(xh_im[k]) * wf_im[k];
        yi += longint'(xh_im[k]) * wf_re[k] - longint'(xh_re[k]) * wf_im[k];
        yr += longint'(dh_re[k]) * wb_re[k] + longint'(dh_im[k]) * wb_im[k];
        yi += longint'(dh_im[k]) * wb_re[k] - longint'(dh_re[k]) * wb_im[k];
      end
      o.y_re = yr; o.y_im = yi; o.mode = int'(mode);
      o.d_valid = (mode != SYM_IDLE);
      if (mode == SYM_TRAIN) begin
        o.d_re_neg = t_re_neg; o.d_im_neg = t_im_neg;
      end else begin
        o.d_re_neg = (yr < 0); o.d_im_neg = (yi < 0);
      end
      dr = !o.d_valid ? 0 : (o.d_re_neg ? -one : one);
      di = !o.d_valid ? 0 : (o.d_im_neg ? -one : one);
      o.e_re = sat_int((dr - yr) >>> FRAC_X, W, s1);
      o.e_im = sat_int((di - yi) >>> FRAC_X, W, s2);
      o.e_sat = s1 | s2;
      // record for the delayed update, X(m) = [xq(m-k)], [d(m-1-k)]
      r.e_re = o.e_re; r.e_im = o.e_im; r.upd = (mode == SYM_TRAIN);
      r.xr = new[L]; r.xi = new[L]; r.br = new[L]; r.bi = new[L];
      for (int k = 0; k < L; k++) begin
        r.xr[k] = xh_re[k]; r.xi[k] = xh_im[k]; r.br[k] = dh_re[k]; r.bi[k] = dh_im[k];
      end
      pend.push_back(r);
      dh_re.push_front(!o.d_valid ? 0 : (o.d_re_neg ? -(1 << FRAC_X) : (1 << FRAC_X)));
      dh_im.push_front(!o.d_valid ? 0 : (o.d_im_neg ? -(1 << FRAC_X) : (1 << FRAC_X)));
      void'(dh_re.pop_back()); void'(dh_im.pop_back());
      return o;
    endfunction

    function void flush();
      while (pend.size() > 0) apply(pend.pop_front());
    endfunction
  endclass

  class Channel;
    real h[3];
    real sigma;      // noise standard deviation per component, in symbol units
    int  frac_x;
    bit  s_re[$], s_im[$];  // transmitted symbols, index 0 = newest (1 = -1)
    real gain;       // receiver gain ahead of the 8-bit quantiser
    function new(real sigma, int frac_x, real gain);
      h[0] = 0.3887; h[1] = 1.0; h[2] = 0.3887;
      this.sigma = sigma; this.frac_x = frac_x; this.gain = gain;
      for (int k = 0; k < 16; k++) begin s_re.push_back(0); s_im.push_back(0); end
    endfunction
    function real gauss();
      real s = 0.0;
      for (int k = 0; k < 12; k++) s += real'($urandom_range(0, 1000000)) / 1000000.0;
      return s - 6.0;
    endfunction
    function int to_int(real v);
      int q = $rtoi(v * real'(1 << frac_x) + ((v >= 0.0) ? 0.5 : -0.5));
      if (q > 127) q = 127;
      if (q < -128) q = -128;
      return q;
    endfunction
    // Symbol sent `delay` samples ago (delay < 16), as sign bits.
    function void sym(input int delay, output bit re_neg, output bit im_neg);
      re_neg = s_re[delay]; im_neg = s_im[delay];
    endfunction
    // Sends one new random symbol; returns the received sample.
    function void next(output int x_re, output int x_im);
      real ar = 0.0, ai = 0.0;
      s_re.push_front(1'($urandom_range(0, 1))); void'(s_re.pop_back());
      s_im.push_front(1'($urandom_range(0, 1))); void'(s_im.pop_back());
      for (int k = 0; k < 3; k++) begin
        ar += h[k] * (s_re[k] ? -1.0 : 1.0);
        ai += h[k] * (s_im[k] ? -1.0 : 1.0);
      end
      x_re = to_int(gain * (ar + sigma * gauss()));
      x_im = to_int(gain * (ai + sigma * gauss()));
    endfunction
  endclass

endpackage
