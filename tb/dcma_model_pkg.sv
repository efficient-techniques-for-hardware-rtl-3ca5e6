// dcma_model_pkg: bit-exact reference model of the delayed-CMA processor.
//
// Written directly from the arithmetic rules (sample by sample, on 64-bit
// integers), not from the RTL structure: saturation is a clamp after an
// arithmetic shift, the power-of-two product is exact and then one's-
// complemented when negative, and the weight recursion uses the gradient of
// the sample five steps earlier. Testbenches feed it the same samples as
// the RTL and compare outputs and weights.
package dcma_model_pkg;

  // Clamp-and-shift saturation to a Q1.(ow-1) word.
  function automatic longint sat(longint v, int frac, int ow);
    longint t, hi, lo;
    t  = v >>> (frac - (ow - 1));
    hi = (longint'(1) <<< (ow - 1)) - 1;
    lo = -(longint'(1) <<< (ow - 1));
    if (t > hi) return hi;
    if (t < lo) return lo;
    return t;
  endfunction

  // Sign-extend the low w bits of v.
  function automatic longint sx(longint v, int w);
    longint m;
    m = longint'(1) <<< (w - 1);
    v = v & ((longint'(1) <<< w) - 1);
    return (v ^ m) - m;
  endfunction

  // Two's complement sample -> sign + one-hot power-of-two code.
  function automatic longint pot_enc(longint d, int bi);
    longint mag, p;
    int j;
    mag = (d < 0) ? -d : d;
    p   = 0;
    if (mag >= (longint'(1) <<< (bi - 1))) j = bi - 2;
    else begin
      j = -1;
      for (int i = 0; i < bi - 1; i++) if (mag >= (longint'(1) <<< i)) j = i;
    end
    if (j >= 0) p = longint'(1) <<< j;
    if (d < 0) p = p | (longint'(1) <<< (bi - 1));
    return p;
  endfunction

  // Weight-side operand a (signed) times input-side code c.
  function automatic longint mul(longint a, longint c, bit pot, int bi);
    longint v;
    int j;
    if (!pot) return a * sx(c, bi);
    j = -1;
    for (int i = 0; i < bi - 1; i++) if (c[i]) j = i;
    if (j < 0) return 0;
    v = a * (longint'(1) <<< j);
    if (c[bi-1]) v = -v - 1;
    return v;
  endfunction

  class dcma_model;
    int  n, bi, bo, bw, sh, s1, s2;
    bit  pot;
    longint sigma2;
    longint w_re[], w_im[];
    longint g_re[$][], g_im[$][];    // gradient history, oldest first
    int  k;                          // samples since init
    longint y_re, y_im;              // last BO-bit output

    function new(int n, int bi, int bo, int bw, bit pot, int sh,
                 int s1 = 0, int s2 = 0, longint sigma2 = -1, longint w_init = -1);
      this.n = n; this.bi = bi; this.bo = bo; this.bw = bw; this.pot = pot;
      this.sh = sh; this.s1 = s1; this.s2 = s2;
      this.sigma2 = (sigma2 < 0) ? (longint'(1) <<< (2*bo - 2)) : sigma2;
      w_re = new[n]; w_im = new[n];
      init(w_init < 0 ? (longint'(1) <<< (bw - 3)) : w_init);
    endfunction

    function void init(longint w0);
      foreach (w_re[i]) begin w_re[i] = w0; w_im[i] = 0; end
      g_re.delete(); g_im.delete();
      k = 0;
    endfunction

    // One sample in; updates y_re/y_im (this sample's output) and the
    // weights to those used by the next sample.
    function void step(longint x_re[], longint x_im[], bit adapt = 1);
      longint yf_re, yf_im, ye_re, ye_im, e, es, xr, xi, d;
      longint gr[], gi[];
      int f;
      f = bi + bw - 2;
      yf_re = 0; yf_im = 0;
      for (int i = 0; i < n; i++) begin
        yf_re += mul(w_re[i], x_re[i], pot, bi) + mul(w_im[i], x_im[i], pot, bi);
        yf_im += mul(w_re[i], x_im[i], pot, bi) - mul(w_im[i], x_re[i], pot, bi);
      end
      ye_re = sat(yf_re, f + s1, bw);
      ye_im = sat(yf_im, f + s1, bw);
      y_re  = ye_re >>> (bw - bo);
      y_im  = ye_im >>> (bw - bo);
      e  = y_re * y_re + y_im * y_im - sigma2;
      es = sat(e, 2*bo - 2, bw);
      gr = new[n]; gi = new[n];
      for (int i = 0; i < n; i++) begin
        xr = mul(ye_re, x_re[i], pot, bi) + mul(ye_im, x_im[i], pot, bi);
        xi = mul(ye_re, x_im[i], pot, bi) - mul(ye_im, x_re[i], pot, bi);
        gr[i] = sat(xr, f + s2, bw) * es;
        gi[i] = sat(xi, f + s2, bw) * es;
      end
      g_re.push_back(gr); g_im.push_back(gi);
      // weights for the next sample: gradient of sample k-5
      if (k >= 5) begin
        gr = g_re.pop_front(); gi = g_im.pop_front();
        if (adapt) begin
          for (int i = 0; i < n; i++) begin
            d = (w_re[i] <<< (bw - 1)) - (gr[i] >>> sh);
            w_re[i] = sat(d, 2*bw - 2, bw);
            d = (w_im[i] <<< (bw - 1)) - (gi[i] >>> sh);
            w_im[i] = sat(d, 2*bw - 2, bw);
          end
        end
      end
      k++;
    endfunction
  endclass

endpackage
