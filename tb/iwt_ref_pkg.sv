// iwt_ref_pkg: reference model of the real-time (5/3) integer wavelet
// denoiser for the testbenches.
//
// It works on whole sample arrays rather than on a clocked stream: every
// level transforms the complete approximation array of the level above, with
// all samples before the first one taken as zero, which is the state the RTL
// leaves reset in. Results are wrapped to W bits like the hardware words.
//   forward:  d[i] = x[2i-1] - floor((x[2i] + x[2i-2]) / 2)
//             a[i] = x[2i-2] + floor((d[i-1] + d[i]) / 4)
//   backward: e[i] = a[i] - floor((d[i-1] + d[i]) / 4)
//             y[2i] = e[i-1],  y[2i+1] = d[i-1] + floor((e[i] + e[i-1]) / 2)
// a[i] is the approximation of the even sample x[2i-2], emitted together with
// d[i]; the backward step reproduces its input stream four samples late.
package iwt_ref_pkg;

  typedef int iq_t[$];

  // Sign-extend the low w bits of v.
  function automatic int wrap(int v, int w);
    int sh = 32 - w;
    return (v <<< sh) >>> sh;
  endfunction

  function automatic void forward(input iq_t s, input int w,
                                  output iq_t a, output iq_t d);
    int e0, e1, o, dprev;
    a = {};
    d = {};
    dprev = 0;
    for (int i = 0; i < s.size() / 2; i++) begin
      int dn;
      e0 = s[2*i];
      e1 = (i > 0) ? s[2*i-2] : 0;
      o  = (i > 0) ? s[2*i-1] : 0;
      dn = wrap(o - ((e0 + e1) >>> 1), w);
      d.push_back(dn);
      a.push_back(wrap(e1 + ((dprev + dn) >>> 2), w));
      dprev = dn;
    end
  endfunction

  function automatic void backward(input iq_t a, input iq_t d,
                                   input int w, output iq_t y);
    int eprev, dprev;
    y = {};
    eprev = 0;
    dprev = 0;
    for (int i = 0; i < a.size(); i++) begin
      int en;
      en = wrap(a[i] - ((dprev + d[i]) >>> 2), w);
      y.push_back(eprev);
      y.push_back(wrap(dprev + ((en + eprev) >>> 1), w));
      eprev = en;
      dprev = d[i];
    end
  endfunction

  // Hard threshold as built: zero when -th <= d < th, for th >= 1.
  function automatic int hard_th(int d, int th);
    if (th == 0) return (d < 0) ? 0 : d;
    return (d >= -th && d < th) ? 0 : d;
  endfunction

  // Delay a coefficient array by n samples, zeros shifted in.
  function automatic void delay(input iq_t d, input int n, output iq_t q);
    q = {};
    for (int i = 0; i < d.size(); i++) q.push_back(i >= n ? d[i - n] : 0);
  endfunction

  // Whole J-level denoiser: forward levels, hard threshold of every detail
  // (th[j-1] at level j) when use_th is set, detail delays of
  // 4(2^(J-j) - 1) level-j samples, backward levels. x.size() must be a
  // multiple of 2^J. The result is the output stream sample by sample.
  function automatic void denoise(input iq_t x, input int levels, input int w,
                                  input iq_t th, input bit use_th,
                                  output iq_t y);
    iq_t s, a, d, r;
    iq_t dl [16];
    s = x;
    for (int j = 1; j <= levels; j++) begin
      forward(s, w, a, d);
      if (use_th) foreach (d[i]) d[i] = hard_th(d[i], th[j-1]);
      delay(d, 4 * ((1 << (levels - j)) - 1), dl[j]);
      s = a;
    end
    r = a;
    for (int j = levels; j >= 1; j--) begin
      backward(r, dl[j], w, y);
      r = y;
    end
  endfunction

endpackage
