// anc_ref_pkg: golden models and stimulus for the adaptive-filter testbenches.
//
// lms_ref is a plain integer model of the delayed LMS noise canceller,
// written from the equations and independent of the RTL:
//   y(n) = sum_k w_k(n) x(n-k)                (Q2.22 * Q1.15, floor >> 22)
//   e(n) = clip16(d(n) - y(n))
//   w_k(n+1) = wrap24(w_k(n) + floor(e(n-m) x(n-m-k) / 2^(8+mu_shift)))
// with all samples before time 0 taken as zero.
//
// make_scene builds a test scene for noise cancellation: a speech-like
// signal s (voiced bursts made of a few harmonics under a raised-cosine
// envelope, with pauses between them), a white reference noise n0, and the
// noise n1 = h * n0 that reaches the primary microphone through a short
// unknown path h. The primary input is d = s + n1.
package anc_ref_pkg;

  class lms_ref;
    int    taps;
    int    m;
    int    mu_shift;
    longint w [];
    longint xs [$];   // xs[i] = x(n-i)
    longint es [$];   // es[i] = e(n-i)

    function new(int taps_, int m_, int mu_shift_);
      taps     = taps_;
      m        = m_;
      mu_shift = mu_shift_;
      w        = new[taps];
      foreach (w[k]) w[k] = 0;
    endfunction

    static function longint clip16(longint v);
      if (v > 32767) return 32767;
      if (v < -32768) return -32768;
      return v;
    endfunction

    static function longint wrap24(longint v);
      longint r;
      r = v & 64'hFF_FFFF;
      if (r >= 64'h80_0000) r = r - 64'h100_0000;
      return r;
    endfunction

    function longint x_at(int i);
      return (i < xs.size()) ? xs[i] : 0;
    endfunction

    function longint e_at(int i);
      return (i < es.size()) ? es[i] : 0;
    endfunction

    // Process one sample; returns e(n) and y(n).
    function void step(int x, int d, output int e, output int y);
      longint acc, yf, em;
      xs.push_front(longint'(x));
      if (xs.size() > taps + m + 2) void'(xs.pop_back());
      acc = 0;
      for (int k = 0; k < taps; k++) acc += w[k] * x_at(k);
      yf = acc >>> 22;
      e  = int'(clip16(longint'(d) - yf));
      y  = int'(clip16(yf));
      es.push_front(longint'(e));
      if (es.size() > m + 2) void'(es.pop_back());
      em = e_at(m);
      for (int k = 0; k < taps; k++)
        w[k] = wrap24(w[k] + ((em * x_at(m + k)) >>> (8 + mu_shift)));
    endfunction
  endclass

  // Unknown acoustic path from the noise source to the primary microphone,
  // in Q1.15: 0.6, -0.3, 0.2, 0.1.
  localparam int H_PATH [4] = '{19661, -9830, 6554, 3277};

  // Fill s, n0 and d with n samples. noise_amp is the peak of n0 (Q1.15).
  function automatic void make_scene(int n, int noise_amp,
                                     ref int s [], ref int n0 [], ref int d []);
    real pi, env, v;
    int  seg, pos, f;
    s  = new[n];
    n0 = new[n];
    d  = new[n];
    pi = 3.14159265358979;
    for (int i = 0; i < n; i++)
      n0[i] = int'($urandom_range(2 * noise_amp)) - noise_amp;
    for (int i = 0; i < n; i++) begin
      int n1;
      seg = i / 2000;            // a syllable every 2000 samples
      pos = i % 2000;
      f   = 3 + (seg % 5);       // pitch changes from syllable to syllable
      if (pos < 1200) begin
        env = 0.5 - 0.5 * $cos(2.0 * pi * real'(pos) / 1200.0);
        v = 0.18 * $sin(2.0 * pi * real'(f) * real'(i) / 400.0)
          + 0.08 * $sin(2.0 * pi * real'(2 * f) * real'(i) / 400.0)
          + 0.04 * $sin(2.0 * pi * real'(3 * f) * real'(i) / 400.0);
        s[i] = int'(env * v * 32768.0);
      end else begin
        s[i] = 0;
      end
      n1 = 0;
      for (int k = 0; k < 4; k++)
        if (i - k >= 0) n1 += (H_PATH[k] * n0[i-k]) >>> 15;
      d[i] = s[i] + n1;
    end
  endfunction

endpackage
