// Reference model of the windowed DFT power spectrum, in plain integer and
// real arithmetic, used by the testbenches to predict the hardware's output.
//   c[m]  = round(32768*cos(2*pi*m/N)) clamped to 32767, s[m] = c[(m-N/4) mod N]
//   w[n]  = round(32768*(0.5-0.5*cos(2*pi*n/N))) clamped to 32767
//   xw    = (x*w) >>> 15
//   re    = sum xw*c[kn mod N],  im = -sum xw*s[kn mod N]
//   Re,Im = sat16(re >>> (15+log2 N)), sat16(im >>> (15+log2 N))
//   P     = min(65535, (Re^2 + Im^2) >> 15)
package tb_dft_ref_pkg;

  function automatic int ref_cos(int i, int n);
    real v;
    v = $cos(2.0 * 3.14159265358979323846 * i / n) * 32768.0;
    if (v > 32767.0) v = 32767.0;
    return $rtoi(v + ((v >= 0.0) ? 0.5 : -0.5));
  endfunction

  function automatic int ref_sin(int i, int n);
    return ref_cos(((i - n / 4) % n + n) % n, n);
  endfunction

  function automatic int ref_hann(int i, int n);
    real v;
    v = (0.5 - 0.5 * $cos(2.0 * 3.14159265358979323846 * i / n)) * 32768.0;
    if (v > 32767.0) v = 32767.0;
    return $rtoi(v + 0.5);
  endfunction

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic int ref_log2(int n);
    int l = 0;
    while ((1 << l) < n) l++;
    return l;
  endfunction

  // Re and Im of bin k for samples x[0..n-1].
  function automatic void ref_bin(input int x[], input int n, input int k,
                                  output int re, output int im);
    longint ar = 0, ai = 0;
    int xw, m;
    for (int i = 0; i < n; i++) begin
      xw = (x[i] * ref_hann(i, n)) >>> 15;
      m  = (k * i) % n;
      ar += longint'(xw) * ref_cos(m, n);
      ai -= longint'(xw) * ref_sin(m, n);
    end
    re = sat16(ar >>> (15 + ref_log2(n)));
    im = sat16(ai >>> (15 + ref_log2(n)));
  endfunction

  function automatic int ref_power(int re, int im);
    longint s;
    s = (longint'(re) * re + longint'(im) * im) >>> 15;
    return (s > 65535) ? 65535 : int'(s);
  endfunction

  // Test signal: a tone at bin `bin` of amplitude `amp` plus a little noise.
  function automatic int tone(int i, int n, int bin, int amp, int noise);
    real v;
    v = amp * $sin(2.0 * 3.14159265358979323846 * bin * i / n);
    return sat16(longint'($rtoi(v)) + longint'(noise));
  endfunction

endpackage
