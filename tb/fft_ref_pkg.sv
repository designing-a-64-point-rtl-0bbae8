// fft_ref_pkg: reference models for the FFT testbenches.
//
// Two independent references are provided:
//  * a bit-exact model of the fixed-point algorithm, written with ordinary
//    multiplications: in-place radix-2 decimation in frequency over 64
//    points, each butterfly (a+b)>>>1 and ((a-b)>>>1) * W64^(e mod 8) *
//    W64^(8*(e div 8)), every product truncated by >>> 14 and saturated to
//    16 bits; the twiddle constants are computed here from $cos / $sin;
//  * a floating-point DFT, X(k) = (1/64) sum x(n) exp(-+j 2 pi n k / 64).
package fft_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic int rnd(real r);
    return (r >= 0.0) ? $rtoi(r + 0.5) : -$rtoi(-r + 0.5);
  endfunction

  function automatic int ref_cos(int e);
    return rnd(16384.0 * $cos(2.0 * PI * e / 64.0));
  endfunction

  function automatic int ref_sin(int e);
    return rnd(16384.0 * $sin(2.0 * PI * e / 64.0));
  endfunction

  function automatic int sat16(longint v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  // floor division by 2^sh of a signed value
  function automatic longint asr(longint v, int sh);
    return v >>> sh;
  endfunction

  // multiply (re, im) by W64^e, truncating and saturating
  function automatic void twiddle(inout int re, inout int im, input int e);
    longint c, s, nr, ni;
    if (e == 0) return;
    c  = longint'(ref_cos(e));
    s  = longint'(ref_sin(e));
    nr = asr(longint'(re) * c + longint'(im) * s, 14);
    ni = asr(longint'(im) * c - longint'(re) * s, 14);
    re = sat16(nr);
    im = sat16(ni);
  endfunction

  // value of the low 16 bits of v, as a signed number
  function automatic longint wrap16(longint v);
    return longint'($signed(v[15:0]));
  endfunction

  // sum or difference before halving: 17 bits (wide) or 16-bit wrap-around
  function automatic longint addsub(longint v, bit wide);
    return wide ? v : wrap16(v);
  endfunction

  // one butterfly: a <- (a+b)/2, b <- ((a-b)/2) W64^e
  function automatic void bfly(inout int ar, inout int ai, inout int br, inout int bi,
                               input int e, input bit wide = 1'b1);
    int sr, si, dr, di;
    sr = int'(asr(addsub(longint'(ar) + longint'(br), wide), 1));
    si = int'(asr(addsub(longint'(ai) + longint'(bi), wide), 1));
    dr = int'(asr(addsub(longint'(ar) - longint'(br), wide), 1));
    di = int'(asr(addsub(longint'(ai) - longint'(bi), wide), 1));
    twiddle(dr, di, e % 8);
    twiddle(dr, di, (e / 8) * 8);
    ar = sr; ai = si; br = dr; bi = di;
  endfunction

  // in-place 64-point radix-2 DIF; position p ends up holding X(bitrev(p))
  function automatic void fft_model(inout int re[64], inout int im[64], input bit wide = 1'b1);
    for (int lv = 1; lv <= 6; lv++) begin
      int h;
      h = 64 >> lv;
      for (int i = 0; i < 64; i++) begin
        if ((i % (2 * h)) < h) begin
          int e;
          e = (i % (2 * h)) * (32 / h);
          bfly(re[i], im[i], re[i + h], im[i + h], e, wide);
        end
      end
    end
  endfunction

  function automatic int bitrev6(int k);
    int r;
    r = 0;
    for (int i = 0; i < 6; i++) if ((k & (1 << i)) != 0) r |= 1 << (5 - i);
    return r;
  endfunction

  // floating-point DFT (inverse = 0) or IDFT (inverse = 1), both scaled by 1/64
  function automatic void dft(input int re[64], input int im[64], input bit inverse,
                              output real xr[64], output real xi[64]);
    for (int k = 0; k < 64; k++) begin
      real sr, si, ang;
      sr = 0.0; si = 0.0;
      for (int n = 0; n < 64; n++) begin
        ang = 2.0 * PI * ((n * k) % 64) / 64.0;
        if (!inverse) ang = -ang;
        sr += re[n] * $cos(ang) - im[n] * $sin(ang);
        si += re[n] * $sin(ang) + im[n] * $cos(ang);
      end
      xr[k] = sr / 64.0;
      xi[k] = si / 64.0;
    end
  endfunction

endpackage
