// fft_ref_pkg: reference models for the FFT testbenches.
//
// Two independent models of what the processors compute, both written as the
// in-place decimation-in-frequency signal flow graph rather than as a stream:
//  * fx_r2 / fx_r22: bit-accurate fixed-point models. Every butterfly output
//    is (a +- b)/2 truncated to the stage wordlength, every non-trivial
//    twiddle product is formed from four real products truncated separately,
//    trivial twiddles (multiples of W_L^(L/4)) and the -j of radix-2^2 are
//    exact, results saturate. Twiddle coefficients are
//    round(cos(2*pi*e/L) * 2^(W-1)) and round(-sin(...) * 2^(W-1)), clipped.
//  * fl_fft: double-precision DIF FFT with the same 1/2 scaling per stage
//    (outputs X(k)/N), used for SQNR measurement.
// All arrays are in stream order: position i of the output holds bin
// bitrev(i).
package fft_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic longint sat_to(longint r, int wo, ref int nsat);
    longint mx, mn;
    mx = (64'sd1 <<< (wo - 1)) - 1;
    mn = -(64'sd1 <<< (wo - 1));
    if (r > mx) begin r = mx; nsat++; end
    if (r < mn) begin r = mn; nsat++; end
    return r;
  endfunction

  // value v with fi fraction bits -> wo-bit signed fraction, truncating
  function automatic longint rq(longint v, int fi, int wo, ref int nsat);
    longint r;
    if (fi > wo - 1) r = v >>> (fi - (wo - 1));
    else             r = v <<< ((wo - 1) - fi);
    return sat_to(r, wo, nsat);
  endfunction

  function automatic longint coef(real v, int w);
    longint r, mx, mn;
    r  = longint'($floor(v * (2.0 ** (w - 1)) + 0.5));
    mx = (64'sd1 <<< (w - 1)) - 1;
    mn = -(64'sd1 <<< (w - 1));
    if (r > mx) r = mx;
    if (r < mn) r = mn;
    return r;
  endfunction

  function automatic int unsigned bitrev(int unsigned v, int bits);
    int unsigned r = 0;
    for (int b = 0; b < bits; b++) if (v[b]) r[bits-1-b] = 1'b1;
    return r;
  endfunction

  // x * W_L^e on w-bit data (w-1 fraction bits)
  function automatic void twmul(ref longint re, ref longint im, input int e, input int L,
                                input int w, ref int nsat);
    longint xr, xi, wr, wi;
    int q;
    q = (L >= 4) ? L / 4 : 1;
    if (L < 4 || e % q == 0) begin
      case ((L < 4) ? 0 : (e / q) % 4)
        0: begin xr =  re; xi =  im; end
        1: begin xr =  im; xi = -re; end
        2: begin xr = -re; xi = -im; end
        default: begin xr = -im; xi = re; end
      endcase
    end else begin
      wr = coef($cos(2.0 * PI * e / L), w);
      wi = coef(-$sin(2.0 * PI * e / L), w);
      xr = ((re * wr) >>> (w - 1)) - ((im * wi) >>> (w - 1));
      xi = ((re * wi) >>> (w - 1)) + ((im * wr) >>> (w - 1));
    end
    re = sat_to(xr, w, nsat);
    im = sat_to(xi, w, nsat);
  endfunction

  // radix-2 butterfly on positions i, j: a -> (a+b)/2, b -> (a-b)/2
  function automatic void bfly(ref longint re[], ref longint im[], input int i, input int j,
                               input int f, input int w, ref int nsat);
    longint ar, ai, br, bi;
    ar = re[i]; ai = im[i]; br = re[j]; bi = im[j];
    re[i] = rq(ar + br, f + 1, w, nsat);
    im[i] = rq(ai + bi, f + 1, w, nsat);
    re[j] = rq(ar - br, f + 1, w, nsat);
    im[j] = rq(ai - bi, f + 1, w, nsat);
  endfunction

  // R2SDF processor: input w_in-bit samples, stage wordlengths wl, output w_out
  function automatic void fx_r2(ref longint re[], ref longint im[], input int logn,
                                input int w_in, input int w_out, input int wl[], ref int nsat);
    int n = 1 << logn;
    int f = w_in - 1;
    for (int k = 0; k < logn; k++) begin
      int L = n >> k;
      for (int base = 0; base < n; base += L)
        for (int m = 0; m < L / 2; m++) begin
          bfly(re, im, base + m, base + m + L / 2, f, wl[k], nsat);
          twmul(re[base + m + L / 2], im[base + m + L / 2], m, L, wl[k], nsat);
        end
      f = wl[k] - 1;
    end
    for (int i = 0; i < n; i++) begin
      re[i] = rq(re[i], f, w_out, nsat);
      im[i] = rq(im[i], f, w_out, nsat);
    end
  endfunction

  // R2^2SDF processor (logn even)
  function automatic void fx_r22(ref longint re[], ref longint im[], input int logn,
                                 input int w_in, input int w_out, input int wl[], ref int nsat);
    int n = 1 << logn;
    int f = w_in - 1;
    for (int j = 0; j < logn / 2; j++) begin
      int L = n >> (2 * j);
      int w1 = wl[2 * j];
      int w2 = wl[2 * j + 1];
      // BF2I
      for (int base = 0; base < n; base += L)
        for (int m = 0; m < L / 2; m++)
          bfly(re, im, base + m, base + m + L / 2, f, w1, nsat);
      f = w1 - 1;
      // BF2II with -j on the second quarter of the k1 = 1 half, then twiddles
      for (int base = 0; base < n; base += L)
        for (int h = 0; h < 2; h++)
          for (int m = 0; m < L / 4; m++) begin
            int i0 = base + h * L / 2 + m;
            int i1 = i0 + L / 4;
            if (h == 1) begin
              longint t = re[i1];
              re[i1] = im[i1];
              im[i1] = -t;
            end
            bfly(re, im, i0, i1, f, w2, nsat);
            twmul(re[i0], im[i0], m * h, L, w2, nsat);
            twmul(re[i1], im[i1], m * (h + 2), L, w2, nsat);
          end
      f = w2 - 1;
    end
    for (int i = 0; i < n; i++) begin
      re[i] = rq(re[i], f, w_out, nsat);
      im[i] = rq(im[i], f, w_out, nsat);
    end
  endfunction

  // floating-point DIF FFT with 1/2 per stage: position i holds X(bitrev(i))/N
  function automatic void fl_fft(ref real re[], ref real im[], input int logn);
    int n = 1 << logn;
    for (int k = 0; k < logn; k++) begin
      int L = n >> k;
      for (int base = 0; base < n; base += L)
        for (int m = 0; m < L / 2; m++) begin
          int i = base + m;
          int j = i + L / 2;
          real ar = re[i], ai = im[i], br = re[j], bi = im[j];
          real dr = (ar - br) / 2.0, di = (ai - bi) / 2.0;
          real c = $cos(2.0 * PI * m / L), s = -$sin(2.0 * PI * m / L);
          re[i] = (ar + br) / 2.0;
          im[i] = (ai + bi) / 2.0;
          re[j] = dr * c - di * s;
          im[j] = dr * s + di * c;
        end
    end
  endfunction

  // direct DFT of one bin, scaled by 1/N
  function automatic void dft_bin(ref real xr[], ref real xi[], input int logn, input int k,
                                  output real yr, output real yi);
    int n = 1 << logn;
    yr = 0.0;
    yi = 0.0;
    for (int t = 0; t < n; t++) begin
      real a = -2.0 * PI * real'((longint'(t) * k) % longint'(n)) / n;
      yr += xr[t] * $cos(a) - xi[t] * $sin(a);
      yi += xr[t] * $sin(a) + xi[t] * $cos(a);
    end
    yr /= n;
    yi /= n;
  endfunction

endpackage
