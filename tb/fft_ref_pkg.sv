// fft_ref_pkg: bit-exact software reference of the FFT datapath, for tests.
//
// ref_fft() is a textbook in-place radix-2 decimation-in-time FFT with the
// hardware's arithmetic: twiddles round(32767*cos), round(-32767*sin) of
// 2*pi*k/1024 taken at stride 1024/N, products truncated by 2**15 and every
// sum wrapped to 16 bits. sqmag() is the 16-bit squared magnitude
// (re*re + im*im) >> 15.
package fft_ref_pkg;
  localparam real PI = 3.14159265358979323846;

  function automatic int rnd(real x);
    return (x >= 0.0) ? int'($floor(x + 0.5)) : -int'($floor(-x + 0.5));
  endfunction

  function automatic int wrap16(longint v);
    logic [15:0] t;
    t = v[15:0];
    return int'($signed(t));
  endfunction

  function automatic int bitrev(int v, int logn);
    int r = 0;
    for (int b = 0; b < logn; b++) if (v & (1 << b)) r |= 1 << (logn - 1 - b);
    return r;
  endfunction

  // x: N real inputs (imaginary part zero); results in yr, yi
  task automatic ref_fft(input int logn, input int x[], output int yr[], output int yi[]);
    int n = 1 << logn;
    int ar[], ai[];
    ar = new[n]; ai = new[n]; yr = new[n]; yi = new[n];
    for (int t = 0; t < n; t++) begin ar[bitrev(t, logn)] = x[t]; ai[bitrev(t, logn)] = 0; end
    for (int s = 0; s < logn; s++) begin
      int half = 1 << s;
      for (int g = 0; g < n; g += 2 * half)
        for (int m = 0; m < half; m++) begin
          int p = g + m, q = g + m + half;
          int k = m * (1024 / (2 * half));
          int wr = rnd(32767.0 * $cos(2.0 * PI * k / 1024.0));
          int wi = rnd(-32767.0 * $sin(2.0 * PI * k / 1024.0));
          longint pr, pim;
          int tr, ti, nr, ni;
          pr  = longint'(ar[q]) * wr - longint'(ai[q]) * wi;
          pim = longint'(ar[q]) * wi + longint'(ai[q]) * wr;
          tr = wrap16(pr >>> 15);
          ti = wrap16(pim >>> 15);
          nr = wrap16(ar[p] - tr); ni = wrap16(ai[p] - ti);
          ar[p] = wrap16(ar[p] + tr); ai[p] = wrap16(ai[p] + ti);
          ar[q] = nr; ai[q] = ni;
        end
    end
    for (int t = 0; t < n; t++) begin yr[t] = ar[t]; yi[t] = ai[t]; end
  endtask

  function automatic int sqmag(int re, int im);
    longint s = longint'(re) * re + longint'(im) * im;
    return int'(s[30:15]);
  endfunction
endpackage
