// Reference models for the FFT testbenches: a bit-true radix-4
// decimation-in-frequency FFT written as plain index arithmetic (no
// commutator, no pipeline), and a floating-point DFT.
package fft_ref_pkg;

  typedef struct {
    int re;
    int im;
  } ci_t;

  function automatic int rnd(real v);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
  endfunction

  function automatic int sat(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  // floor division by 2^k of a signed value
  function automatic longint asr(longint v, int k);
    return v >>> k;
  endfunction

  // Fixed-point radix-4 DIF transform of n = 4^L points, output in
  // digit-reversed order, each stage scaled by 1/4 and rotated by Q2.14
  // twiddles W_256^k rounded to nearest.
  function automatic void dif_fixed(input int n, inout ci_t x[]);
    ci_t y [];
    int m;
    y = new[n];
    m = n / 4;
    while (m >= 1) begin
      for (int b = 0; b < n; b += 4 * m) begin
        for (int k = 0; k < m; k++) begin
          for (int p = 0; p < 4; p++) begin
            longint sr, si;
            int ar, ai;
            sr = 0; si = 0;
            for (int q = 0; q < 4; q++) begin
              int e;
              int vr, vi;
              vr = x[b + q * m + k].re;
              vi = x[b + q * m + k].im;
              e = (p * q) % 4;
              case (e)
                0: begin sr += vr; si += vi; end
                1: begin sr += vi; si -= vr; end
                2: begin sr -= vr; si -= vi; end
                default: begin sr -= vi; si += vr; end
              endcase
            end
            ar = int'(asr(sr, 2));
            ai = int'(asr(si, 2));
            if (m > 1) begin
              int idx, wr, wi;
              real ang;
              idx = (p * k * (256 / (4 * m))) % 256;
              ang = 2.0 * 3.14159265358979323846 * idx / 256.0;
              wr = rnd(16384.0 * $cos(ang));
              wi = rnd(-16384.0 * $sin(ang));
              y[b + p * m + k].re = sat(asr(longint'(ar) * wr - longint'(ai) * wi, 14));
              y[b + p * m + k].im = sat(asr(longint'(ar) * wi + longint'(ai) * wr, 14));
            end else begin
              y[b + p * m + k].re = ar;
              y[b + p * m + k].im = ai;
            end
          end
        end
      end
      x = y;
      y = new[n];
      m = m / 4;
    end
  endfunction

  // base-4 digit reversal of i over log4(n) digits
  function automatic int digrev(int i, int n);
    int r;
    r = 0;
    for (int m = n; m > 1; m /= 4) begin
      r = r * 4 + (i % 4);
      i /= 4;
    end
    return r;
  endfunction

  // Floating-point DFT bin k of x, divided by n.
  function automatic void dft_bin(input int n, input ci_t x[], input int k,
                                  output real re, output real im);
    re = 0.0; im = 0.0;
    for (int t = 0; t < n; t++) begin
      real a;
      a = -2.0 * 3.14159265358979323846 * ((k * t) % n) / n;
      re += x[t].re * $cos(a) - x[t].im * $sin(a);
      im += x[t].re * $sin(a) + x[t].im * $cos(a);
    end
    re /= n; im /= n;
  endfunction

  // One bin of the inverse DFT: (1/N) sum x[t] exp(+j 2 pi k t / N).
  function automatic void idft_bin(input int n, input ci_t x[], input int k,
                                   output real re, output real im);
    re = 0.0; im = 0.0;
    for (int t = 0; t < n; t++) begin
      real a;
      a = 2.0 * 3.14159265358979323846 * ((k * t) % n) / n;
      re += x[t].re * $cos(a) - x[t].im * $sin(a);
      im += x[t].re * $sin(a) + x[t].im * $cos(a);
    end
    re /= n; im /= n;
  endfunction

endpackage
