// Transmitter and channel model for the receiver testbenches.
//
// A symbol of n sub-carriers carries n/64 bits; bit g is spread by the
// 64-chip code over sub-carriers 64g..64g+63 (chip k mod 64), BPSK mapped
// (bit 0 -> +1, bit 1 -> -1), weighted by the channel H(k) and by the
// amplitude AMP, and turned into time domain by
//   x(t) = sum_k Y(k) exp(+j 2 pi k t / n),
// so that the receiver's scaled FFT (DFT/n) returns Y(k).  A pilot symbol
// is a symbol whose bits are all 0.  The channel is a two-path one,
// H(k) = 1 + a exp(-j 2 pi k d / n).  make_symbol_mu superimposes several
// users, each with its own code and amplitude, and adds white Gaussian
// noise at a given signal-to-noise ratio; walsh() gives the rows of the
// 64 x 64 Walsh-Hadamard matrix (chip k of row u is -1 when u & k has odd
// parity), which are mutually orthogonal codes.
package mccdma_tx_pkg;

  localparam real PI = 3.14159265358979323846;
  localparam real AMP = 256.0;

  typedef struct {
    real re;
    real im;
  } cr_t;

  function automatic int rnd_sat(real v);
    int r;
    r = (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  function automatic void make_channel(input int n, input real a, input real phi,
                                       input int d, output cr_t h[]);
    h = new[n];
    for (int k = 0; k < n; k++) begin
      real ang;
      ang = -2.0 * PI * k * d / n + phi;
      h[k].re = 1.0 + a * $cos(ang);
      h[k].im = a * $sin(ang);
    end
  endfunction

  // time-domain samples (re, im interleaved in two arrays) of one symbol
  function automatic void make_symbol(input int n, input cr_t h[], input logic [63:0] code,
                                      input bit bits[], output int xr[], output int xi[]);
    cr_t y [];
    real cs [];
    real sn [];
    y = new[n];
    cs = new[n];
    sn = new[n];
    xr = new[n];
    xi = new[n];
    for (int m = 0; m < n; m++) begin
      cs[m] = $cos(2.0 * PI * m / n);
      sn[m] = $sin(2.0 * PI * m / n);
    end
    for (int k = 0; k < n; k++) begin
      real s;
      s = AMP * (code[k % 64] ? -1.0 : 1.0) * (bits[k / 64] ? -1.0 : 1.0);
      y[k].re = s * h[k].re;
      y[k].im = s * h[k].im;
    end
    for (int t = 0; t < n; t++) begin
      real ar, ai;
      ar = 0.0; ai = 0.0;
      for (int k = 0; k < n; k++) begin
        int m;
        m = (k * t) % n;
        ar += y[k].re * cs[m] - y[k].im * sn[m];
        ai += y[k].re * sn[m] + y[k].im * cs[m];
      end
      xr[t] = rnd_sat(ar);
      xi[t] = rnd_sat(ai);
    end
  endfunction

  function automatic logic [63:0] walsh(input int u);
    logic [63:0] c;
    for (int k = 0; k < 64; k++) c[k] = ^(6'(u) & 6'(k));
    return c;
  endfunction

  // standard normal sample (Box-Muller)
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  // nu users: code[u], amplitude amp[u], bits[u * (n/64) + g]; noise at
  // snr_db relative to the mean power of the noiseless time-domain samples
  function automatic void make_symbol_mu(input int n, input cr_t h[], input int nu,
                                         input logic [63:0] code[], input real amp[],
                                         input bit bits[], input real snr_db,
                                         output int xr[], output int xi[]);
    cr_t y [];
    real ar [], ai [];
    real p, sigma;
    y = new[n];
    ar = new[n];
    ai = new[n];
    xr = new[n];
    xi = new[n];
    for (int k = 0; k < n; k++) begin
      real s;
      s = 0.0;
      for (int u = 0; u < nu; u++)
        s += amp[u] * (code[u][k % 64] ? -1.0 : 1.0) * (bits[u * (n / 64) + k / 64] ? -1.0 : 1.0);
      y[k].re = s * h[k].re;
      y[k].im = s * h[k].im;
    end
    p = 0.0;
    for (int t = 0; t < n; t++) begin
      ar[t] = 0.0; ai[t] = 0.0;
      for (int k = 0; k < n; k++) begin
        real a;
        a = 2.0 * PI * ((k * t) % n) / n;
        ar[t] += y[k].re * $cos(a) - y[k].im * $sin(a);
        ai[t] += y[k].re * $sin(a) + y[k].im * $cos(a);
      end
      p += ar[t] * ar[t] + ai[t] * ai[t];
    end
    p /= n;
    sigma = $sqrt(p / 2.0 / $pow(10.0, snr_db / 10.0));
    for (int t = 0; t < n; t++) begin
      xr[t] = rnd_sat(ar[t] + sigma * gauss());
      xi[t] = rnd_sat(ai[t] + sigma * gauss());
    end
  endfunction

endpackage
