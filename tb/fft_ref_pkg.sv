// fft_ref_pkg: reference arithmetic for the FFT testbenches.
// dft() evaluates X(k) = sum_n x(n) * exp(-j*2*pi*k*n/N) directly in double
// precision, independently of the networks under test. close() compares a
// fixed-point result part with a real reference within a tolerance in LSB.
package fft_ref_pkg;
  localparam int MAXN = 64;
  localparam real PI = 3.14159265358979323846;

  typedef int  ivec_t [MAXN];
  typedef real rvec_t [MAXN];

  function automatic void dft(input int n, input ivec_t xr, input ivec_t xi,
                              output rvec_t yr, output rvec_t yi);
    for (int k = 0; k < n; k++) begin
      real sr, si, ang;
      sr = 0.0;
      si = 0.0;
      for (int i = 0; i < n; i++) begin
        ang = -2.0 * PI * ((k * i) % n) / n;
        sr += xr[i] * $cos(ang) - xi[i] * $sin(ang);
        si += xr[i] * $sin(ang) + xi[i] * $cos(ang);
      end
      yr[k] = sr;
      yi[k] = si;
    end
  endfunction

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Signed random value in [-a, a].
  function automatic int srand(input int a);
    return int'($urandom_range(2 * a, 0)) - a;
  endfunction

  // Independent bit reversal of the low `bits` bits of i.
  function automatic int rev(input int i, input int bits);
    int r;
    r = 0;
    for (int b = 0; b < bits; b++) if (i[b]) r[bits-1-b] = 1'b1;
    return r;
  endfunction
endpackage
