// fft_pkg: number format and constant helpers shared by the FFT networks.
//
// Complex samples are carried as a packed struct of two's-complement
// fixed-point parts, DW bits each, with no growth from stage to stage (a
// full network of size N therefore needs inputs below 2^(DW-1)/N in
// magnitude to stay clear of wrap-around). Twiddle factors
// W_N^k = cos(2*pi*k/N) - j*sin(2*pi*k/N) are rounded to TW-bit signed
// coefficients with TW-1 fraction bits; they are evaluated at elaboration
// time, so no table is stored. The word widths are this design's choice.
package fft_pkg;

  localparam int DW = 16;  // bits per real / imaginary part
  localparam int TW = 16;  // bits per twiddle coefficient (Q1.15)

  typedef logic signed [DW-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  localparam real PI = 3.14159265358979323846;

  // Rounded TW-bit coefficient of cos(2*pi*k/n).
  function automatic int tw_cos(input int k, input int n);
    return $rtoi($floor($cos(2.0 * PI * k / n) * (2.0 ** (TW - 1)) + 0.5));
  endfunction

  // Rounded TW-bit coefficient of sin(2*pi*k/n).
  function automatic int tw_sin(input int k, input int n);
    return $rtoi($floor($sin(2.0 * PI * k / n) * (2.0 ** (TW - 1)) + 0.5));
  endfunction

  // The low `bits` bits of i in reverse order.
  function automatic int bitrev(input int i, input int bits);
    int r;
    r = 0;
    for (int b = 0; b < bits; b++) r = (r << 1) | ((i >> b) & 1);
    return r;
  endfunction

  function automatic cplx_t cadd(input cplx_t a, input cplx_t b);
    cplx_t r;
    r.re = a.re + b.re;
    r.im = a.im + b.im;
    return r;
  endfunction

  function automatic cplx_t csub(input cplx_t a, input cplx_t b);
    cplx_t r;
    r.re = a.re - b.re;
    r.im = a.im - b.im;
    return r;
  endfunction

endpackage
