// fft_component: the radix-2 butterfly, i.e. a 2-point DFT. It returns
// a+b and a-b of two complex inputs. This is the operator shared by both FFT
// networks. Purely combinational; the result wraps on overflow because the
// word width does not grow (a choice of this design, see fft_pkg).
module fft_component
  import fft_pkg::*;
(
  input  cplx_t a,
  input  cplx_t b,
  output cplx_t sum,
  output cplx_t diff
);
  assign sum  = cadd(a, b);
  assign diff = csub(a, b);
endmodule
