// mul_neg_j: multiplication by -j (the constant W_4^1) as used inside every
// radix-2^2 step. (re + j*im) * (-j) = im - j*re, so the parts are swapped and
// the new imaginary part negated; no multiplier is needed. Combinational.
// Negating the most negative value wraps to itself (two's complement).
// The operation and its place in the network follow the radix-2^2
// derivation; the swap-and-negate form is the obvious realisation of it.
module mul_neg_j
  import fft_pkg::*;
(
  input  cplx_t x,
  output cplx_t y
);
  always_comb begin
    y.re = x.im;
    y.im = -x.re;
  end
endmodule
