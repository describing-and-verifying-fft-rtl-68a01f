// fft_compare: the comparison circuit used to check two FFT networks
// against each other. Given two lists of N complex outputs it raises
// `equal` when every pair matches. TOL = 0 (default) asks for bit-exact
// equality; a positive TOL accepts a difference of up to TOL LSB in each of
// the real and imaginary parts, for fixed-point sizes where the two
// networks round their twiddle products differently. Combinational.
// The exact comparison is the source's; the tolerance is this design's
// addition.
module fft_compare
  import fft_pkg::*;
#(
  parameter int N   = 4,
  parameter int TOL = 0
) (
  input  cplx_t a [N],
  input  cplx_t b [N],
  output logic  equal
);
  function automatic logic close(input sample_t p, input sample_t q);
    int diff;
    diff = int'(p) - int'(q);
    return (diff <= TOL) && (diff >= -TOL);
  endfunction

  always_comb begin
    equal = 1'b1;
    for (int i = 0; i < N; i++) begin
      if (!close(a[i].re, b[i].re) || !close(a[i].im, b[i].im)) equal = 1'b0;
    end
  end
endmodule
