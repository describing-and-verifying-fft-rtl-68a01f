// radix4_stage: one step of the radix-2^2 decimation-in-frequency network.
//
// The N-element list is taken as N/M blocks of M elements (M a power of 4).
// For n = 0..M/4-1 the four samples x(n), x(n+M/4), x(n+M/2), x(n+3M/4) of a
// block are combined by two layers of butterflies with one -j in between:
//   a = x(n) + x(n+M/2)        b = x(n) - x(n+M/2)
//   c = x(n+M/4) + x(n+3M/4)   d = -j * (x(n+M/4) - x(n+3M/4))
// and the four results are multiplied by their twiddles and written to the
// four quarters of the block in the order
//   quarter 0: (a + c) * W_M^(0n)   -> feeds X(4k)
//   quarter 1: (a - c) * W_M^(2n)   -> feeds X(4k+2)
//   quarter 2: (b + d) * W_M^(1n)   -> feeds X(4k+1)
//   quarter 3: (b - d) * W_M^(3n)   -> feeds X(4k+3)
// Each quarter is then an M/4-point DFT problem for the next step; the 0,2,1,3
// quarter order is why the full network ends with a bit reversal.
// Combinational. The split, the -j on the x(n+M/4) - x(n+3M/4) difference
// and the quarter order follow the source's derivation and 16-point flow
// graph; no code for this step was given there, so the wiring is derived.
module radix4_stage
  import fft_pkg::*;
#(
  parameter int N = 16,
  parameter int M = 16
) (
  input  cplx_t x [N],
  output cplx_t y [N]
);
  localparam int Q = M / 4;

  for (genvar b = 0; b < N / M; b++) begin : g_blk
    for (genvar n = 0; n < Q; n++) begin : g_n
      localparam int I0 = b * M + n;
      cplx_t a, bd, c, d0, d, r0, r1, r2, r3;

      fft_component u_bf02 (.a(x[I0]),     .b(x[I0 + 2*Q]), .sum(a), .diff(bd));
      fft_component u_bf13 (.a(x[I0 + Q]), .b(x[I0 + 3*Q]), .sum(c), .diff(d0));
      mul_neg_j     u_negj (.x(d0), .y(d));
      fft_component u_bfac (.a(a),  .b(c), .sum(r0), .diff(r1));
      fft_component u_bfbd (.a(bd), .b(d), .sum(r2), .diff(r3));

      twiddle_mult #(.N(M), .K(0))     u_tw0 (.x(r0), .y(y[I0]));
      twiddle_mult #(.N(M), .K(2 * n)) u_tw1 (.x(r1), .y(y[I0 + Q]));
      twiddle_mult #(.N(M), .K(n))     u_tw2 (.x(r2), .y(y[I0 + 2*Q]));
      twiddle_mult #(.N(M), .K(3 * n)) u_tw3 (.x(r3), .y(y[I0 + 3*Q]));
    end
  end
endmodule
