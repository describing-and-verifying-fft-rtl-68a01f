// radix2_stage: one stage of the radix-2 decimation-in-time network.
//
// The N-element list is taken as N/M blocks of M elements. In each block the
// bottom half is first multiplied by the twiddles W_M^k, k = 0..M/2-1
// (the "OneN" pattern: only the lower half is touched), then element k and
// element k+M/2 go through one butterfly:
//   y[k]       = x[k] + W_M^k * x[k+M/2]
//   y[k+M/2]   = x[k] - W_M^k * x[k+M/2]
// which is the butterfly of the DIT derivation X(k) = F1(k) + W^k F2(k),
// X(k+M/2) = F1(k) - W^k F2(k). Combinational.
// The two steps (twiddles on the lower half only, then butterflies between
// halves) follow the described stage; the generic riffle/pairwise/unriffle
// pattern used there is written out here as the pairs it connects.
module radix2_stage
  import fft_pkg::*;
#(
  parameter int N = 8,
  parameter int M = 8
) (
  input  cplx_t x [N],
  output cplx_t y [N]
);
  localparam int H = M / 2;

  for (genvar b = 0; b < N / M; b++) begin : g_blk
    for (genvar k = 0; k < H; k++) begin : g_bf
      cplx_t t;
      twiddle_mult #(.N(M), .K(k)) u_tw (
        .x(x[b*M + H + k]),
        .y(t)
      );
      fft_component u_bf (
        .a   (x[b*M + k]),
        .b   (t),
        .sum (y[b*M + k]),
        .diff(y[b*M + H + k])
      );
    end
  end
endmodule
