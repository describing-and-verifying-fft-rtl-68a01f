// radix2_fft: N-point radix-2 decimation-in-time FFT as one combinational
// network (N a power of two, default 8).
//
// The input list is put in bit-reversed order, then log2(N) radix2_stage
// instances follow with block sizes 2, 4, ..., N. Each stage combines pairs
// of M/2-point DFTs into M-point DFTs, so the output X[k] is the DFT
//   X(k) = sum_n x(n) W_N^(kn)
// in natural order, unscaled. With fft_pkg's fixed-point format the inputs
// must stay below 2^(DW-1)/N in magnitude to avoid wrap-around. Twiddles
// W_M^k with M>4 are rounded, so results carry a few LSB of error.
// Structure and default size follow the source's 8-point flow graph; the
// number format is this design's choice (fft_pkg).
module radix2_fft
  import fft_pkg::*;
#(
  parameter int N = 8
) (
  input  cplx_t x [N],
  output cplx_t X [N]
);
  localparam int L = $clog2(N);

  cplx_t xr [N];  // input in bit-reversed order

  bit_reversal #(.N(N)) u_br (
    .x(x),
    .y(xr)
  );

  for (genvar i = 0; i < L; i++) begin : g_stage
    cplx_t si [N];
    cplx_t so [N];
    if (i == 0) begin : g_first
      assign si = xr;
    end else begin : g_next
      assign si = g_stage[i-1].so;
    end
    radix2_stage #(.N(N), .M(2 << i)) u_stage (
      .x(si),
      .y(so)
    );
  end

  assign X = g_stage[L-1].so;
endmodule
