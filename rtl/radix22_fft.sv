// radix22_fft: N-point radix-2^2 decimation-in-frequency FFT as one
// combinational network (N a power of 4, default 16).
//
// log4(N) radix4_stage steps are applied to the natural-order input with
// block sizes N, N/4, ..., 4; each step splits every block into four
// quarter-size DFT problems. The steps leave the spectrum in bit-reversed
// order, so a bit_reversal permutation at the output restores natural order:
//   X(k) = sum_n x(n) W_N^(kn)
// unscaled. The fixed-point limits of radix2_fft apply here too.
// Structure and default size follow the source's 16-point flow graph.
module radix22_fft
  import fft_pkg::*;
#(
  parameter int N = 16
) (
  input  cplx_t x [N],
  output cplx_t X [N]
);
  localparam int L2 = $clog2(N);
  localparam int L4 = L2 / 2;

  if (N < 4 || (1 << L2) != N || (L2 % 2) != 0) begin : g_bad_n
    $error("radix22_fft: N must be a power of 4");
  end

  for (genvar i = 0; i < L4; i++) begin : g_stage
    cplx_t si [N];
    cplx_t so [N];
    if (i == 0) begin : g_first
      assign si = x;
    end else begin : g_next
      assign si = g_stage[i-1].so;
    end
    radix4_stage #(.N(N), .M(N >> (2 * i))) u_stage (
      .x(si),
      .y(so)
    );
  end

  bit_reversal #(.N(N)) u_br (
    .x(g_stage[L4-1].so),
    .y(X)
  );
endmodule
