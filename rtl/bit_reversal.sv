// bit_reversal: the bit-reversal permutation of an N-element complex list
// (N a power of two): output element bitrev(i) is input element i, e.g. for
// N=8 the order x0,x4,x2,x6,x1,x5,x3,x7.
//
// It is built the recursive way: log2(N) levels, where level l splits every
// block of N>>l items into its even-indexed items followed by its
// odd-indexed items. After all levels, the composition of these splits is
// exactly the bit reversal of the index. Pure wiring, no logic delay.
// Building it by recursive even/odd splitting follows the source
// description; evens-first is read from its 8-point flow graph, where the
// inputs appear as x0, x4, x2, x6, x1, x5, x3, x7.
module bit_reversal
  import fft_pkg::*;
#(
  parameter int N = 8
) (
  input  cplx_t x [N],
  output cplx_t y [N]
);
  localparam int L = $clog2(N);

  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int B = N >> l;  // block size at this level
    cplx_t src [N];  // input of this level
    cplx_t v   [N];  // output of this level
    if (l == 0) begin : g_first
      assign src = x;
    end else begin : g_next
      assign src = g_lvl[l-1].v;
    end
    for (genvar i = 0; i < N; i++) begin : g_item
      localparam int BASE = (i / B) * B;
      localparam int OFS  = i % B;
      // even-indexed items of the block first, then the odd-indexed ones
      localparam int SRC  = (OFS < B / 2) ? BASE + 2 * OFS : BASE + 2 * (OFS - B / 2) + 1;
      assign v[i] = src[SRC];
    end
  end

  if (L == 0) begin : g_single
    assign y = x;
  end else begin : g_out
    assign y = g_lvl[L-1].v;
  end
endmodule
