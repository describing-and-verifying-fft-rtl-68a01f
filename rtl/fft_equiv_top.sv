// fft_equiv_top: equivalence set-up for two FFT algorithms, plus the
// stand-alone half-adder example.
//
// One input list x feeds both the radix-2 decimation-in-time network
// (radix2_fft) and the radix-2^2 decimation-in-frequency network
// (radix22_fft). Both spectra are brought out in natural order, and
// fft_compare raises `equal` when they agree within TOL LSB per part.
// N must be a power of 4 so that both algorithms apply; the default 16 is
// the largest size worked out for the radix-2^2 network. At N = 4 every
// twiddle is trivial, both networks are exact and TOL = 0 checks bit-exact
// equality; at N = 16 rounding of the irrational twiddles differs between
// the algorithms, hence the default TOL of 4 LSB (this design's choice:
// each network stays within about 1.6 LSB of the exact DFT at N = 16, so
// the two differ by about 3 LSB at most).
// Everything is combinational: outputs follow the inputs after the logic
// delay. The half adder has its own ports and no connection to the FFTs.
module fft_equiv_top
  import fft_pkg::*;
#(
  parameter int N   = 16,
  parameter int TOL = 4
) (
  input  cplx_t x     [N],
  output cplx_t X_r2  [N],
  output cplx_t X_r22 [N],
  output logic  equal,
  input  logic  ha_x,
  input  logic  ha_y,
  output logic  ha_sum,
  output logic  ha_carry
);
  radix2_fft #(.N(N)) u_r2 (
    .x(x),
    .X(X_r2)
  );

  radix22_fft #(.N(N)) u_r22 (
    .x(x),
    .X(X_r22)
  );

  fft_compare #(.N(N), .TOL(TOL)) u_cmp (
    .a    (X_r2),
    .b    (X_r22),
    .equal(equal)
  );

  half_adder u_ha (
    .x    (ha_x),
    .y    (ha_y),
    .sum  (ha_sum),
    .carry(ha_carry)
  );
endmodule
