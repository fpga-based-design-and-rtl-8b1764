// butterfly: radix-2 decimation-in-time butterfly.
//
// Takes the two values A and B of a 2-point DFT and the twiddle W and
// returns C = A + B*W and D = A - B*W, the butterfly of the source design.
// B*W comes from a comp_mult; the adders work at INT_W bits (Q24.8), which
// leaves enough headroom that a 32-point transform of 16-bit samples never
// wraps. Purely combinational.
module butterfly
  import fft_pkg::*;
(
  input  cplx_t    a,
  input  cplx_t    b,
  input  twiddle_t w,
  output cplx_t    c,   // A + B*W
  output cplx_t    d    // A - B*W
);

  cplx_t bw;

  comp_mult u_mult (
    .b (b),
    .w (w),
    .p (bw)
  );

  always_comb begin
    c.re = a.re + bw.re;
    c.im = a.im + bw.im;
    d.re = a.re - bw.re;
    d.im = a.im - bw.im;
  end

endmodule
