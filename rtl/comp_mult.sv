// comp_mult: complex multiplier, data value times twiddle factor.
//
// Computes p = b * w with b a Q24.8 complex value and w a Q8.8 twiddle:
//   p.re = (b.re*w.re - b.im*w.im) >>> 8
//   p.im = (b.re*w.im + b.im*w.re) >>> 8
// Each sum is formed at full precision (48 bits) and then shifted right
// arithmetically, i.e. truncated toward minus infinity, back to 8 fraction
// bits and INT_W bits. Four real multipliers and two adders, purely
// combinational; the registers of a stage sit after the butterfly.
// The source design names this unit but does not give its insides.
module comp_mult
  import fft_pkg::*;
(
  input  cplx_t    b,
  input  twiddle_t w,
  output cplx_t    p
);

  localparam int unsigned PW = INT_W + TW_W;  // full product width

  logic signed [PW-1:0] rr, ii, ri, ir;
  logic signed [PW:0]   sum_re, sum_im;

  always_comb begin
    rr = PW'(b.re) * PW'(w.re);
    ii = PW'(b.im) * PW'(w.im);
    ri = PW'(b.re) * PW'(w.im);
    ir = PW'(b.im) * PW'(w.re);
    sum_re = (PW+1)'(rr) - (PW+1)'(ii);
    sum_im = (PW+1)'(ri) + (PW+1)'(ir);
    p.re = INT_W'(sum_re >>> FRAC_W);
    p.im = INT_W'(sum_im >>> FRAC_W);
  end

endmodule
