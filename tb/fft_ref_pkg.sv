// fft_ref_pkg: reference models used by the FFT testbenches.
//
// Everything here is computed independently of the RTL: the twiddle factors
// come from $cos/$sin, the transform is the textbook iterative radix-2 DIT
// FFT on a bit-reversed copy of the input (not the RAM/pattern scheme of
// the RTL), and dft() is the plain O(N^2) DFT in floating point. The fixed
// point rules modelled are those the RTL documents: Q8.8 twiddles truncated
// toward zero, products shifted right by 8 (floor), 32-bit sums, and a
// final saturation to 16 bits.
package fft_ref_pkg;

  localparam int NPT = 32;
  localparam real PI = 3.14159265358979323846;

  typedef struct {
    longint re;
    longint im;
  } ref_c_t;

  function automatic int bitrev5(input int n);
    int r = 0;
    for (int b = 0; b < 5; b++)
      if (n[b]) r |= 1 << (4 - b);
    return r;
  endfunction

  function automatic int bitrev4(input int n);
    int r = 0;
    for (int b = 0; b < 4; b++)
      if (n[b]) r |= 1 << (3 - b);
    return r;
  endfunction

  // W32^k in Q8.8, components truncated toward zero
  function automatic ref_c_t twiddle(input int k);
    ref_c_t w;
    w.re = longint'($rtoi(256.0 * $cos(2.0 * PI * k / 32.0)));
    w.im = -longint'($rtoi(256.0 * $sin(2.0 * PI * k / 32.0)));
    return w;
  endfunction

  // wrap to a signed 32-bit value
  function automatic longint wrap32(input longint v);
    int t = int'(v);
    return longint'(t);
  endfunction

  function automatic ref_c_t cmul(input ref_c_t b, input ref_c_t w);
    ref_c_t p;
    p.re = wrap32((b.re * w.re - b.im * w.im) >>> 8);
    p.im = wrap32((b.re * w.im + b.im * w.re) >>> 8);
    return p;
  endfunction

  function automatic longint sat16(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  // One butterfly: c = a + b*w, d = a - b*w
  function automatic void bfly(input ref_c_t a, input ref_c_t b, input ref_c_t w,
                               output ref_c_t c, output ref_c_t d);
    ref_c_t t = cmul(b, w);
    c.re = wrap32(a.re + t.re);
    c.im = wrap32(a.im + t.im);
    d.re = wrap32(a.re - t.re);
    d.im = wrap32(a.im - t.im);
  endfunction

  // Bit-exact model of the whole transform, before saturation.
  // x holds real Q8.8 samples in natural order; result in natural order.
  function automatic void fft_fixed(input longint x [NPT], output ref_c_t y [NPT]);
    ref_c_t a [NPT];
    for (int n = 0; n < NPT; n++) begin
      a[bitrev5(n)].re = x[n];
      a[bitrev5(n)].im = 0;
    end
    for (int m = 2; m <= NPT; m *= 2) begin
      for (int k = 0; k < NPT; k += m) begin
        for (int j = 0; j < m / 2; j++) begin
          ref_c_t c, d;
          bfly(a[k+j], a[k+j+m/2], twiddle(j * NPT / m), c, d);
          a[k+j] = c;
          a[k+j+m/2] = d;
        end
      end
    end
    y = a;
  endfunction

  // Floating-point DFT of real samples given in Q8.8; result in real units.
  function automatic void dft(input longint x [NPT], output real yr [NPT], output real yi [NPT]);
    for (int k = 0; k < NPT; k++) begin
      yr[k] = 0.0;
      yi[k] = 0.0;
      for (int n = 0; n < NPT; n++) begin
        yr[k] += (real'(x[n]) / 256.0) * $cos(2.0 * PI * n * k / NPT);
        yi[k] -= (real'(x[n]) / 256.0) * $sin(2.0 * PI * n * k / NPT);
      end
    end
  endfunction

endpackage
