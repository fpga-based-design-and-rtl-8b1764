// fft_pkg: types and constants shared by the 32-point radix-2 DIT FFT.
//
// Samples enter as 16-bit two's-complement Q8.8 numbers (8 integer bits,
// 8 fraction bits), as the source design specifies. Inside the butterfly
// stages every value is widened to 32 bits with the same 8 fraction bits
// (Q24.8); the 32-bit width follows the 31:0 ports of the source design's
// twiddle-factor stage, and no stage can overflow it for 16-bit inputs.
// Twiddle factors are 16-bit Q8.8 too. Results leave the core saturated
// back to 16-bit Q8.8, which is this design's choice.
package fft_pkg;

  localparam int unsigned N       = 32;  // transform length
  localparam int unsigned LOG2N   = 5;   // number of butterfly stages
  localparam int unsigned HALF_N  = N / 2;
  localparam int unsigned DATA_W  = 16;  // external sample width (Q8.8)
  localparam int unsigned FRAC_W  = 8;   // fraction bits everywhere
  localparam int unsigned INT_W   = 32;  // width inside the stages (Q24.8)
  localparam int unsigned TW_W    = 16;  // twiddle width (Q8.8)

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [TW_W-1:0]   tw_comp_t;

  // One complex value inside the butterfly stages.
  typedef struct packed {
    logic signed [INT_W-1:0] re;
    logic signed [INT_W-1:0] im;
  } cplx_t;

  // One twiddle factor W32^k = cos(2*pi*k/32) - j*sin(2*pi*k/32).
  typedef struct packed {
    tw_comp_t re;
    tw_comp_t im;
  } twiddle_t;

  typedef cplx_t  frame_t  [N];
  typedef sample_t sframe_t [N];

  // Saturate a Q24.8 value to 16-bit Q8.8.
  function automatic sample_t saturate(input logic signed [INT_W-1:0] v);
    if (v > 32767)
      return sample_t'(16'sh7fff);
    else if (v < -32768)
      return sample_t'(16'sh8000);
    else
      return sample_t'(v[DATA_W-1:0]);
  endfunction

endpackage
