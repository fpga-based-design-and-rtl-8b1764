// fft_stage: one stage of the 32-point radix-2 DIT FFT.
//
// Holds sixteen butterflies working in parallel on a frame of 32 complex
// values, followed by 64 buff_32 registers (real and imaginary part of
// every output). Frame positions follow the in-place signal-flow graph of
// a DIT FFT whose input is in bit-reversed order: in stage STAGE (1..5)
// the span is h = 2**(STAGE-1), butterfly b (0..15) combines positions
//   p = (b / h) * 2h + (b % h)   and   q = p + h
// with twiddle W32^k, k = (b % h) * 16 / h. Stage 1 therefore uses only
// W0, stage 2 W0 and W8, stage 3 W0, W4, W8, W12, stage 4 the even
// exponents and stage 5 all sixteen, as in the flow graph.
//
// Timing: one clock of latency. When in_valid is high the registers load
// the butterfly results; out_valid follows in_valid by one clock, and the
// registers hold their value while in_valid is low.
module fft_stage
  import fft_pkg::*;
#(
  parameter int unsigned STAGE = 1   // 1..LOG2N
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  cplx_t  din  [N],
  output logic   out_valid,
  output cplx_t  dout [N]
);

  localparam int unsigned H = 1 << (STAGE - 1);

  cplx_t res [N];   // butterfly results before the registers

  for (genvar b = 0; b < HALF_N; b++) begin : g_bf
    localparam int unsigned P = (b / H) * 2 * H + (b % H);
    localparam int unsigned Q = P + H;
    localparam logic [3:0]  K = 4'((b % H) * (HALF_N / H));

    twiddle_t w;

    twiddle_rom u_tw (
      .k (K),
      .w (w)
    );

    butterfly u_bf (
      .a (din[P]),
      .b (din[Q]),
      .w (w),
      .c (res[P]),
      .d (res[Q])
    );
  end

  for (genvar i = 0; i < N; i++) begin : g_reg
    buff_32 #(.W(INT_W)) u_re (
      .clk (clk),
      .rst (rst),
      .en  (in_valid),
      .d   (res[i].re),
      .q   (dout[i].re)
    );
    buff_32 #(.W(INT_W)) u_im (
      .clk (clk),
      .rst (rst),
      .en  (in_valid),
      .d   (res[i].im),
      .q   (dout[i].im)
    );
  end

  always_ff @(posedge clk) begin
    if (rst)
      out_valid <= 1'b0;
    else
      out_valid <= in_valid;
  end

endmodule
