// fft32_io: 32-point radix-2 decimation-in-time FFT with serial I/O.
//
// The design is split into eight stages: an input stage that stores the
// samples in two memories, a finite state machine, five butterfly stages
// and an output stage. Samples are real 16-bit Q8.8 numbers taken from
// datain, one per clock while in_ready is high, x(0) first. Samples 0..15
// go to RAM-1 and 16..31 to RAM-2; the controller then reads both memories
// at a common address that walks the increment pattern 0, +8, -4, +8, ...,
// so that the butterfly inputs arrive in decimation-in-time order without
// a bit-reversal circuit. Each butterfly stage computes its sixteen
// butterflies in parallel at 32-bit precision and registers the result.
// The output stage saturates X(0)..X(31) to 16-bit Q8.8 and sends them out
// one per clock on data_outre/data_outim while out_valid is high, with the
// frequency index on out_idx.
//
// Timing: a frame is accepted every 48 clocks (32 LOAD + 16 READ). X(0)
// leaves 24 clocks after the clock that sampled x(31); the 32 results take
// 32 clocks and overlap the loading of the next frame. Reset (rst) is
// synchronous and active high.
//
// The ports clk, rst, datain, data_outre and data_outim are those of the
// source design; in_ready, out_valid and out_idx are added by this design
// so that a user knows when samples are taken and results are valid.
module fft32_io
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  sample_t    datain,
  output sample_t    data_outre,
  output sample_t    data_outim,
  output logic       in_ready,
  output logic       out_valid,
  output logic [4:0] out_idx
);

  // Controller
  logic       we, rd_en;
  logic [4:0] waddr;
  logic [3:0] raddr, rd_idx;

  fft_ctrl u_ctrl (
    .clk      (clk),
    .rst      (rst),
    .in_ready (in_ready),
    .we       (we),
    .waddr    (waddr),
    .rd_en    (rd_en),
    .raddr    (raddr),
    .rd_idx   (rd_idx),
    .cnt      ()
  );

  // Input stage: RAM-1, RAM-2 and the gathered frame
  sample_t frame [N];
  logic    frame_valid;

  input_stage u_in (
    .clk         (clk),
    .rst         (rst),
    .we          (we),
    .waddr       (waddr),
    .wdata       (datain),
    .rd_en       (rd_en),
    .raddr       (raddr),
    .rd_idx      (rd_idx),
    .frame       (frame),
    .frame_valid (frame_valid)
  );

  // Five butterfly stages
  cplx_t stg_d [LOG2N+1][N];
  logic  stg_v [LOG2N+1];

  always_comb begin
    for (int i = 0; i < N; i++) begin
      stg_d[0][i].re = INT_W'(frame[i]);   // sign-extended, Q24.8
      stg_d[0][i].im = '0;
    end
    stg_v[0] = frame_valid;
  end

  for (genvar s = 1; s <= LOG2N; s++) begin : g_stage
    fft_stage #(.STAGE(s)) u_stage (
      .clk       (clk),
      .rst       (rst),
      .in_valid  (stg_v[s-1]),
      .din       (stg_d[s-1]),
      .out_valid (stg_v[s]),
      .dout      (stg_d[s])
    );
  end

  // Output stage
  out_buffer u_out (
    .clk        (clk),
    .rst        (rst),
    .load       (stg_v[LOG2N]),
    .din        (stg_d[LOG2N]),
    .data_outre (data_outre),
    .data_outim (data_outim),
    .out_valid  (out_valid),
    .out_idx    (out_idx)
  );

endmodule
