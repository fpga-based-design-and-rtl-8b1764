// out_buffer: the last stage, storing the 32 results and sending them out.
//
// On a load pulse it takes the frame of stage 5, which is X(0)..X(31) in
// natural order, saturates every real and imaginary part from Q24.8 to
// 16-bit Q8.8 and stores it. Over the next 32 clocks it drives one result
// per clock on data_outre/data_outim, X(0) first, with out_valid high and
// out_idx giving k. The outputs are registered: X(0) appears the clock
// after the load. A new load restarts the sequence. Saturation (instead of
// wrap-around) and the serial order are this design's choices; the source
// design gives only the 16-bit real and imaginary output ports.
module out_buffer
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       load,
  input  cplx_t      din [N],
  output sample_t    data_outre,
  output sample_t    data_outim,
  output logic       out_valid,
  output logic [4:0] out_idx
);

  sample_t    mem_re [N];
  sample_t    mem_im [N];
  logic       busy;
  logic [4:0] rd_ptr;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy       <= 1'b0;
      rd_ptr     <= '0;
      out_valid  <= 1'b0;
      out_idx    <= '0;
      data_outre <= '0;
      data_outim <= '0;
      for (int i = 0; i < N; i++) begin
        mem_re[i] <= '0;
        mem_im[i] <= '0;
      end
    end else if (load) begin
      for (int i = 0; i < N; i++) begin
        mem_re[i] <= saturate(din[i].re);
        mem_im[i] <= saturate(din[i].im);
      end
      // X(0) goes out straight from the incoming frame.
      data_outre <= saturate(din[0].re);
      data_outim <= saturate(din[0].im);
      out_valid  <= 1'b1;
      out_idx    <= '0;
      rd_ptr     <= 5'd1;
      busy       <= 1'b1;
    end else if (busy) begin
      data_outre <= mem_re[rd_ptr];
      data_outim <= mem_im[rd_ptr];
      out_valid  <= 1'b1;
      out_idx    <= rd_ptr;
      rd_ptr     <= rd_ptr + 5'd1;
      busy       <= (rd_ptr != 5'd31);
    end else begin
      out_valid <= 1'b0;
    end
  end

  // Results leave in index order, one per clock, until X(31).
  a_in_order: assert property (@(posedge clk) disable iff (rst)
                               (out_valid && out_idx != 5'd31 && !load)
                               |=> (out_valid && out_idx == $past(out_idx) + 5'd1));

endmodule
