// fft_ctrl: the finite state machine that sequences the FFT.
//
// Two phases repeat for every frame:
//   LOAD  32 clocks. in_ready is high and the sample on the serial input is
//         written to position cnt (0..31) of the sample memories.
//   READ  16 clocks. pattern_gen steps the common memory address through
//         the source design's increment pattern, and every clock one pair
//         of samples is gathered for the butterfly index it serves.
// The five butterfly stages and the output buffer run on their own once
// the gathered frame is complete (frame_valid of input_stage), so the next
// LOAD starts right after READ and a new frame is accepted every 48 clocks.
// cnt is the 8-bit counter of the source design's FSM; only its five low
// bits are needed here. Reset is synchronous and active high and starts a
// LOAD phase at position 0.
module fft_ctrl (
  input  logic       clk,
  input  logic       rst,
  output logic       in_ready,  // serial input is being sampled
  output logic       we,        // write enable of the sample memories
  output logic [4:0] waddr,     // sample position being written
  output logic       rd_en,     // gather read this clock
  output logic [3:0] raddr,     // common read address of RAM-1/RAM-2
  output logic [3:0] rd_idx,    // butterfly index of that read
  output logic [7:0] cnt
);

  typedef enum logic [0:0] {S_LOAD, S_READ} state_t;

  state_t state;
  logic   pat_start, pat_active, pat_last;

  assign in_ready  = (state == S_LOAD);
  assign we        = in_ready;
  assign waddr     = cnt[4:0];
  assign pat_start = (state == S_LOAD) && (cnt == 8'd31);
  assign rd_en     = (state == S_READ) && pat_active;

  pattern_gen u_pat (
    .clk    (clk),
    .rst    (rst),
    .start  (pat_start),
    .step   (state == S_READ),
    .addr   (raddr),
    .idx    (rd_idx),
    .active (pat_active),
    .last   (pat_last)
  );

  // The memories are never written and read for the gather in one clock,
  // and the address sequence starts only at the end of a LOAD phase.
  a_phase_exclusive: assert property (@(posedge clk) disable iff (rst) !(we && rd_en));
  a_read_after_load: assert property (@(posedge clk) disable iff (rst)
                                      pat_start |=> (state == S_READ) && pat_active);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_LOAD;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_LOAD: begin
          if (cnt == 8'd31) begin
            state <= S_READ;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 8'd1;
          end
        end
        S_READ: begin
          if (pat_last) begin
            state <= S_LOAD;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 8'd1;
          end
        end
        default: begin
          state <= S_LOAD;
          cnt   <= '0;
        end
      endcase
    end
  end

endmodule
