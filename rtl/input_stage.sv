// input_stage: the two sample memories and the butterfly input registers.
//
// Samples arrive one per clock with their position n (0..31). Positions
// 0..15 (MSB of n clear) go to RAM-1 and positions 16..31 (MSB set) to
// RAM-2, so the two operands of every first-stage butterfly, x(r) and
// x(r+16), sit at the same address r of the two memories. During the read
// phase the controller presents the address r and the butterfly index j
// from pattern_gen; one clock later (synchronous RAM read) the two words
// are written to frame positions 2j (RAM-1) and 2j+1 (RAM-2). After index
// 15 has been written, frame_valid pulses for one clock and the 32
// registers hold the whole input frame in bit-reversed order, ready for
// stage 1. The registers keep their contents until the next read phase.
module input_stage
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  // write side: serial samples
  input  logic       we,
  input  logic [4:0] waddr,    // sample position n
  input  sample_t    wdata,
  // read side: pattern-ordered gather
  input  logic       rd_en,
  input  logic [3:0] raddr,    // common RAM address r
  input  logic [3:0] rd_idx,   // butterfly index j served by r
  output sample_t    frame [N],
  output logic       frame_valid
);

  logic [DATA_W-1:0] ram1_q, ram2_q;
  logic              cap_en;
  logic [3:0]        cap_idx;

  sample_ram #(.DEPTH(HALF_N), .W(DATA_W)) u_ram1 (
    .clk   (clk),
    .we    (we && !waddr[4]),
    .waddr (waddr[3:0]),
    .wdata (wdata),
    .re    (rd_en),
    .raddr (raddr),
    .rdata (ram1_q)
  );

  sample_ram #(.DEPTH(HALF_N), .W(DATA_W)) u_ram2 (
    .clk   (clk),
    .we    (we && waddr[4]),
    .waddr (waddr[3:0]),
    .wdata (wdata),
    .re    (rd_en),
    .raddr (raddr),
    .rdata (ram2_q)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      cap_en      <= 1'b0;
      cap_idx     <= '0;
      frame_valid <= 1'b0;
      for (int i = 0; i < N; i++) frame[i] <= '0;
    end else begin
      cap_en      <= rd_en;
      cap_idx     <= rd_idx;
      frame_valid <= cap_en && (cap_idx == 4'd15);
      if (cap_en) begin
        frame[{cap_idx, 1'b0}] <= sample_t'(ram1_q);
        frame[{cap_idx, 1'b1}] <= sample_t'(ram2_q);
      end
    end
  end

endmodule
