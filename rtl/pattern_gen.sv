// pattern_gen: read-address sequencer for the two sample memories.
//
// Butterfly j (0..15) of the first FFT stage needs x(r) and x(r+16), where
// r is j with its four bits reversed: 0, 8, 4, 12, 2, 10, ... Instead of a
// bit-reversal circuit, the source design steps one address, common to
// RAM-1 and RAM-2, through a fixed increment pattern:
//     0, +8, -4, +8, -10, +8, -4, +8, -13, +8, -4, +8, -10, +8, -4, +8
// This block implements that pattern with one 4-bit adder and a
// sixteen-entry increment table.
//
// Interface and timing: a start pulse loads address 0 and butterfly index
// 0 on the next clock and raises active. Every clock with step high (while
// active) moves to the next index and address; the step taken at index 15
// drops active. last is high while index 15 is presented.
module pattern_gen (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       step,
  output logic [3:0] addr,    // common read address of RAM-1 and RAM-2
  output logic [3:0] idx,     // butterfly served by this address
  output logic       active,
  output logic       last
);

  // Increment into index j from index j-1; entry 0 is the start address.
  function automatic logic signed [4:0] inc(input logic [3:0] j);
    unique case (j)
      4'd0:                       return  5'sd0;
      4'd4, 4'd12:                return -5'sd10;
      4'd8:                       return -5'sd13;
      4'd2, 4'd6, 4'd10, 4'd14:   return -5'sd4;
      default:                    return  5'sd8;   // every odd index
    endcase
  endfunction

  logic [3:0] idx_nxt;

  always_comb idx_nxt = idx + 4'd1;

  always_ff @(posedge clk) begin
    if (rst) begin
      addr   <= '0;
      idx    <= '0;
      active <= 1'b0;
    end else if (start) begin
      addr   <= 4'(inc(4'd0));
      idx    <= '0;
      active <= 1'b1;
    end else if (step && active) begin
      if (idx == 4'd15) begin
        active <= 1'b0;
      end else begin
        idx  <= idx_nxt;
        addr <= 4'($signed({1'b0, addr}) + inc(idx_nxt));
      end
    end
  end

  assign last = active && (idx == 4'd15);

endmodule
