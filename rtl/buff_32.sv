// buff_32: one 32-bit pipeline register of a butterfly stage.
//
// Each butterfly output component (real or imaginary part) is held in one
// of these registers, as in the source design's stage schematic. The
// register loads d on a rising clock edge when en is high and clears to
// zero on a synchronous, active-high reset (reset polarity and the enable
// are this design's choice).
module buff_32 #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)
      q <= '0;
    else if (en)
      q <= d;
  end

endmodule
