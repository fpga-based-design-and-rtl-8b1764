// sample_ram: one of the two input sample memories (RAM-1 or RAM-2).
//
// A DEPTH x W single-clock memory with one write port and one read port.
// Writes happen on the rising edge when we is high. Reads are synchronous,
// as in an FPGA block RAM: when re is high, rdata shows the word at raddr
// one clock later and otherwise keeps its last value. The source design
// gives the two memories and their 16 x 16-bit contents; the port
// arrangement and synchronous read are this design's choice.
module sample_ram #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned W     = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)
      mem[waddr] <= wdata;
    if (re)
      rdata <= mem[raddr];
  end

endmodule
