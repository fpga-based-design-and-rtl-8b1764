// tb_fft_ctrl: follows the controller over three frames and checks the
// LOAD phase (32 clocks, in_ready and we high, waddr counting 0..31) and
// the READ phase (16 clocks, rd_en high, rd_idx counting 0..15 and raddr
// equal to the 4-bit reversal of rd_idx), i.e. a 48-clock frame period.
module tb_fft_ctrl;
  import fft_ref_pkg::*;

  logic       clk = 1'b0, rst = 1'b1;
  logic       in_ready, we, rd_en;
  logic [4:0] waddr;
  logic [3:0] raddr, rd_idx;
  logic [7:0] cnt;
  int checks = 0, failures = 0;

  fft_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int f = 0; f < 3; f++) begin
      for (int n = 0; n < 32; n++) begin
        check(in_ready && we && !rd_en, $sformatf("frame %0d load %0d: phase", f, n));
        check(waddr == 5'(n), $sformatf("frame %0d waddr %0d exp %0d", f, waddr, n));
        @(negedge clk);
      end
      for (int j = 0; j < 16; j++) begin
        check(!in_ready && !we && rd_en, $sformatf("frame %0d read %0d: phase", f, j));
        check(rd_idx == 4'(j), $sformatf("rd_idx %0d exp %0d", rd_idx, j));
        check(raddr == 4'(bitrev4(j)), $sformatf("raddr %0d exp %0d", raddr, bitrev4(j)));
        @(negedge clk);
      end
    end
    check(in_ready, "no LOAD after READ");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
