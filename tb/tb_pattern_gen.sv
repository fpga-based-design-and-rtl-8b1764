// tb_pattern_gen: runs the address pattern several times and checks, for
// every butterfly index j, that the address equals the 4-bit reversal of
// j (the order of the first-stage butterfly inputs), that last marks index
// 15, that active drops after it and that step has no effect while idle.
module tb_pattern_gen;
  import fft_ref_pkg::*;

  logic       clk = 1'b0, rst = 1'b1, start = 1'b0, step = 1'b0;
  logic [3:0] addr, idx;
  logic       active, last;
  int checks = 0, failures = 0;

  pattern_gen dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    check(!active, "active after reset");
    for (int run = 0; run < 3; run++) begin
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      step = 1'b1;
      for (int j = 0; j < 16; j++) begin
        check(active, $sformatf("not active at %0d", j));
        check(idx == 4'(j), $sformatf("idx %0d exp %0d", idx, j));
        check(addr == 4'(bitrev4(j)), $sformatf("j=%0d addr %0d exp %0d", j, addr, bitrev4(j)));
        check(last == (j == 15), $sformatf("last at %0d", j));
        // a stall of one clock in the middle of the second run
        if (run == 1 && j == 5) begin
          step = 1'b0;
          @(negedge clk);
          check(idx == 4'(j), "moved without step");
          step = 1'b1;
        end
        @(negedge clk);
      end
      check(!active && !last, "still active after index 15");
      @(negedge clk);
      check(!active, "step while idle restarted");
      step = 1'b0;
    end
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
