// tb_input_stage: writes 32 random samples by position, then reads the two
// memories at the bit-reversed addresses (generated here, not by the
// pattern generator) and checks that the gathered frame holds x(bitrev(p))
// at position p, that frame_valid pulses exactly once, in the clock after the
// last read, together with the complete frame, and that the frame is kept while the next samples are written.
module tb_input_stage;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  logic       clk = 1'b0, rst = 1'b1;
  logic       we = 1'b0, rd_en = 1'b0;
  logic [4:0] waddr = '0;
  sample_t    wdata = '0;
  logic [3:0] raddr = '0, rd_idx = '0;
  sample_t    frame [N];
  logic       frame_valid;
  logic [15:0] x [NPT];
  int checks = 0, failures = 0;

  input_stage dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic check_frame(input string tag);
    for (int p = 0; p < N; p++)
      check(frame[p] == x[bitrev5(p)],
            $sformatf("%s pos %0d = %h exp x(%0d) = %h", tag, p, frame[p], bitrev5(p), x[bitrev5(p)]));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int f = 0; f < 3; f++) begin
      int seen = 0;
      for (int n = 0; n < NPT; n++) begin
        x[n] = 16'($urandom);
        we = 1'b1; waddr = 5'(n); wdata = x[n];
        @(negedge clk);
      end
      we = 1'b0;
      for (int j = 0; j < 16; j++) begin
        rd_en = 1'b1; rd_idx = 4'(j); raddr = 4'(bitrev4(j));
        @(negedge clk);
        if (frame_valid) seen++;
      end
      rd_en = 1'b0;
      @(negedge clk);
      check(frame_valid, "frame_valid missing");
      check(seen == 0, "frame_valid during read");
      check_frame($sformatf("frame %0d", f));
      // writing the next frame must leave the gathered frame alone
      @(negedge clk);
      check(!frame_valid, "frame_valid longer than one clock");
      we = 1'b1; waddr = 5'd0; wdata = ~x[0];
      @(negedge clk);
      we = 1'b0;
      check_frame($sformatf("kept %0d", f));
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
