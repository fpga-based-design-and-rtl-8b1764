// tb_out_buffer: loads random frames whose values partly exceed the 16-bit
// range and checks the 32 outputs that follow: X(0) the clock after load,
// then one per clock in index order with out_valid and out_idx, each part
// saturated to 16 bits, and out_valid low afterwards.
module tb_out_buffer;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  logic       clk = 1'b0, rst = 1'b1, load = 1'b0;
  cplx_t      din [N];
  sample_t    data_outre, data_outim;
  logic       out_valid;
  logic [4:0] out_idx;
  longint     mr [N], mi [N];
  int checks = 0, failures = 0, n_sat = 0;

  out_buffer dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < N; i++) din[i] = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    check(!out_valid, "out_valid after reset");
    for (int f = 0; f < 4; f++) begin
      for (int i = 0; i < N; i++) begin
        din[i].re = (i % 3 == 0) ? $signed($urandom) >>> 8 : $signed($urandom) >>> 17;
        din[i].im = (i % 4 == 1) ? $signed($urandom) >>> 8 : $signed($urandom) >>> 17;
        mr[i] = sat16(longint'(din[i].re));
        mi[i] = sat16(longint'(din[i].im));
        if (mr[i] != longint'(din[i].re) || mi[i] != longint'(din[i].im)) n_sat++;
      end
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      for (int i = 0; i < N; i++) din[i] = '0;   // the stored copy must be used
      for (int k = 0; k < N; k++) begin
        check(out_valid && out_idx == 5'(k), $sformatf("frame %0d k=%0d valid/idx", f, k));
        check(longint'(data_outre) == mr[k] && longint'(data_outim) == mi[k],
              $sformatf("frame %0d X(%0d) = (%0d,%0d) exp (%0d,%0d)", f, k,
                        data_outre, data_outim, mr[k], mi[k]));
        @(negedge clk);
      end
      check(!out_valid, "out_valid after 32 outputs");
      repeat (f) @(negedge clk);
    end
    check(n_sat > 0, "no value needed saturation");
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
