// tb_fft_stage: instantiates the five stages side by side, drives each with
// the same random frames and compares every stage with the textbook
// in-place DIT stage (span m/2, twiddle W32^(j*32/m)). Also checks the
// one-clock latency of out_valid and that the registers hold their value
// while in_valid is low.
module tb_fft_stage;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  logic  clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  cplx_t din [N];
  cplx_t dout [LOG2N][N];
  logic  out_valid [LOG2N];
  int checks = 0, failures = 0;

  for (genvar s = 0; s < LOG2N; s++) begin : g_dut
    fft_stage #(.STAGE(s + 1)) dut (
      .clk       (clk),
      .rst       (rst),
      .in_valid  (in_valid),
      .din       (din),
      .out_valid (out_valid[s]),
      .dout      (dout[s])
    );
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic void ref_stage(input int s, input ref_c_t x [NPT], output ref_c_t y [NPT]);
    int m = 1 << s;
    y = x;
    for (int k = 0; k < NPT; k += m)
      for (int j = 0; j < m / 2; j++)
        bfly(x[k+j], x[k+j+m/2], twiddle(j * NPT / m), y[k+j], y[k+j+m/2]);
  endfunction

  ref_c_t x [NPT];
  ref_c_t y [NPT];

  task automatic compare(input string tag);
    for (int s = 0; s < LOG2N; s++) begin
      ref_stage(s + 1, x, y);
      for (int i = 0; i < N; i++)
        check(longint'(dout[s][i].re) == y[i].re && longint'(dout[s][i].im) == y[i].im,
              $sformatf("%s stage %0d pos %0d got (%0d,%0d) exp (%0d,%0d)", tag, s + 1, i,
                        dout[s][i].re, dout[s][i].im, y[i].re, y[i].im));
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) din[i] = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < N; i++) begin
        din[i].re = $signed($urandom) >>> 12;
        din[i].im = $signed($urandom) >>> 12;
        x[i].re = longint'(din[i].re);
        x[i].im = longint'(din[i].im);
      end
      in_valid = 1'b1;
      @(negedge clk);
      for (int s = 0; s < LOG2N; s++) check(out_valid[s], "out_valid missing");
      compare($sformatf("frame %0d", t));
      // hold: new inputs without in_valid must not change the outputs
      in_valid = 1'b0;
      for (int i = 0; i < N; i++) din[i].re = ~din[i].re;
      @(negedge clk);
      for (int s = 0; s < LOG2N; s++) check(!out_valid[s], "out_valid stuck");
      compare($sformatf("hold %0d", t));
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
