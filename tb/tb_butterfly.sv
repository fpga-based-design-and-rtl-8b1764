// tb_butterfly: random A, B and every twiddle W32^k against the reference
// C = A + B*W, D = A - B*W, plus a hand-worked case.
module tb_butterfly;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  cplx_t    a, b, c, d;
  twiddle_t w;
  int checks = 0, failures = 0;

  butterfly dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    // A = 1, B = 2, W = 1 -> C = 3, D = -1
    a = '{re: 32'sd256, im: 32'sd0};
    b = '{re: 32'sd512, im: 32'sd0};
    w = '{re: 16'sd256, im: 16'sd0};
    #1;
    check(c.re == 32'sd768 && c.im == 0 && d.re == -32'sd256 && d.im == 0, "hand case");
    for (int i = 0; i < 2000; i++) begin
      ref_c_t ra, rb, rw, rc, rd;
      a.re = $signed($urandom) >>> 10; a.im = $signed($urandom) >>> 10;
      b.re = $signed($urandom) >>> 10; b.im = $signed($urandom) >>> 10;
      rw = twiddle(i % 16);
      w.re = 16'(rw.re); w.im = 16'(rw.im);
      #1;
      ra.re = longint'(a.re); ra.im = longint'(a.im);
      rb.re = longint'(b.re); rb.im = longint'(b.im);
      bfly(ra, rb, rw, rc, rd);
      check(longint'(c.re) == rc.re && longint'(c.im) == rc.im &&
            longint'(d.re) == rd.re && longint'(d.im) == rd.im,
            $sformatf("k=%0d C=(%0d,%0d) exp (%0d,%0d) D=(%0d,%0d) exp (%0d,%0d)", i % 16,
                      c.re, c.im, rc.re, rc.im, d.re, d.im, rd.re, rd.im));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
