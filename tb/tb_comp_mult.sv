// tb_comp_mult: random complex values and twiddles (full range and small
// values, positive and negative) against the reference product
// ((br*wr - bi*wi) >>> 8, (br*wi + bi*wr) >>> 8), plus hand-worked cases.
module tb_comp_mult;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  cplx_t    b, p;
  twiddle_t w;
  int checks = 0, failures = 0;

  comp_mult dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic one(input longint br, input longint bi, input longint wr, input longint wi);
    ref_c_t rb, rw, rp;
    b.re = 32'(br); b.im = 32'(bi); w.re = 16'(wr); w.im = 16'(wi);
    #1;
    rb.re = longint'(b.re); rb.im = longint'(b.im);
    rw.re = longint'(w.re); rw.im = longint'(w.im);
    rp = cmul(rb, rw);
    check(longint'(p.re) == rp.re && longint'(p.im) == rp.im,
          $sformatf("(%0d,%0d)*(%0d,%0d) = (%0d,%0d) exp (%0d,%0d)",
                    rb.re, rb.im, rw.re, rw.im, p.re, p.im, rp.re, rp.im));
  endtask

  initial begin
    // (1 + 2j) * (0.5 - 0.5j) = 1.5 + 0.5j
    one(256, 512, 128, -128);
    check(p.re == 32'sd384 && p.im == 32'sd128, "hand case 1");
    // (-3) * (-j) = 3j
    one(-768, 0, 0, -256);
    check(p.re == 32'sd0 && p.im == 32'sd768, "hand case 2");
    // floor of a negative product: -1 LSB * 0.5 = -0.5 LSB -> -1
    one(-1, 0, 128, 0);
    check(p.re == -32'sd1, "hand case 3");
    for (int i = 0; i < 2000; i++) begin
      if (i % 2 == 0)
        one(longint'($signed($urandom)) >>> 8, longint'($signed($urandom)) >>> 8,
            longint'($signed(16'($urandom)) >>> 7), longint'($signed(16'($urandom)) >>> 7));
      else
        one(longint'($signed($urandom)), longint'($signed($urandom)),
            longint'($signed(16'($urandom))), longint'($signed(16'($urandom))));
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
