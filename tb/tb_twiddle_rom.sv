// tb_twiddle_rom: compares all sixteen twiddle factors with
// trunc(256*cos(2*pi*k/32)) and -trunc(256*sin(2*pi*k/32)) computed with
// $cos/$sin, and a few entries with the values a Q8.8 table must hold.
module tb_twiddle_rom;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  logic [3:0] k;
  twiddle_t   w;
  int checks = 0, failures = 0;

  twiddle_rom dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      ref_c_t r;
      k = 4'(i);
      #1;
      r = twiddle(i);
      check(longint'(w.re) == r.re && longint'(w.im) == r.im,
            $sformatf("k=%0d got %0d,%0d exp %0d,%0d", i, w.re, w.im, r.re, r.im));
    end
    k = 4'd1; #1;
    check(w.re == 16'sh00fb, "cos(pi/16) is not 0x00fb");
    k = 4'd6; #1;
    check(w.re == 16'sh0061, "cos(3pi/8) is not 0x0061");
    k = 4'd8; #1;
    check(w.re == 16'sh0000 && w.im == -16'sh0100, "W8 is not -j");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
