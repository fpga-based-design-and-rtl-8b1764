// twiddle_rom: the sixteen twiddle factors of a 32-point FFT.
//
// For an index k in 0..15 the table returns W32^k = cos(2*pi*k/32)
// - j*sin(2*pi*k/32) as two 16-bit Q8.8 numbers. Entry values are
// trunc(256*cos(2*pi*k/32)) and -trunc(256*sin(2*pi*k/32)), truncation
// being toward zero; this reproduces the 16-bit twiddle values of the
// source design (for instance 0x00fb for cos(pi/16) and 0x0061 for
// cos(3*pi/8)). The table is purely combinational; inside the FFT stages
// every index is a constant, so synthesis reduces each lookup to constants.
module twiddle_rom
  import fft_pkg::*;
(
  input  logic [3:0] k,   // twiddle exponent
  output twiddle_t   w    // W32^k, Q8.8
);

  logic signed [TW_W-1:0] c, s;  // 256*cos and 256*sin, truncated

  always_comb begin
    unique case (k)
      4'd0:  begin c =  16'sd256; s = 16'sd0;   end
      4'd1:  begin c =  16'sd251; s = 16'sd49;  end
      4'd2:  begin c =  16'sd236; s = 16'sd97;  end
      4'd3:  begin c =  16'sd212; s = 16'sd142; end
      4'd4:  begin c =  16'sd181; s = 16'sd181; end
      4'd5:  begin c =  16'sd142; s = 16'sd212; end
      4'd6:  begin c =  16'sd97;  s = 16'sd236; end
      4'd7:  begin c =  16'sd49;  s = 16'sd251; end
      4'd8:  begin c =  16'sd0;   s = 16'sd256; end
      4'd9:  begin c = -16'sd49;  s = 16'sd251; end
      4'd10: begin c = -16'sd97;  s = 16'sd236; end
      4'd11: begin c = -16'sd142; s = 16'sd212; end
      4'd12: begin c = -16'sd181; s = 16'sd181; end
      4'd13: begin c = -16'sd212; s = 16'sd142; end
      4'd14: begin c = -16'sd236; s = 16'sd97;  end
      default: begin c = -16'sd251; s = 16'sd49; end
    endcase
    w.re = c;
    w.im = -s;
  end

endmodule
