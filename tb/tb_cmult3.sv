// tb_cmult3 -- checks the three-multiplier complex multiplier against an
// exact complex product.
//
// Constants for W16^k are formed in the testbench from cos/sin, quantised the
// same way the table stores them, and the result is compared with
// (X+jY)*exp(-j*2*pi*k/16) computed in floating point. Inputs are limited to
// |x| <= 88 so that the product fits in DATA_W bits; the allowed error is
// 2 LSB (one truncation plus constant quantisation).
module tb_cmult3;
  import fft16_pkg::*;

  cpx_t  x, r;
  coef_t c, cps, cms;
  int    checks = 0, failures = 0;

  cmult3 dut (.x, .c, .c_plus_s(cps), .c_minus_s(cms), .r);

  function automatic coef_t q(real v);
    return coef_t'($rtoi(v * 128.0 + (v >= 0.0 ? 0.5 : -0.5)));
  endfunction

  initial begin
    real a, cr, sr, er, ei;
    for (int n = 0; n < 2000; n++) begin
      int kk;
      kk = (n < 16) ? n : int'($urandom % 16);
      a  = 2.0 * 3.14159265358979 * kk / 16.0;
      cr = $cos(a);
      sr = -$sin(a);
      c   = q(cr);
      cps = q(cr + sr);
      cms = q(cr - sr);
      x.re = smp_t'(int'($urandom % 177) - 88);
      x.im = smp_t'(int'($urandom % 177) - 88);
      #1;
      er = x.re * cr - x.im * sr;
      ei = x.re * sr + x.im * cr;
      checks += 2;
      if (r.re - er > 2.0 || er - r.re > 2.0) failures++;
      if (r.im - ei > 2.0 || ei - r.im > 2.0) failures++;
      if (failures > 0 && failures < 4) $display("k=%0d x=%0d,%0d r=%0d,%0d exp=%f,%f", kk, x.re, x.im, r.re, r.im, er, ei);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
