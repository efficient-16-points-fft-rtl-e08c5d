// tb_shift_add_unit -- checks the lane-2 shift-and-add twiddle stage.
//
// For s = 0..3 the output must equal x * exp(-j*2*pi*(2s)/16), computed in
// floating point. W16^0 and W16^4 must be exact; W16^2 and W16^6 may be off
// by 2 LSB (constant 181/256 and one truncation). |x| <= 88 keeps the result
// in range.
module tb_shift_add_unit;
  import fft16_pkg::*;

  cpx_t       x, r;
  logic [1:0] s;
  int         checks = 0, failures = 0;

  shift_add_unit dut (.x, .s, .r);

  initial begin
    real a, er, ei, tol;
    for (int n = 0; n < 2000; n++) begin
      s    = 2'(n);
      x.re = smp_t'(int'($urandom % 177) - 88);
      x.im = smp_t'(int'($urandom % 177) - 88);
      #1;
      a   = 2.0 * 3.14159265358979 * (2 * s) / 16.0;
      er  = x.re * $cos(a) + x.im * $sin(a);
      ei  = x.im * $cos(a) - x.re * $sin(a);
      tol = s[0] ? 2.0 : 0.01;
      checks += 2;
      if (r.re - er > tol || er - r.re > tol) failures++;
      if (r.im - ei > tol || ei - r.im > tol) failures++;
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
