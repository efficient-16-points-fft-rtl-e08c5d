// tb_twiddle_rom -- checks every entry of the twiddle constant table.
//
// For each exponent k the expected constants are cos(a), cos(a)-sin(a) and
// cos(a)+sin(a) for a = 2*pi*k/16 (that is C, C+S, C-S with S = -sin(a)),
// scaled by 2^COEF_FRAC. Each stored value must be within half a step of the
// exact value.
module tb_twiddle_rom;
  import fft16_pkg::*;

  logic [3:0] k;
  coef_t      c, cps, cms;
  int         checks = 0, failures = 0;

  twiddle_rom dut (.k, .c, .c_plus_s(cps), .c_minus_s(cms));

  task automatic check(real got, real want, string what);
    checks++;
    if (got - want > 0.5 || want - got > 0.5) begin
      failures++;
      $display("k=%0d %s: got %f want %f", k, what, got, want);
    end
  endtask

  initial begin
    real a, sc;
    sc = real'(1 << COEF_FRAC);
    for (int i = 0; i < 16; i++) begin
      k = 4'(i);
      #1;
      a = 2.0 * 3.14159265358979 * i / 16.0;
      check(real'(c),   $cos(a) * sc, "C");
      check(real'(cps), ($cos(a) - $sin(a)) * sc, "C+S");
      check(real'(cms), ($cos(a) + $sin(a)) * sc, "C-S");
    end
    // spot values: W16^2 -> C = 0.7071, C+S = 0, C-S = 1.4142
    k = 4'd2; #1;
    checks++;
    if (c != 91 || cps != 0 || cms != 181) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
