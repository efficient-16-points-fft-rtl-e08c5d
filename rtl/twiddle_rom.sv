// twiddle_rom -- constant table for the three-multiplier complex multiplier.
//
// For W16^k = C + jS with C = cos(2*pi*k/16) and S = -sin(2*pi*k/16), the
// table holds the three constants the multiplier needs: C, C+S and C-S, each
// rounded to the nearest multiple of 2^-COEF_FRAC and stored in COEF_W bits.
// Storing the sums instead of S is what lets the multiplier get by with three
// real multiplications. The table is filled at elaboration time from the
// formula above; it is a read-only memory with a combinational read port.
//
// Interface: k (exponent 0..15) in, c / c_plus_s / c_minus_s out, no clock.
module twiddle_rom
  import fft16_pkg::*;
(
  input  logic [3:0] k,
  output coef_t      c,
  output coef_t      c_plus_s,
  output coef_t      c_minus_s
);

  typedef coef_t rom_t [N_POINTS];

  function automatic coef_t quant(real v);
    real scaled;
    scaled = v * real'(1 << COEF_FRAC);
    // round half away from zero
    if (scaled >= 0.0) return coef_t'($rtoi(scaled + 0.5));
    else               return coef_t'(-$rtoi(-scaled + 0.5));
  endfunction

  function automatic rom_t build(int which);
    rom_t t;
    real  pi, cr, sr;
    pi = 3.14159265358979323846;
    for (int i = 0; i < N_POINTS; i++) begin
      cr = $cos(2.0 * pi * i / N_POINTS);
      sr = -$sin(2.0 * pi * i / N_POINTS);
      case (which)
        0:       t[i] = quant(cr);
        1:       t[i] = quant(cr + sr);
        default: t[i] = quant(cr - sr);
      endcase
    end
    return t;
  endfunction

  localparam rom_t ROM_C  = build(0);
  localparam rom_t ROM_CP = build(1);
  localparam rom_t ROM_CM = build(2);

  assign c         = ROM_C[k];
  assign c_plus_s  = ROM_CP[k];
  assign c_minus_s = ROM_CM[k];

endmodule
