// cmult3 -- complex multiplication with three real multiplications.
//
// Computes R + jI = (X + jY) * (C + jS) as
//   Z = C * (X - Y),  R = (C - S) * Y + Z,  I = (C + S) * X - Z
// i.e. three multiplications, one addition and two subtractions, with C,
// C+S and C-S supplied precomputed (see twiddle_rom). The full-precision
// results are shifted right by COEF_FRAC (truncation toward minus infinity)
// and wrapped to DATA_W bits.
//
// Interface: x, c, c_plus_s, c_minus_s in, r out; purely combinational.
// The factorisation is the architecture's; the truncating rounding is this
// design's choice.
module cmult3
  import fft16_pkg::*;
(
  input  cpx_t  x,
  input  coef_t c,
  input  coef_t c_plus_s,
  input  coef_t c_minus_s,
  output cpx_t  r
);

  localparam int PW = DATA_W + 1 + COEF_W + 1;  // product plus one guard bit

  logic signed [DATA_W:0] diff;   // X - Y, one bit wider than a sample
  logic signed [PW-1:0]   z, r_full, i_full;

  always_comb begin
    diff   = (DATA_W+1)'(x.re) - (DATA_W+1)'(x.im);
    z      = PW'(c) * PW'(diff);
    r_full = PW'(c_minus_s) * PW'(x.im) + z;
    i_full = PW'(c_plus_s)  * PW'(x.re) - z;
    r.re   = smp_t'(r_full >>> COEF_FRAC);
    r.im   = smp_t'(i_full >>> COEF_FRAC);
  end

endmodule
