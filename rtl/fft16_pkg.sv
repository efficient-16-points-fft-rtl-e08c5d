// fft16_pkg -- types and constants shared by the 16-point FFT/IFFT processor.
//
// The processor works on complex fixed-point samples. Each part (real,
// imaginary) is DATA_W bits, two's complement, and every adder wraps at that
// width; 8 bits per part is the width the processor was evaluated at.
// Twiddle constants are COEF_W bits with COEF_FRAC fraction bits, so a
// constant times a (DATA_W+1)-bit difference fits a 9x9 hardware multiplier.
// A vector is the four lanes the 4-point FFT works on in one clock; a stage_t
// carries a vector together with the tag that travels with it down the
// pipeline (valid, which of the two passes it is in, its index within the
// pass, and whether the frame is an inverse transform).
package fft16_pkg;

  localparam int N_POINTS  = 16;  // transform length
  localparam int LANES     = 4;   // radix of the shared small FFT
  localparam int DATA_W    = 8;   // bits per real/imaginary part
  localparam int COEF_W    = 9;   // bits per stored twiddle constant
  localparam int COEF_FRAC = 7;   // fraction bits of a twiddle constant

  typedef logic signed [DATA_W-1:0] smp_t;

  typedef struct packed {
    smp_t re;
    smp_t im;
  } cpx_t;

  // Lane i of a vector is vec[i].
  typedef cpx_t [LANES-1:0] vec_t;

  typedef logic signed [COEF_W-1:0] coef_t;

  typedef struct packed {
    logic       valid;
    logic       pass;  // 0: first 4-point FFT, 1: second 4-point FFT
    logic       inv;   // frame is an inverse transform
    logic [1:0] idx;   // l in the first pass, s in the second pass
  } tag_t;

  typedef struct packed {
    tag_t tag;
    vec_t d;
  } stage_t;

  // Exchange the real and imaginary parts. conj(x) = j * swap(x)^*, so
  // IFFT(x) = swap(FFT(swap(x))) without the 1/N factor.
  function automatic cpx_t swap_ri(cpx_t x);
    cpx_t y;
    y.re = x.im;
    y.im = x.re;
    return y;
  endfunction

endpackage
