// fft4_pe -- the shared 4-point FFT butterfly unit.
//
// Computes Y[k] = sum_{m=0..3} x[m] * W4^(m*k) on the four lanes of a vector
// as a radix-2 decimation-in-frequency graph of two butterfly stages, each
// followed by a register (two-stage pipeline). The only non-trivial factor,
// W4^1 = -j, is applied to x[1]-x[3] by exchanging real and imaginary parts and
// negating the new imaginary part; no multiplier is used. Outputs are put back
// in natural order: lane k carries Y[k].
//
// Timing: one vector per clock, latency 2 clocks. The tag is delayed with the
// data. Arithmetic wraps at DATA_W bits (no scaling), as the reference
// processor does; callers must keep |sum| within range.
// The two-stage radix-2 structure and the swap for -j follow the
// architecture; the register placement and the absence of scaling (chosen to
// match the published 8-bit simulation) are this design's choices.
module fft4_pe
  import fft16_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  stage_t in,
  output stage_t out
);

  stage_t s1, s2;
  vec_t   b1, b2;

  // Stage 1: butterflies (0,2) and (1,3); the lower output of (1,3) times -j.
  always_comb begin
    b1[0].re = in.d[0].re + in.d[2].re;
    b1[0].im = in.d[0].im + in.d[2].im;
    b1[1].re = in.d[1].re + in.d[3].re;
    b1[1].im = in.d[1].im + in.d[3].im;
    b1[2].re = in.d[0].re - in.d[2].re;
    b1[2].im = in.d[0].im - in.d[2].im;
    // (a + jb) * (-j) = b - ja
    b1[3].re = in.d[1].im - in.d[3].im;
    b1[3].im = in.d[3].re - in.d[1].re;
  end

  // Stage 2: butterflies (0,1) and (2,3), written in natural output order.
  always_comb begin
    b2[0].re = s1.d[0].re + s1.d[1].re;
    b2[0].im = s1.d[0].im + s1.d[1].im;
    b2[2].re = s1.d[0].re - s1.d[1].re;
    b2[2].im = s1.d[0].im - s1.d[1].im;
    b2[1].re = s1.d[2].re + s1.d[3].re;
    b2[1].im = s1.d[2].im + s1.d[3].im;
    b2[3].re = s1.d[2].re - s1.d[3].re;
    b2[3].im = s1.d[2].im - s1.d[3].im;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
    end else begin
      s1.tag <= in.tag;
      s1.d   <= b1;
      s2.tag <= s1.tag;
      s2.d   <= b2;
    end
  end

  assign out = s2;

endmodule
