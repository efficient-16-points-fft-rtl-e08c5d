// fft_mux -- input multiplexer of the shared 4-point FFT.
//
// sel = 0 lets a new input vector in (first pass); sel = 1 takes the weighted
// vector coming back from the feedback register (second pass). A new vector
// of an inverse-transform frame has its real and imaginary parts exchanged
// here, which, together with the same exchange at the output, turns the
// forward transform into an inverse one (without the 1/16 factor).
//
// Interface: ext (new vector with its tag), fb (fed-back vector), sel; out is
// combinational. The multiplexer follows the architecture; the exchange for
// the inverse transform is this design's choice.
module fft_mux
  import fft16_pkg::*;
(
  input  logic   sel,
  input  stage_t ext,
  input  stage_t fb,
  output stage_t out
);

  always_comb begin
    if (sel) begin
      out = fb;
    end else begin
      out.tag = ext.tag;
      for (int i = 0; i < LANES; i++)
        out.d[i] = ext.tag.inv ? swap_ri(ext.d[i]) : ext.d[i];
    end
  end

endmodule
