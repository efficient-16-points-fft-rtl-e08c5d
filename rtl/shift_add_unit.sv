// shift_add_unit -- multiplier-free twiddle stage for the third lane.
//
// Multiplies a sample by W16^(2*s) for s = 0..3, choosing one of four paths
// with a multiplexer:
//   s=0  W16^0 = 1                 the sample itself
//   s=1  W16^2 = (1 - j)/sqrt(2)   ((X+Y) + j(Y-X)) * K
//   s=2  W16^4 = -j                Y - jX (exchange and sign inversion)
//   s=3  W16^6 = -(1 + j)/sqrt(2)  ((Y-X) - j(X+Y)) * K
// K ~ 1/sqrt(2) is applied with shifts and adds only:
//   K = 181/256 = 2^-1 + 2^-3 + 2^-4 + 2^-6 + 2^-8 = 0.70703.
// The sums are formed at full precision and truncated once to DATA_W bits.
//
// Interface: x and s in, r out; purely combinational.
// The four paths and the multiplexer follow the architecture; the constant
// 181/256 and the truncation are this design's choices.
module shift_add_unit
  import fft16_pkg::*;
(
  input  cpx_t       x,
  input  logic [1:0] s,
  output cpx_t       r
);

  localparam int SW = DATA_W + 1;   // width of X+Y and Y-X
  localparam int KW = SW + 9;       // width after scaling by up to 2^8

  logic signed [SW-1:0] sum, dif;   // X+Y, Y-X
  logic signed [KW-1:0] ks, kd;     // sum*K, dif*K (times 256)

  function automatic logic signed [KW-1:0] times_k(logic signed [SW-1:0] v);
    logic signed [KW-1:0] e;
    e = KW'(v);
    return (e <<< 7) + (e <<< 5) + (e <<< 4) + (e <<< 2) + e;
  endfunction

  always_comb begin
    sum = SW'(x.re) + SW'(x.im);
    dif = SW'(x.im) - SW'(x.re);
    ks  = times_k(sum);
    kd  = times_k(dif);
    unique case (s)
      2'd0: r = x;
      2'd1: begin r.re = smp_t'(ks >>> 8); r.im = smp_t'(kd >>> 8); end
      2'd2: begin r.re = x.im;             r.im = -x.re;            end
      2'd3: begin r.re = smp_t'(kd >>> 8); r.im = smp_t'(-ks >>> 8); end
    endcase
  end

endmodule
