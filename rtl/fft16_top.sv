// fft16_top -- 16-point FFT/IFFT processor built around one 4-point FFT.
//
// With n = l + 4m and k = s + 4t (l, m, s, t in 0..3) the 16-point DFT is
//   X[s+4t] = sum_l W4^(t*l) * ( W16^(s*l) * sum_m x[l+4m] * W4^(s*m) ),
// i.e. a 4-point FFT over m, a multiplication by W16^(s*l), and a second
// 4-point FFT over l. Both 4-point FFTs run on the same unit:
//
//   serial in -> input_buffer -+
//   vector in ------------------+-> fft_mux -> fft4_pe -> fft_demux -> outputs
//                                   ^                    |
//                                   |                    v
//                                 fb_reg <- mult_unit <- sp_buffer
//
// First pass: input vectors l (lane m = x[l+4m]) go through the 4-point FFT
// and are stored row by row in sp_buffer. Second pass: sp_buffer returns the
// columns s, mult_unit weights lane l by W16^(s*l), fb_reg feeds the result
// back through the multiplexer, and the 4-point FFT's output leaves the
// processor. fft16_ctrl interleaves the two passes of consecutive frames on
// an 8-clock period, so frames can follow each other every 8 clocks.
//
// Interface: two inputs, chosen by the static pin in_serial.
//   in_serial = 1: serial input s_valid/s_ready/s_data, one complex sample
//     per clock in natural order, s_inverse sampled with x[0]; the input
//     buffer forms the vectors. One frame per 16 clocks at most.
//   in_serial = 0: vector input p_valid/p_ready/p_data/p_inverse, one vector
//     l per clock with lane m = x[l+4m], four vectors on consecutive clocks
//     per frame (p_ready is high in the clocks that may take them). One frame
//     per 8 clocks at most; consecutive frames then share the 4-point FFT,
//     the first pass of one alternating with the second pass of the other.
// inverse = 1 selects the inverse transform, computed without the 1/16
// factor. Output: four clocks with out_valid high;
// in the clock with out_idx = s, lane t of out_data is X[s+4t]. Latency from
// the first input vector entering the 4-point FFT to the first output is 15
// clocks; the input buffer adds the time to collect the 16 samples.
// Arithmetic is DATA_W-bit two's complement and wraps on overflow, with no
// scaling between passes.
module fft16_top
  import fft16_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       s_valid,
  output logic       s_ready,
  input  cpx_t       s_data,
  input  logic       s_inverse,
  input  logic       in_serial,
  input  logic       p_valid,
  output logic       p_ready,
  input  vec_t       p_data,
  input  logic       p_inverse,
  output logic       out_valid,
  output logic [1:0] out_idx,
  output logic       out_inv,
  output vec_t       out_data
);

  logic       b_valid, b_ready, b_inverse;
  vec_t       b_data;
  logic       v_valid, v_ready, v_inverse;
  vec_t       v_data;
  tag_t       in_tag;
  logic       sel, sp_rd_en;
  logic [1:0] sp_rd_col;
  stage_t     ext, fb, mux_out, fft_out, sp_wr, sp_rd, mul_out;

  input_buffer u_ibuf (
    .clk, .rst_n,
    .s_valid, .s_ready, .s_data, .s_inverse,
    .m_valid(b_valid), .m_ready(b_ready), .m_data(b_data), .m_inverse(b_inverse)
  );

  // Source of the vectors: the input buffer or the vector input port.
  assign v_valid   = in_serial ? b_valid   : p_valid;
  assign v_data    = in_serial ? b_data    : p_data;
  assign v_inverse = in_serial ? b_inverse : p_inverse;
  assign b_ready   = in_serial && v_ready;
  assign p_ready   = !in_serial && v_ready;

  fft16_ctrl u_ctrl (
    .clk, .rst_n,
    .in_valid(v_valid), .in_inverse(v_inverse), .in_ready(v_ready),
    .in_tag, .sel, .sp_rd_en, .sp_rd_col
  );

  assign ext.tag = in_tag;
  assign ext.d   = v_data;

  fft_mux u_mux (.sel, .ext, .fb, .out(mux_out));

  fft4_pe u_fft4 (.clk, .rst_n, .in(mux_out), .out(fft_out));

  fft_demux u_demux (
    .clk, .rst_n, .in(fft_out), .sp(sp_wr),
    .out_valid, .out_idx, .out_inv, .out_data
  );

  sp_buffer u_sp (
    .clk, .rst_n, .wr(sp_wr), .rd_en(sp_rd_en), .rd_col(sp_rd_col), .rd(sp_rd)
  );

  mult_unit u_mul (.clk, .rst_n, .in(sp_rd), .out(mul_out));

  fb_reg u_fb (.clk, .rst_n, .in(mul_out), .out(fb));

  // The fed-back vector arrives exactly in the second-pass slot.
  property p_fb_in_slot;
    @(posedge clk) disable iff (!rst_n) fb.tag.valid |-> sel;
  endproperty
  a_fb_in_slot: assert property (p_fb_in_slot);

endmodule
