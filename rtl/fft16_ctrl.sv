// fft16_ctrl -- schedule of the shared 4-point FFT.
//
// A free-running 3-bit phase counter divides time into periods of 8 clocks.
// Phases 0-3 belong to the first pass of a new frame (sel = 0: the
// multiplexer takes new input vectors l = 0..3); phases 4-7 belong to the
// second pass of the previous frame (sel = 1: the multiplexer takes the
// fed-back vectors s = 0..3). The S/P buffer is read at phases 2-5, so that
// after the multiplier unit (1 clock) and the feedback register (1 clock) the
// column s reaches the multiplexer at phase 4+s. The 4-point FFT is thus busy
// every clock when frames arrive back to back: one 16-point transform every 8
// clocks.
//
// Input handshake: in_ready is high at phase 0, and at phases 1-3 of a period
// whose phase 0 accepted a vector. A frame is four vectors on consecutive
// clocks; in_inverse is sampled with the first one.
// The sel signal is the architecture's; the 8-clock schedule and the
// handshake are this design's choices.
module fft16_ctrl
  import fft16_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_inverse,
  output logic       in_ready,
  output tag_t       in_tag,     // tag for the vector on the input this clock
  output logic       sel,
  output logic       sp_rd_en,
  output logic [1:0] sp_rd_col
);

  logic [2:0] phase;
  logic       open_q;   // a frame was accepted at phase 0 of this period
  logic       inv_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= '0;
      open_q <= 1'b0;
      inv_q  <= 1'b0;
    end else begin
      phase <= phase + 3'd1;
      if (phase == 3'd0) begin
        open_q <= in_valid;
        inv_q  <= in_inverse;
      end else if (phase == 3'd3) begin
        open_q <= 1'b0;
      end
    end
  end

  assign sel       = phase[2];
  assign in_ready  = (phase == 3'd0) || (!phase[2] && open_q);
  assign sp_rd_en  = (phase >= 3'd2) && (phase <= 3'd5);
  assign sp_rd_col = 2'(phase - 3'd2);

  always_comb begin
    in_tag.valid = in_valid && in_ready;
    in_tag.pass  = 1'b0;
    in_tag.inv   = (phase == 3'd0) ? in_inverse : inv_q;
    in_tag.idx   = phase[1:0];
  end

  // Once a frame has started, its other three vectors follow without a gap.
  property p_frame_unbroken;
    @(posedge clk) disable iff (!rst_n)
      (!phase[2] && phase != 3'd0 && open_q) |-> in_valid;
  endproperty
  a_frame_unbroken: assert property (p_frame_unbroken);

endmodule
