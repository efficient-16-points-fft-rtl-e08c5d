// fft_demux -- output demultiplexer of the shared 4-point FFT.
//
// A first-pass result (tag.pass = 0) goes to the S/P reorder buffer; a
// second-pass result (tag.pass = 1) is a finished part of the transform and
// goes to the processor outputs, through an output register. For an inverse
// frame the real and imaginary parts are exchanged back on the way out.
//
// Output order: in the cycle with out_idx = s, lane t of out_data is X[s+4t].
//
// Interface: in (from the 4-point FFT); sp (combinational, valid only for
// first-pass vectors); out_valid/out_idx/out_inv/out_data registered, so
// latency 1 clock on the output path.
// The routing by pass follows the architecture; steering by the tag instead
// of a separate select line, the output register and the exchange for the
// inverse transform are this design's choices.
module fft_demux
  import fft16_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  stage_t     in,
  output stage_t     sp,
  output logic       out_valid,
  output logic [1:0] out_idx,
  output logic       out_inv,
  output vec_t       out_data
);

  always_comb begin
    sp = in;
    sp.tag.valid = in.tag.valid && !in.tag.pass;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_inv   <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in.tag.valid && in.tag.pass;
      if (in.tag.valid && in.tag.pass) begin
        out_idx <= in.tag.idx;
        out_inv <= in.tag.inv;
        for (int i = 0; i < LANES; i++)
          out_data[i] <= in.tag.inv ? swap_ri(in.d[i]) : in.d[i];
      end
    end
  end

endmodule
