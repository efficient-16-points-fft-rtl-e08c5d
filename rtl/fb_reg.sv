// fb_reg -- register on the feedback path from the multiplier unit to the
// input multiplexer.
//
// Holds the weighted vector for one clock so that it reaches the multiplexer
// exactly in the slot the schedule reserves for the second pass. The tag is
// cleared by reset so that no stale vector is fed back after reset.
//
// Interface: stage_t in, stage_t out, latency 1 clock.
// The register itself is part of the architecture's feedback loop; its
// reset behaviour is this design's choice.
module fb_reg
  import fft16_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  stage_t in,
  output stage_t out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out <= '0;
    else        out <= in;
  end

endmodule
