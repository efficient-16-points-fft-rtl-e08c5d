// input_buffer -- reorders natural-order serial input into four parallel
// vectors.
//
// Samples x[0..15] arrive one per clock. The 16-point transform is computed
// as 4-point transforms over m of x[l+4m], so the buffer stores a whole frame
// and then presents, for l = 0..3, the vector (x[l], x[l+4], x[l+8], x[l+12])
// with lane m = x[l+4m]. Two 16-sample banks are used in ping-pong so input
// can continue while the previous frame is read out.
//
// Interface: s_valid/s_ready/s_data/s_inverse serial input (s_inverse is
// sampled with x[0]); m_valid/m_ready/m_data/m_inverse vector output with
// a valid/ready handshake. A bank becomes readable the clock after its 16th
// sample is written.
// Storing the serial input so it can be read as four vectors is the
// architecture's; the bank organisation and handshakes are this design's.
module input_buffer
  import fft16_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic s_valid,
  output logic s_ready,
  input  cpx_t s_data,
  input  logic s_inverse,
  output logic m_valid,
  input  logic m_ready,
  output vec_t m_data,
  output logic m_inverse
);

  cpx_t       mem [2][N_POINTS];
  logic [1:0] full;
  logic [1:0] inv_b;
  logic       wb, rb;
  logic [3:0] wcnt;
  logic [1:0] rcnt;

  assign s_ready   = !full[wb];
  assign m_valid   = full[rb];
  assign m_inverse = inv_b[rb];

  always_comb
    for (int m = 0; m < LANES; m++)
      m_data[m] = mem[rb][4'(rcnt) + 4'(4 * m)];

  always_ff @(posedge clk) begin
    if (s_valid && s_ready) mem[wb][wcnt] <= s_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full  <= '0;
      inv_b <= '0;
      wb    <= 1'b0;
      rb    <= 1'b0;
      wcnt  <= '0;
      rcnt  <= '0;
    end else begin
      if (s_valid && s_ready) begin
        wcnt <= wcnt + 4'd1;
        if (wcnt == 4'd0) inv_b[wb] <= s_inverse;
        if (wcnt == 4'd15) begin
          full[wb] <= 1'b1;
          wb       <= ~wb;
        end
      end
      if (m_valid && m_ready) begin
        rcnt <= rcnt + 2'd1;
        if (rcnt == 2'd3) begin
          full[rb] <= 1'b0;
          rb       <= ~rb;
        end
      end
    end
  end

endmodule
