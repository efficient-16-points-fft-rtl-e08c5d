// mult_unit -- inter-dimensional twiddle multiplication between the passes.
//
// In the second pass, vector s holds the first-pass results Y_l[s] on lanes
// l = 0..3, and lane l must be multiplied by W16^(s*l). The four lanes use
// four different circuits, so only two real multipliers' worth of hardware
// per lane is needed where the factor is non-trivial:
//   lane 0  W16^0                  wire
//   lane 1  W16^s  (W0 W1 W2 W3)   cmult3 with constants from twiddle_rom
//   lane 2  W16^2s (W0 W2 W4 W6)   shift_add_unit (shift-and-add / swap)
//   lane 3  W16^3s (W0 W3 W6 W9)   cmult3 with constants from twiddle_rom
// That is six real multipliers in all. The result is registered.
//
// Interface: stage_t in (tag.idx = s), stage_t out. Latency 1 clock, one
// vector per clock. The lane assignment follows the architecture; the output
// register is this design's choice.
module mult_unit
  import fft16_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  stage_t in,
  output stage_t out
);

  logic [1:0] s;
  logic [3:0] k1, k3;
  coef_t      c1, cp1, cm1, c3, cp3, cm3;
  vec_t       prod;

  assign s  = in.tag.idx;
  assign k1 = {2'b00, s};
  assign k3 = 4'({2'b00, s} * 4'd3);

  twiddle_rom u_rom1 (.k(k1), .c(c1), .c_plus_s(cp1), .c_minus_s(cm1));
  twiddle_rom u_rom3 (.k(k3), .c(c3), .c_plus_s(cp3), .c_minus_s(cm3));

  assign prod[0] = in.d[0];

  cmult3 u_mul1 (.x(in.d[1]), .c(c1), .c_plus_s(cp1), .c_minus_s(cm1), .r(prod[1]));

  shift_add_unit u_sa2 (.x(in.d[2]), .s(s), .r(prod[2]));

  cmult3 u_mul3 (.x(in.d[3]), .c(c3), .c_plus_s(cp3), .c_minus_s(cm3), .r(prod[3]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out <= '0;
    else begin
      out.tag <= in.tag;
      out.d   <= prod;
    end
  end

endmodule
