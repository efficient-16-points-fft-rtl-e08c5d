// sp_buffer -- S/P reorder buffer between the two passes.
//
// The first pass delivers, for l = 0..3, the vector Y_l[0..3] (lane = s). The
// second pass needs, for s = 0..3, the vector Y_0..3[s] (lane = l): the 4x4
// block must be transposed. Rows are written as they arrive; once all four
// rows of a frame are in, the block is read out column by column. Two banks
// are used in ping-pong so that the next frame can be written while the
// previous one is read.
//
// Interface:
//   wr      first-pass vector; tag.valid writes row tag.idx of the current
//           write bank, and writing row 3 closes the bank (it becomes full).
//   rd_en   read column rd_col of the full bank that is not being written;
//   rd_col  rd is combinational: valid only if that bank is full, tag.pass=1,
//           tag.idx = rd_col. Reading column 3 frees the bank.
// The transposition follows the architecture's S/P block; the two-bank
// organisation is this design's choice.
module sp_buffer
  import fft16_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  stage_t     wr,
  input  logic       rd_en,
  input  logic [1:0] rd_col,
  output stage_t     rd
);

  vec_t       mem   [2][LANES];   // [bank][row]
  logic [1:0] full;
  logic [1:0] inv_b;
  logic       wb;                 // bank being written
  logic [1:0] next_row;           // row the write side expects next
  logic       rb;

  assign rb = ~wb;

  always_comb begin
    rd.tag.valid = rd_en && full[rb];
    rd.tag.pass  = 1'b1;
    rd.tag.inv   = inv_b[rb];
    rd.tag.idx   = rd_col;
    for (int l = 0; l < LANES; l++)
      rd.d[l] = mem[rb][l][rd_col];
  end

  always_ff @(posedge clk) begin
    if (wr.tag.valid) mem[wb][wr.tag.idx] <= wr.d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full     <= '0;
      inv_b    <= '0;
      wb       <= 1'b0;
      next_row <= '0;
    end else begin
      if (rd.tag.valid && rd_col == 2'd3) full[rb] <= 1'b0;
      if (wr.tag.valid) begin
        next_row <= wr.tag.idx + 2'd1;
        if (wr.tag.idx == 2'd3) begin
          full[wb]  <= 1'b1;
          inv_b[wb] <= wr.tag.inv;
          wb        <= ~wb;
        end
      end
    end
  end

  // Rows of a frame arrive in order, and never into a bank still unread.
  property p_rows_in_order;
    @(posedge clk) disable iff (!rst_n) wr.tag.valid |-> wr.tag.idx == next_row;
  endproperty
  a_rows_in_order: assert property (p_rows_in_order);

  property p_no_overwrite;
    @(posedge clk) disable iff (!rst_n) wr.tag.valid |-> !full[wb];
  endproperty
  a_no_overwrite: assert property (p_no_overwrite);

endmodule
