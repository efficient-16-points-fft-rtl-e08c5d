// tb_fft16_ctrl -- checks the 8-clock schedule of the controller.
//
// After reset the phase counts 0..7. The testbench keeps its own phase count
// and checks sel (high in phases 4-7), the S/P read window (phases 2-5, column
// phase-2), in_ready (phase 0 always, phases 1-3 only after a frame started
// at phase 0) and the tag of accepted vectors (index = phase, inverse flag of
// the frame's first vector). Frames are offered with random gaps, and an
// offer that starts in the middle of a period must wait for phase 0.
module tb_fft16_ctrl;
  import fft16_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       in_valid, in_inverse, in_ready, sel, sp_rd_en;
  logic [1:0] sp_rd_col;
  tag_t       in_tag;
  int         checks = 0, failures = 0, frames = 0, waits = 0;

  fft16_ctrl dut (.clk, .rst_n, .in_valid, .in_inverse, .in_ready, .in_tag,
                  .sel, .sp_rd_en, .sp_rd_col);

  always #5 clk = ~clk;

  initial begin
    int   ph, left;
    logic open, finv;
    in_valid = 0; in_inverse = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    ph = 0; left = 0; open = 0; finv = 0;
    for (int n = 0; n < 800; n++) begin
      // offer a frame: hold in_valid until it is taken, then 3 more clocks
      if (left == 0 && ($urandom % 3) == 0) begin
        left = 4;
        finv = 1'($urandom);
      end
      in_valid   = left > 0;
      in_inverse = (left == 4) ? finv : 1'($urandom);
      #1;
      checks += 4;
      if (sel != (ph >= 4)) failures++;
      if (sp_rd_en != (ph >= 2 && ph <= 5)) failures++;
      if (sp_rd_en && sp_rd_col != 2'(ph - 2)) failures++;
      if (in_ready != (ph == 0 || (ph < 4 && open))) failures++;
      if (in_valid && in_ready) begin
        checks++;
        if (!in_tag.valid || in_tag.pass || in_tag.idx != 2'(ph) || in_tag.inv != finv) failures++;
        if (ph == 0) begin open = 1; frames++; end
        left--;
      end else begin
        checks++;
        if (in_tag.valid) failures++;
        if (in_valid) waits++;
      end
      if (ph == 3) open = 0;
      @(negedge clk);
      ph = (ph + 1) % 8;
    end
    checks += 2;
    if (frames < 20) failures++;
    if (waits < 20) failures++;
    $display("frames=%0d waits=%0d", frames, waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
