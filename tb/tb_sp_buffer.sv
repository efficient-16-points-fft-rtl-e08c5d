// tb_sp_buffer -- checks the S/P transposition buffer.
//
// Frames of four random rows are written on the same 8-clock schedule the
// processor uses (rows at phases 2-5, columns read at phases 2-5 of the next
// period), sometimes back to back and sometimes with idle periods between.
// Each column read must hold element [l][s] of the frame written one period
// earlier on lane l, with tag.idx = s, tag.pass = 1 and that frame's inverse
// flag; a read with no full bank must not be valid.
module tb_sp_buffer;
  import fft16_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  stage_t     wr, rd;
  logic       rd_en;
  logic [1:0] rd_col;
  int         checks = 0, failures = 0;
  int         reads_valid = 0;

  sp_buffer dut (.clk, .rst_n, .wr, .rd_en, .rd_col, .rd);

  always #5 clk = ~clk;

  vec_t frame_now [4], frame_prev [4];
  logic inv_now, inv_prev, have_now, have_prev;

  initial begin
    wr = '0; rd_en = 0; rd_col = 0;
    have_now = 0; have_prev = 0; inv_now = 0; inv_prev = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 60; p++) begin
      // previous period's frame becomes the one to read
      frame_prev = frame_now; inv_prev = inv_now; have_prev = have_now;
      have_now = (p < 55) && (($urandom % 4) != 0);
      inv_now  = 1'($urandom);
      for (int l = 0; l < 4; l++)
        for (int s = 0; s < 4; s++)
          frame_now[l][s] = cpx_t'($urandom);
      for (int ph = 0; ph < 8; ph++) begin
        @(negedge clk);
        wr.tag.valid = have_now && ph >= 2 && ph <= 5;
        wr.tag.pass  = 1'b0;
        wr.tag.inv   = inv_now;
        wr.tag.idx   = 2'(ph - 2);
        wr.d         = frame_now[(ph - 2) & 3];
        rd_en  = ph >= 2 && ph <= 5;
        rd_col = 2'(ph - 2);
        #1;
        if (rd_en) begin
          checks++;
          if (rd.tag.valid != have_prev) failures++;
          if (have_prev && rd.tag.valid) begin
            reads_valid++;
            checks++;
            if (rd.tag.idx != rd_col || !rd.tag.pass || rd.tag.inv != inv_prev) failures++;
            for (int l = 0; l < 4; l++) begin
              checks++;
              if (rd.d[l] != frame_prev[l][rd_col]) failures++;
            end
          end
        end
      end
    end
    checks++;
    if (reads_valid < 40) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
