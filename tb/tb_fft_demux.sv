// tb_fft_demux -- checks the output demultiplexer: first-pass vectors are
// valid only on the S/P side, second-pass vectors appear one clock later on
// the registered outputs (exchanged back for inverse frames) with their index.
module tb_fft_demux;
  import fft16_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  stage_t     in, sp, prev;
  logic       out_valid, out_inv;
  logic [1:0] out_idx;
  vec_t       out_data, want;
  int         checks = 0, failures = 0;

  fft_demux dut (.clk, .rst_n, .in, .sp, .out_valid, .out_idx, .out_inv, .out_data);

  always #5 clk = ~clk;

  initial begin
    in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      if (n > 0) begin
        checks++;
        if (out_valid != (prev.tag.valid && prev.tag.pass)) failures++;
        if (prev.tag.valid && prev.tag.pass) begin
          want = prev.d;
          if (prev.tag.inv)
            for (int i = 0; i < 4; i++) begin
              want[i].re = prev.d[i].im;
              want[i].im = prev.d[i].re;
            end
          checks++;
          if (out_data != want || out_idx != prev.tag.idx || out_inv != prev.tag.inv) failures++;
        end
      end
      in = stage_t'({$urandom, $urandom, $urandom});
      #1;
      checks++;
      if (sp.tag.valid != (in.tag.valid && !in.tag.pass) || sp.d != in.d) failures++;
      prev = in;
    end
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
