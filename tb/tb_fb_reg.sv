// tb_fb_reg -- checks the feedback register: reset clears the tag, and each
// value appears on the output exactly one clock after it was applied.
module tb_fb_reg;
  import fft16_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  stage_t in, out, prev;
  int     checks = 0, failures = 0;

  fb_reg dut (.clk, .rst_n, .in, .out);

  always #5 clk = ~clk;

  initial begin
    in = '1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++;
    if (out.tag.valid) failures++;
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      in   = stage_t'({$urandom, $urandom, $urandom});
      prev = in;
      @(negedge clk);
      checks++;
      if (out != prev) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
