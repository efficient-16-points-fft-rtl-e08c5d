// tb_mult_unit -- checks the inter-dimensional twiddle multiplier unit.
//
// Random vectors with a random index s go in one per clock. One clock later
// lane l must equal x_l * exp(-j*2*pi*s*l/16), computed in floating point
// (tolerance 2 LSB, lane 0 exact). Inputs are limited to |x| <= 88. The tag
// must come out with the data.
module tb_mult_unit;
  import fft16_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  stage_t in, out, prev;
  int     checks = 0, failures = 0;

  mult_unit dut (.clk, .rst_n, .in, .out);

  always #5 clk = ~clk;

  initial begin
    real a, er, ei, tol;
    int  e;
    in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      if (n > 0) begin
        checks++;
        if (out.tag != prev.tag) failures++;
        for (int l = 0; l < 4; l++) begin
          e   = int'(prev.tag.idx) * l;
          a   = 2.0 * 3.14159265358979 * real'(e) / 16.0;
          er  = prev.d[l].re * $cos(a) + prev.d[l].im * $sin(a);
          ei  = prev.d[l].im * $cos(a) - prev.d[l].re * $sin(a);
          tol = (l == 0) ? 0.01 : 2.0;
          checks += 2;
          if (out.d[l].re - er > tol || er - out.d[l].re > tol) failures++;
          if (out.d[l].im - ei > tol || ei - out.d[l].im > tol) failures++;
        end
      end
      in.tag = tag_t'($urandom);
      for (int l = 0; l < 4; l++) begin
        in.d[l].re = smp_t'(int'($urandom % 177) - 88);
        in.d[l].im = smp_t'(int'($urandom % 177) - 88);
      end
      prev = in;
    end
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
