// tb_fft4_pe -- self-checking test of the 4-point FFT unit.
//
// Random full-range vectors go in one per clock. Because the unit only adds,
// subtracts and exchanges parts, its result must equal the exact integer DFT
// modulo 2^DATA_W, which the testbench computes directly from the definition
// Y[k] = sum_m x[m] * (-j)^(m*k). Also checked: the 2-clock latency and the
// tag travelling with the data.
module tb_fft4_pe;
  import fft16_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  stage_t in, out;
  int     checks = 0, failures = 0;

  fft4_pe dut (.clk, .rst_n, .in, .out);

  always #5 clk = ~clk;

  // exact DFT4 of lane values, reduced modulo 2^DATA_W
  function automatic vec_t dft4(vec_t x);
    vec_t y;
    int   re, im;
    for (int k = 0; k < 4; k++) begin
      re = 0; im = 0;
      for (int m = 0; m < 4; m++) begin
        case ((m * k) % 4)
          0: begin re += x[m].re; im += x[m].im; end  // *1
          1: begin re += x[m].im; im -= x[m].re; end  // *(-j)
          2: begin re -= x[m].re; im -= x[m].im; end  // *(-1)
          3: begin re -= x[m].im; im += x[m].re; end  // *(+j)
        endcase
      end
      y[k].re = smp_t'(re);
      y[k].im = smp_t'(im);
    end
    return y;
  endfunction

  stage_t hist [$];

  initial begin
    in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      in.tag.valid = (n < 296);
      in.tag.pass  = 1'($urandom);
      in.tag.inv   = 1'($urandom);
      in.tag.idx   = 2'($urandom);
      for (int i = 0; i < 4; i++) begin
        in.d[i].re = smp_t'($urandom);
        in.d[i].im = smp_t'($urandom);
      end
      if (n < 20) for (int i = 0; i < 4; i++) in.d[i] = '{re: smp_t'(i + n), im: smp_t'(-n)};
      hist.push_back(in);
      if (hist.size() > 3) void'(hist.pop_front());
      // out now reflects the vector applied two clocks earlier
      if (n >= 2) begin
        checks++;
        if (out.tag != hist[0].tag || out.d != dft4(hist[0].d)) begin
          failures++;
          if (failures < 5) $display("mismatch at %0d", n);
        end
      end
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
