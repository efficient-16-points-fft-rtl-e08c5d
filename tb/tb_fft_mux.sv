// tb_fft_mux -- checks the input multiplexer: sel=1 passes the fed-back
// vector unchanged; sel=0 passes the new vector, with real and imaginary
// parts exchanged when its tag marks an inverse frame.
module tb_fft_mux;
  import fft16_pkg::*;

  logic   sel;
  stage_t ext, fb, out, want;
  int     checks = 0, failures = 0;

  fft_mux dut (.sel, .ext, .fb, .out);

  initial begin
    for (int n = 0; n < 500; n++) begin
      sel = 1'($urandom);
      ext = stage_t'({$urandom, $urandom, $urandom});
      fb  = stage_t'({$urandom, $urandom, $urandom});
      #1;
      if (sel) want = fb;
      else begin
        want = ext;
        if (ext.tag.inv)
          for (int i = 0; i < 4; i++) begin
            want.d[i].re = ext.d[i].im;
            want.d[i].im = ext.d[i].re;
          end
      end
      checks++;
      if (out != want) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
