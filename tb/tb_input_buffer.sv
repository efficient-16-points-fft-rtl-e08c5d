// tb_input_buffer -- checks the serial-to-vector reorder buffer.
//
// Frames of 16 random samples are written in natural order with random gaps;
// the reader takes vectors with a random ready. Vector l of each frame must
// hold x[l+4m] on lane m, frames must come out whole and in order with their
// inverse flag, and the writer must be held off (s_ready low) when both banks
// are full.
module tb_input_buffer;
  import fft16_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic s_valid, s_ready, s_inverse, m_valid, m_ready, m_inverse;
  cpx_t s_data;
  vec_t m_data;
  int   checks = 0, failures = 0, stalls = 0;

  input_buffer dut (.clk, .rst_n, .s_valid, .s_ready, .s_data, .s_inverse,
                    .m_valid, .m_ready, .m_data, .m_inverse);

  always #5 clk = ~clk;

  cpx_t frames [$][16];
  logic finv   [$];
  int   nframes_in = 0, nframes_out = 0;

  // writer
  initial begin
    cpx_t f [16];
    logic iv;
    s_valid = 0; s_data = '0; s_inverse = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 40; k++) begin
      for (int i = 0; i < 16; i++) f[i] = cpx_t'($urandom);
      iv = 1'($urandom);
      frames.push_back(f);
      finv.push_back(iv);
      for (int i = 0; i < 16; i++) begin
        while (($urandom % 5) == 0) begin s_valid = 0; @(negedge clk); end
        s_valid = 1; s_data = f[i]; s_inverse = (i == 0) ? iv : 1'($urandom);
        #1;
        while (!s_ready) begin stalls++; @(negedge clk); #1; end
        @(negedge clk);
      end
      s_valid = 0;
      nframes_in++;
    end
  end

  // reader: slow for the first 20 frames so both banks fill up
  initial begin
    int l;
    l = 0;
    m_ready = 0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      m_ready = (nframes_out < 20) ? (($urandom % 8) == 0) : 1'($urandom);
      #1;
      if (m_valid && m_ready) begin
        checks++;
        if (m_inverse != finv[0]) failures++;
        for (int m = 0; m < 4; m++) begin
          checks++;
          if (m_data[m] != frames[0][l + 4 * m]) failures++;
        end
        l++;
        if (l == 4) begin
          l = 0;
          void'(frames.pop_front());
          void'(finv.pop_front());
          nframes_out++;
          if (nframes_out == 40) begin
            checks++;
            if (stalls == 0) failures++;
            $display("stalls=%0d", stalls);
            $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
            $finish;
          end
        end
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
