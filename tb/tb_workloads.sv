// tb_workloads -- runs the two test signals the processor was evaluated with.
//
//   square  a square wave 1,1,0,0,1,1,0,0,... (amplitude 15, the largest for
//           which no result leaves the 8-bit range). Expected: X[0] = 8A,
//           |X[4]| = |X[12]| = 4*sqrt(2)*A, every other bin 0.
//   random  the published example frame (given as four vectors of four
//           lanes), whose bin X[2] does not fit in 8 bits and wraps.
// Both go in through the vector port; the square wave is also sent through
// the serial port and as an inverse transform. Every result is compared with
// the exact DFT (reduced modulo 2^DATA_W), allowed error 4 LSB per part.
module tb_workloads;
  import fft16_pkg::*;

  localparam int  TOL  = 4;
  localparam int AMP = 15;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       s_valid, s_ready, s_inverse, in_serial;
  cpx_t       s_data;
  logic       p_valid, p_ready, p_inverse;
  vec_t       p_data;
  logic       out_valid, out_inv;
  logic [1:0] out_idx;
  vec_t       out_data;

  fft16_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int FIG_IN_RE [4][4] = '{'{1, 1, 4, 3}, '{23, 0, 19, 11}, '{15, 3, 0, 38}, '{-19, 2, 2, 20}};
  localparam int FIG_IN_IM [4][4] = '{'{20, 0, 12, -8}, '{-12, -25, 0, 4}, '{42, -11, 5, 15}, '{12, 14, 18, -41}};

  function automatic int wrapdiff(int a, real b);
    int d;
    d = a - $rtoi(b + (b >= 0.0 ? 0.5 : -0.5));
    d = ((d % (1 << DATA_W)) + (1 << DATA_W) + (1 << (DATA_W - 1))) % (1 << DATA_W) - (1 << (DATA_W - 1));
    return d < 0 ? -d : d;
  endfunction

  task automatic run(cpx_t x [16], logic inv, logic serial, string name);
    vec_t got [4];
    real  er, ei, a, sg;
    int   bad;
    in_serial = serial;
    @(negedge clk);
    if (serial) begin
      for (int n = 0; n < 16; n++) begin
        s_valid = 1'b1; s_data = x[n]; s_inverse = inv;
        #1;
        while (!s_ready) begin @(negedge clk); #1; end
        @(negedge clk);
      end
      s_valid = 1'b0;
    end else begin
      p_valid = 1'b1; p_inverse = inv;
      for (int m = 0; m < 4; m++) p_data[m] = x[4 * m];
      #1;
      while (!p_ready) begin @(negedge clk); #1; end
      for (int l = 1; l < 4; l++) begin
        @(negedge clk);
        for (int m = 0; m < 4; m++) p_data[m] = x[l + 4 * m];
      end
      @(negedge clk);
      p_valid = 1'b0;
    end
    for (int s = 0; s < 4; s++) begin
      do begin @(posedge clk); #1; end while (!out_valid);
      got[s] = out_data;
    end
    sg = inv ? 1.0 : -1.0;
    bad = 0;
    for (int k = 0; k < 16; k++) begin
      er = 0.0; ei = 0.0;
      for (int n = 0; n < 16; n++) begin
        a  = sg * 2.0 * 3.14159265358979 * real'((n * k) % 16) / 16.0;
        er += x[n].re * $cos(a) - x[n].im * $sin(a);
        ei += x[n].re * $sin(a) + x[n].im * $cos(a);
      end
      checks += 2;
      if (wrapdiff(int'(got[k % 4][k / 4].re), er) > TOL) bad++;
      if (wrapdiff(int'(got[k % 4][k / 4].im), ei) > TOL) bad++;
    end
    failures += bad;
    $display("%s (%s, %s port): %0d of 32 parts outside tolerance; X[0]=(%0d,%0d) X[4]=(%0d,%0d)",
             name, inv ? "inverse" : "forward", serial ? "serial" : "vector", bad,
             int'(got[0][0].re), int'(got[0][0].im), int'(got[0][1].re), int'(got[0][1].im));
  endtask

  initial begin
    cpx_t sq [16], rnd [16];
    s_valid = 0; s_data = '0; s_inverse = 0; in_serial = 0;
    p_valid = 0; p_data = '0; p_inverse = 0;
    for (int n = 0; n < 16; n++) begin
      sq[n].re = smp_t'((n % 4) < 2 ? AMP : 0);
      sq[n].im = '0;
    end
    for (int l = 0; l < 4; l++)
      for (int m = 0; m < 4; m++) begin
        rnd[l + 4 * m].re = smp_t'(FIG_IN_RE[l][m]);
        rnd[l + 4 * m].im = smp_t'(FIG_IN_IM[l][m]);
      end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(sq, 1'b0, 1'b0, "square");
    run(sq, 1'b0, 1'b1, "square");
    run(sq, 1'b1, 1'b0, "square");
    run(rnd, 1'b0, 1'b0, "random");
    run(rnd, 1'b1, 1'b1, "random");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
