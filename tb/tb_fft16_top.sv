// tb_fft16_top -- end-to-end test of the 16-point FFT/IFFT processor at its
// default sizes.
//
// Frames go in through both input ports and every output frame is compared
// with the exact 16-point DFT (forward: exp(-j*2*pi*n*k/16); inverse:
// exp(+j*2*pi*n*k/16), no 1/16 factor), computed here in floating point and
// reduced modulo 2^DATA_W the way the processor's wrapping adders do. The
// allowed error is 4 LSB per part.
//
// The sequence:
//   1. the published 8-bit example frame (random-looking data, one output
//      that does not fit in 8 bits and wraps), checked against the exact DFT
//      and against the published outputs;
//   2. vector-input frames back to back, forward and inverse mixed, so the
//      first pass of one frame shares the 4-point FFT with the second pass of
//      the previous one; the latency of 15 clocks from the first vector to the
//      first result is checked for each;
//   3. serial frames while the serial port is not selected, so the input
//      buffer fills up and holds the writer off, then the serial port is
//      selected and those frames and more are processed.
// Each mechanism (forward, inverse, vector input, serial input, back-to-back
// interleaving, waiting for a free slot, input-buffer hold-off, wrap-around)
// is counted, and one that never happened counts as a failure.
module tb_fft16_top;
  import fft16_pkg::*;

  localparam int  TOL  = 4;
  localparam real HALF = real'(1 << (DATA_W - 1));

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
  int cycle = 0;
  always @(posedge clk) cycle++;

  // mechanism counters
  int n_fwd = 0, n_inv = 0, n_par = 0, n_ser = 0, n_overlap = 0;
  int n_wait = 0, n_hold = 0, n_wrap = 0, n_out = 0;

  typedef struct {
    cpx_t x [16];
    logic inv;
    logic fig;
  } frame_t;

  frame_t exp_q [$];
  int     start_q [$];   // cycle of first vector, -1 for serial frames
  int     last_start = -100;

  // Published example: vector l carried x[l+4m] on lane m (real, imaginary).
  localparam int FIG_IN_RE [4][4] = '{'{1, 1, 4, 3}, '{23, 0, 19, 11}, '{15, 3, 0, 38}, '{-19, 2, 2, 20}};
  localparam int FIG_IN_IM [4][4] = '{'{20, 0, 12, -8}, '{-12, -25, 0, 4}, '{42, -11, 5, 15}, '{12, 14, 18, -41}};
  // Published outputs: clock s, lane t holds X[s+4t].
  localparam int FIG_OUT_RE [4][4] = '{'{120, -82, 8, -10}, '{47, -2, 47, -72}, '{-117, -45, -51, -39}, '{31, -16, -109, 50}};
  localparam int FIG_OUT_IM [4][4] = '{'{45, -75, 105, 21}, '{49, 0, 87, -96}, '{37, 53, 95, -25}, '{-72, 125, 22, -51}};

  function automatic int wrapdiff(int a, real b);
    int d;
    d = a - $rtoi(b + (b >= 0.0 ? 0.5 : -0.5));
    d = ((d % (1 << DATA_W)) + (1 << DATA_W) + (1 << (DATA_W - 1))) % (1 << DATA_W) - (1 << (DATA_W - 1));
    return d < 0 ? -d : d;
  endfunction

  function automatic frame_t rand_frame(int amp, logic inv);
    frame_t f;
    for (int n = 0; n < 16; n++) begin
      f.x[n].re = smp_t'(int'($urandom % (2 * amp + 1)) - amp);
      f.x[n].im = smp_t'(int'($urandom % (2 * amp + 1)) - amp);
    end
    f.inv = inv;
    f.fig = 1'b0;
    return f;
  endfunction

  task automatic send_par(frame_t f);
    @(negedge clk);
    p_valid = 1'b1;
    p_inverse = f.inv;
    for (int m = 0; m < 4; m++) p_data[m] = f.x[4 * m];
    #1;
    while (!p_ready) begin n_wait++; @(negedge clk); #1; end
    exp_q.push_back(f);
    if (cycle - last_start == 8) n_overlap++;
    last_start = cycle;
    start_q.push_back(cycle);
    n_par++;
    for (int l = 1; l < 4; l++) begin
      @(negedge clk);
      p_inverse = 1'($urandom);
      for (int m = 0; m < 4; m++) p_data[m] = f.x[l + 4 * m];
    end
    @(negedge clk);
    p_valid = 1'b0;
  endtask

  task automatic send_ser(frame_t f);
    exp_q.push_back(f);
    start_q.push_back(-1);
    n_ser++;
    for (int n = 0; n < 16; n++) begin
      @(negedge clk);
      s_valid = 1'b1;
      s_data = f.x[n];
      s_inverse = (n == 0) ? f.inv : 1'($urandom);
      #1;
      while (!s_ready) begin n_hold++; @(negedge clk); #1; end
    end
    @(negedge clk);
    s_valid = 1'b0;
  endtask

  // output monitor
  initial begin
    vec_t   got [4];
    frame_t f;
    int     t0, s;
    real    er, ei, a, sg;
    logic   wrapped;
    s = 0;
    forever begin
      @(posedge clk);
      #2;
      if (out_valid) begin
        checks++;
        if (out_idx != 2'(s)) failures++;
        got[s] = out_data;
        if (s == 0) begin
          t0 = start_q[0];
          if (t0 >= 0) begin
            checks++;
            // first vector taken at cycle t0; results 15 clocks later
            if (cycle - t0 != 15) begin
              failures++;
              $display("latency %0d", cycle - t0);
            end
          end
        end
        s++;
        if (s == 4) begin
          s = 0;
          f = exp_q.pop_front();
          void'(start_q.pop_front());
          n_out++;
          checks++;
          if (out_inv != f.inv) failures++;
          if (f.inv) n_inv++; else n_fwd++;
          sg = f.inv ? 1.0 : -1.0;
          wrapped = 1'b0;
          for (int k = 0; k < 16; k++) begin
            er = 0.0; ei = 0.0;
            for (int n = 0; n < 16; n++) begin
              a  = sg * 2.0 * 3.14159265358979 * real'((n * k) % 16) / 16.0;
              er += f.x[n].re * $cos(a) - f.x[n].im * $sin(a);
              ei += f.x[n].re * $sin(a) + f.x[n].im * $cos(a);
            end
            if (er > HALF - 0.5 || er < -HALF - 0.5 || ei > HALF - 0.5 || ei < -HALF - 0.5) wrapped = 1'b1;
            checks += 2;
            if (wrapdiff(int'(got[k % 4][k / 4].re), er) > TOL) failures++;
            if (wrapdiff(int'(got[k % 4][k / 4].im), ei) > TOL) failures++;
            if (f.fig) begin
              $display("example X[%0d]: got (%0d,%0d) published (%0d,%0d) exact (%.1f,%.1f)", k,
                       int'(got[k % 4][k / 4].re), int'(got[k % 4][k / 4].im),
                       FIG_OUT_RE[k % 4][k / 4], FIG_OUT_IM[k % 4][k / 4], er, ei);
              checks += 2;
              if (wrapdiff(int'(got[k % 4][k / 4].re), real'(FIG_OUT_RE[k % 4][k / 4])) > TOL) failures++;
              if (wrapdiff(int'(got[k % 4][k / 4].im), real'(FIG_OUT_IM[k % 4][k / 4])) > TOL) failures++;
            end
          end
          if (wrapped) n_wrap++;
        end
      end
    end
  end

  initial begin
    frame_t f;
    s_valid = 0; s_data = '0; s_inverse = 0; in_serial = 0;
    p_valid = 0; p_data = '0; p_inverse = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);

    // 1. published example
    for (int l = 0; l < 4; l++)
      for (int m = 0; m < 4; m++) begin
        f.x[l + 4 * m].re = smp_t'(FIG_IN_RE[l][m]);
        f.x[l + 4 * m].im = smp_t'(FIG_IN_IM[l][m]);
      end
    f.inv = 1'b0;
    f.fig = 1'b1;
    send_par(f);

    // 2. back-to-back vector frames
    for (int i = 0; i < 24; i++) begin
      f = rand_frame(5, 1'($urandom));
      send_par(f);
      if (i % 8 == 7) repeat (5) @(negedge clk);   // a gap now and then
    end
    repeat (40) @(negedge clk);

    // 3. serial frames: first with the serial port not selected
    fork
      begin
        for (int i = 0; i < 10; i++) send_ser(rand_frame(5, 1'($urandom)));
      end
      begin
        repeat (60) @(negedge clk);
        in_serial = 1'b1;
      end
    join
    wait (exp_q.size() == 0);
    repeat (10) @(negedge clk);

    checks += 8;
    if (n_fwd == 0) failures++;
    if (n_inv == 0) failures++;
    if (n_par == 0) failures++;
    if (n_ser == 0) failures++;
    if (n_overlap == 0) failures++;
    if (n_wait == 0) failures++;
    if (n_hold == 0) failures++;
    if (n_wrap == 0) failures++;
    $display("frames out=%0d fwd=%0d inv=%0d vector=%0d serial=%0d back_to_back=%0d slot_waits=%0d buffer_holds=%0d wrapped=%0d",
             n_out, n_fwd, n_inv, n_par, n_ser, n_overlap, n_wait, n_hold, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: frames out=%0d", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
