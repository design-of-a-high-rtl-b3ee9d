// fft2048_full_tb: one complete 2048-point transform through the FFT at its
// default parameters (11 stages, 16-angle adaptive CORDIC). Random
// integer-valued real samples are streamed in as fast as the pipeline takes
// them; every output X(k) is compared with a direct DFT in double precision
// (error below 3e-4 of the rms output value) and must arrive in bit-reversed
// order. The clocks from the first accepted input to the last output are
// counted and must stay below 12173 + 2048, the latency reported for the
// reference implementation plus one frame of input time. The mean square
// error and the largest error ratio are printed.
module fft2048_full_tb;
  import tb_fp_pkg::*;

  localparam int LOG2N = 11;
  localparam int N     = 2048;

  logic             clk = 0, rst_n = 0;
  logic             in_valid, in_ready, out_valid, out_ready;
  logic [31:0]      in_re, out_re, out_im;
  logic [LOG2N-1:0] out_k, bf_fire, stall_mul, dual_xfer;
  int checks = 0, failures = 0;

  fft2048 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real xin [N];
  real cw [N], sw [N];
  longint cyc = 0, t_first = -1;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    in_valid = 0; in_re = 0;
    for (int m = 0; m < N; m++) begin
      cw[m] = $cos(2.0 * PI * real'(m) / real'(N));
      sw[m] = $sin(2.0 * PI * real'(m) / real'(N));
      xin[m] = real'($urandom_range(2000, 0)) - 1000.0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      in_valid = 1; in_re = r2f(xin[n]);
      #1;
      while (!in_ready) begin
        @(negedge clk);
        #1;
      end
      if (n == 0) t_first = cyc;
      @(posedge clk);
      #1 in_valid = 0;
    end
  end

  initial begin
    real rms, er, ei, err, mse, maxratio;
    int  k, fires;
    out_ready = 1;
    rms = 0.0; mse = 0.0; maxratio = 0.0;
    @(posedge rst_n);
    for (int n = 0; n < N; n++) rms += xin[n] ** 2;
    rms = $sqrt(rms);
    for (int p = 0; p < N; p++) begin
      @(negedge clk);
      #1;
      while (!out_valid) begin
        @(negedge clk);
        #1;
      end
      k = int'(out_k);
      checks++;
      for (int b = 0; b < LOG2N; b++)
        if (((p >> b) & 1) != ((k >> (LOG2N - 1 - b)) & 1)) begin
          failures++;
          $display("position %0d has index %0d", p, k);
          break;
        end
      er = 0.0; ei = 0.0;
      for (int n = 0; n < N; n++) begin
        er += xin[n] * cw[(k * n) % N];
        ei -= xin[n] * sw[(k * n) % N];
      end
      err = $sqrt((f2r(out_re) - er) ** 2 + (f2r(out_im) - ei) ** 2);
      mse += ((f2r(out_re) - er) ** 2 + (f2r(out_im) - ei) ** 2) / 2.0;
      if (err / $sqrt(er * er + ei * ei + 1e-30) > maxratio)
        maxratio = err / $sqrt(er * er + ei * ei + 1e-30);
      checks++;
      if (err > 3e-4 * rms) begin
        failures++;
        $display("X(%0d): got (%g, %g) expected (%g, %g)", k, f2r(out_re), f2r(out_im), er, ei);
      end
      if (p == N - 1)
        $display("2048-point transform: %0d clocks from first input to last output",
                 cyc - t_first + 1);
      @(posedge clk);
    end
    checks++;
    if (cyc - t_first + 1 > 12173 + 2048) begin
      failures++;
      $display("transform too slow");
    end
    $display("MSE %.3e, largest error ratio %.3e, rms output %.3e", mse / real'(N), maxratio, rms);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
